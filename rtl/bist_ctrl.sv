// bist_ctrl: session sequencer of the hybrid BIST.
//
// A session applies num_vectors test vectors. Each vector takes CHAIN_LEN
// shift cycles (scan_en high), during which the LFSR fills the scan chains
// with the new vector while the chains unload the previous response into the
// MISR, followed by one capture cycle (capture high, scan_en low). Guide bits
// are taken only on the first shift cycle of a vector (inject high), and only
// on every inj_period-th vector: inj_period = 1 gives one injection per
// vector, inj_period = 4 one per fourth vector (a rate of 1/4 bit per vector
// and channel). After the last capture one more CHAIN_LEN-cycle shift unloads
// the last response with the LFSR stopped; then done rises.
//
// Timing per session: num_vectors*(CHAIN_LEN+1) + CHAIN_LEN cycles from the
// cycle after start to the first cycle with done high. start is sampled in
// ST_IDLE and ST_DONE; num_vectors and inj_period are latched with it (0 for
// inj_period counts as 1). misr_clear is pulsed with start. inj_count counts
// the injections of the session and addresses the guide ROM; it is the index
// of the injection happening when inject is high.
//
// From the scheme: tester data only in the first cycle of a vector, m shift
// cycles per vector, one bit every 1/n vectors for n < 1. Own choices: the
// separate capture cycle, the final unload, the start/done handshake.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned CHAIN_LEN = 52,
  parameter int unsigned ADDR_W    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [VEC_W-1:0]  num_vectors,
  input  logic [PER_W-1:0]  inj_period,
  output ctrl_state_e       state,
  output logic              busy,
  output logic              done,
  output logic              scan_en,
  output logic              capture,
  output logic              lfsr_shift,
  output logic              inject,
  output logic              misr_en,
  output logic              misr_clear,
  output logic [VEC_W-1:0]  vec_count,
  output logic [ADDR_W-1:0] inj_count
);

  localparam int unsigned SH_W = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1;

  logic [SH_W-1:0]  shift_cnt;
  logic [PER_W-1:0] per_cnt;
  logic [VEC_W-1:0] num_vec_q;
  logic [PER_W-1:0] period_q;
  logic             loading;
  logic             last_shift;
  logic             start_ok;

  assign start_ok   = start && (state == ST_IDLE || state == ST_DONE);
  assign loading    = (vec_count < num_vec_q);
  assign last_shift = (32'(shift_cnt) == CHAIN_LEN - 1);

  always_comb begin
    busy       = (state == ST_SHIFT) || (state == ST_CAPTURE);
    done       = (state == ST_DONE);
    scan_en    = (state == ST_SHIFT);
    capture    = (state == ST_CAPTURE);
    lfsr_shift = (state == ST_SHIFT) && loading;
    inject     = lfsr_shift && (shift_cnt == '0) && (per_cnt == '0);
    misr_en    = (state == ST_SHIFT) && (vec_count != '0);
    misr_clear = start_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      shift_cnt <= '0;
      per_cnt   <= '0;
      num_vec_q <= '0;
      period_q  <= PER_W'(1);
      vec_count <= '0;
      inj_count <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start_ok) begin
            num_vec_q <= num_vectors;
            period_q  <= (inj_period == '0) ? PER_W'(1) : inj_period;
            shift_cnt <= '0;
            per_cnt   <= '0;
            vec_count <= '0;
            inj_count <= '0;
            state     <= (num_vectors == '0) ? ST_DONE : ST_SHIFT;
          end
        end
        ST_SHIFT: begin
          if (inject) begin
            inj_count <= inj_count + 1'b1;
          end
          if (last_shift) begin
            shift_cnt <= '0;
            state     <= loading ? ST_CAPTURE : ST_DONE;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        ST_CAPTURE: begin
          vec_count <= vec_count + 1'b1;
          per_cnt   <= (per_cnt == period_q - 1'b1) ? '0 : per_cnt + 1'b1;
          state     <= ST_SHIFT;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Guide bits are only ever taken on the first shift cycle of a vector.
  a_inject_first_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    inject |-> (state == ST_SHIFT && shift_cnt == '0));
  // Scan shifting and capture never overlap.
  a_shift_capture_excl: assert property (@(posedge clk) disable iff (!rst_n)
    !(scan_en && capture));

  initial begin
    assert (CHAIN_LEN >= 1) else $error("bist_ctrl: CHAIN_LEN must be at least 1");
  end

endmodule
