// guided_lfsr: the incrementally guided LFSR of the hybrid BIST.
//
// An external-feedback (Fibonacci) LFSR of LEN stages. On each enabled step
// stage 0 takes the XOR of the stages selected by TAPS and every stage k>0
// takes stage k-1. The one change to a plain STUMPS LFSR is an extra XOR in
// the feedback: when inject_en is high, guide bit 0 is XORed into the
// feedback. With N_CH guide channels, channel j is XORed into the input of
// stage j*(LEN/N_CH), so the channels enter at regularly spaced points and
// channel 0 always enters at the feedback. The guide bits are free variables
// chosen off line so that a later vector contains a wanted test cube.
//
// shift_value is the state the register takes on the current step (the D side
// of the flip-flops). Stage k of it drives scan chain k, so the bits shifted
// into the chains on a step already include the guide bits injected on that
// step. This is how the small worked example of the scheme behaves (a 4-bit
// LFSR with taps on stages 2 and 3, three chains of four cells, start state
// 1011, where the first guide bit already shows in the first vector); the
// testbench checks that example.
//
// Interface: seed_we loads seed (it wins over shift_en); rst_n resets to
// RESET_STATE. One step per clock while shift_en is high. Timing: state
// changes on the rising clock edge; shift_value is combinational from state
// and the inject inputs.
//
// From the scheme: the extra feedback XOR, injection only when asked, the
// spaced injection points, seed or reset start state. Own choices: Fibonacci
// form, the default length and polynomial, D-side chain taps.
module guided_lfsr #(
  parameter int unsigned     LEN         = 64,
  parameter logic [LEN-1:0]  TAPS        = bist_pkg::TAPS_64,
  parameter int unsigned     N_CH        = 4,
  parameter logic [LEN-1:0]  RESET_STATE = LEN'(1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            seed_we,
  input  logic [LEN-1:0]  seed,
  input  logic            shift_en,
  input  logic            inject_en,
  input  logic [N_CH-1:0] inject_data,
  output logic [LEN-1:0]  state,
  output logic [LEN-1:0]  shift_value
);

  localparam int unsigned SPACING = LEN / N_CH;

  // Guide bits placed at their stage positions.
  logic [LEN-1:0] inject_vec;

  always_comb begin
    inject_vec = '0;
    if (inject_en) begin
      for (int unsigned j = 0; j < N_CH; j++) begin
        inject_vec[j*SPACING] = inject_data[j];
      end
    end
  end

  always_comb begin
    shift_value    = {state[LEN-2:0], ^(state & TAPS)};
    shift_value    = shift_value ^ inject_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RESET_STATE;
    end else if (seed_we) begin
      state <= seed;
    end else if (shift_en) begin
      state <= shift_value;
    end
  end

  initial begin
    assert (N_CH >= 1 && N_CH <= LEN) else $error("guided_lfsr: N_CH must be 1..LEN");
    assert (LEN >= 2) else $error("guided_lfsr: LEN must be at least 2");
  end

endmodule
