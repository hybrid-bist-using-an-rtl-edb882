// hybrid_bist_top: STUMPS BIST with an incrementally guided LFSR.
//
// Pseudo-random BIST alone leaves random-pattern-resistant faults undetected.
// Here the tester does not store those faults' test vectors; it only drops a
// few "guide" bits into the LFSR feedback at the start of each vector (or of
// every few vectors). Chosen off line by solving linear equations over GF(2),
// these bits steer the LFSR so that the hard-fault test cubes turn up inside
// the pseudo-random sequence. The tester then stores N_CH bits per injection
// instead of whole vectors.
//
// Structure:
//   bist_ctrl   - vector / shift / capture sequencing, injection timing
//   guide_rom   - optional on-chip guide bits (guide_src = GUIDE_ROM)
//   guided_lfsr - LFSR with the guide-bit XOR, stage k drives scan chain k
//   misr        - compacts the NUM_CHAINS scan outputs
// The scan chains belong to the circuit under test. They connect through
// scan_in / scan_out / scan_en / capture.
//
// Operation: optionally load an LFSR seed (seed_we, while not busy), then
// pulse start with num_vectors (test length L) and inj_period (1 for one
// injection per vector; k for one every k vectors). On every injection cycle
// guide_req is high and the N_CH bits on tester_data (or the ROM word) are
// XORed into the LFSR. A tester driving only channel 0 and zeros elsewhere
// gives one bit per vector. done rises num_vectors*(CHAIN_LEN+1)+CHAIN_LEN
// cycles after start; signature then holds the MISR contents.
//
// Defaults: 4 channels (the widest rate of 4 bits per vector); 32 chains of
// 52 cells (1664 cells, room for the largest benchmark circuit considered);
// a 64-bit LFSR and a 32-bit MISR. Chain count, chain length, LFSR and MISR
// lengths and polynomials are this design's choices, not given by the scheme.
module hybrid_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned             LFSR_LEN    = 64,
  parameter logic [LFSR_LEN-1:0]     LFSR_TAPS   = TAPS_64,
  parameter logic [LFSR_LEN-1:0]     LFSR_RESET  = LFSR_LEN'(1),
  parameter int unsigned             N_CH        = 4,
  parameter int unsigned             NUM_CHAINS  = 32,
  parameter int unsigned             CHAIN_LEN   = 52,
  parameter int unsigned             MISR_LEN    = 32,
  parameter logic [MISR_LEN-1:0]     MISR_TAPS   = TAPS_32,
  parameter int unsigned             ROM_DEPTH   = 256,
  parameter int unsigned             ROM_ADDR_W  = 16,
  parameter logic [ROM_DEPTH*N_CH-1:0] ROM_CONTENTS = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // session control
  input  logic                  start,
  input  logic [VEC_W-1:0]      num_vectors,
  input  logic [PER_W-1:0]      inj_period,
  input  guide_src_e            guide_src,
  output logic                  busy,
  output logic                  done,
  output logic [VEC_W-1:0]      vec_count,
  // LFSR seed
  input  logic                  seed_we,
  input  logic [LFSR_LEN-1:0]   seed,
  // tester channels
  output logic                  guide_req,
  input  logic [N_CH-1:0]       tester_data,
  // scan chains of the circuit under test
  output logic                  scan_en,
  output logic                  capture,
  output logic [NUM_CHAINS-1:0] scan_in,
  input  logic [NUM_CHAINS-1:0] scan_out,
  // result
  output logic [MISR_LEN-1:0]   signature
);

  ctrl_state_e           ctrl_state;
  logic                  lfsr_shift;
  logic                  inject;
  logic                  misr_en;
  logic                  misr_clear;
  logic [ROM_ADDR_W-1:0] inj_count;
  logic [N_CH-1:0]       rom_data;
  logic [N_CH-1:0]       guide_bits;
  logic [LFSR_LEN-1:0]   lfsr_state;
  logic [LFSR_LEN-1:0]   lfsr_shift_value;

  bist_ctrl #(
    .CHAIN_LEN (CHAIN_LEN),
    .ADDR_W    (ROM_ADDR_W)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .num_vectors (num_vectors),
    .inj_period  (inj_period),
    .state       (ctrl_state),
    .busy        (busy),
    .done        (done),
    .scan_en     (scan_en),
    .capture     (capture),
    .lfsr_shift  (lfsr_shift),
    .inject      (inject),
    .misr_en     (misr_en),
    .misr_clear  (misr_clear),
    .vec_count   (vec_count),
    .inj_count   (inj_count)
  );

  guide_rom #(
    .N_CH     (N_CH),
    .DEPTH    (ROM_DEPTH),
    .ADDR_W   (ROM_ADDR_W),
    .CONTENTS (ROM_CONTENTS)
  ) u_rom (
    .addr (inj_count),
    .data (rom_data)
  );

  assign guide_bits = (guide_src == GUIDE_ROM) ? rom_data : tester_data;
  assign guide_req  = inject && (guide_src == GUIDE_TESTER);

  guided_lfsr #(
    .LEN         (LFSR_LEN),
    .TAPS        (LFSR_TAPS),
    .N_CH        (N_CH),
    .RESET_STATE (LFSR_RESET)
  ) u_lfsr (
    .clk         (clk),
    .rst_n       (rst_n),
    .seed_we     (seed_we && !busy),
    .seed        (seed),
    .shift_en    (lfsr_shift),
    .inject_en   (inject),
    .inject_data (guide_bits),
    .state       (lfsr_state),
    .shift_value (lfsr_shift_value)
  );

  assign scan_in = lfsr_shift_value[NUM_CHAINS-1:0];

  misr #(
    .LEN  (MISR_LEN),
    .N_IN (NUM_CHAINS),
    .TAPS (MISR_TAPS)
  ) u_misr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (misr_clear),
    .en        (misr_en),
    .data_in   (scan_out),
    .signature (signature)
  );

  initial begin
    assert (NUM_CHAINS <= LFSR_LEN) else $error("hybrid_bist_top: one LFSR stage per scan chain needed");
    assert (NUM_CHAINS <= MISR_LEN) else $error("hybrid_bist_top: one MISR stage per scan chain needed");
  end

endmodule
