// bist_pkg: types and constants shared by the hybrid BIST blocks.
//
// The hybrid BIST is a STUMPS arrangement (one LFSR loading many scan chains,
// one MISR compacting what they unload) whose LFSR can be "guided": during the
// first shift of a test vector, a few bits from the tester (or from an on-chip
// ROM) are XORed into the LFSR so that a later vector contains a chosen test
// cube. This package holds the controller state encoding, the guide-bit source
// select and the default feedback polynomials.
//
// Polynomial convention used by guided_lfsr and misr: stage 0 receives the
// feedback, stage k feeds stage k+1, and bit k of a TAPS mask set means stage
// k takes part in the XOR feedback. The defaults are maximal-length
// polynomials from the usual published tap tables (stages numbered from 1 there):
//   4 bits : taps 4,3          (the small example LFSR)
//   8 bits : taps 8,6,5,4
//   16 bits: taps 16,15,13,4
//   32 bits: taps 32,22,2,1
//   64 bits: taps 64,63,61,60
package bist_pkg;

  // Controller phases: idle, shift one vector in / one response out, capture
  // the response, finished.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_SHIFT   = 2'd1,
    ST_CAPTURE = 2'd2,
    ST_DONE    = 2'd3
  } ctrl_state_e;

  // Where the guide bits come from.
  typedef enum logic {
    GUIDE_TESTER = 1'b0,  // external tester channels
    GUIDE_ROM    = 1'b1   // on-chip ROM (stand-alone BIST)
  } guide_src_e;

  localparam logic [3:0]  TAPS_4  = 4'b1100;
  localparam logic [7:0]  TAPS_8  = 8'b1011_1000;
  localparam logic [15:0] TAPS_16 = 16'hD008;
  localparam logic [31:0] TAPS_32 = 32'h8020_0003;
  localparam logic [63:0] TAPS_64 = 64'hD800_0000_0000_0000;

  // Widths of the run-time counters: up to 2^32-1 vectors per session, and up
  // to 255 vectors between two guide-bit injections.
  localparam int unsigned VEC_W = 32;
  localparam int unsigned PER_W = 8;

endpackage
