// misr: multiple-input signature register compacting the scan-chain outputs.
//
// A LEN-stage LFSR in the same Fibonacci form as guided_lfsr (stage 0 takes
// the XOR of the TAPS stages, stage k takes stage k-1) with one data input
// XORed into each of the first N_IN stages on every enabled step:
//   next[0] = ^(sig & TAPS) ^ data_in[0],  next[k] = sig[k-1] ^ data_in[k].
// Scan chain k drives data_in[k]. With a primitive polynomial, two different
// response streams give the same signature with probability about 2^-LEN.
//
// Interface: clear sets the signature to zero (it wins over en); en compacts
// data_in on this clock. Timing: one step per rising clock edge; signature is
// the register output. The scheme only says the responses are shifted into a
// MISR; its length, polynomial and clear behaviour are this design's choices.
module misr #(
  parameter int unsigned    LEN  = 32,
  parameter int unsigned    N_IN = 32,
  parameter logic [LEN-1:0] TAPS = bist_pkg::TAPS_32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [N_IN-1:0] data_in,
  output logic [LEN-1:0]  signature
);

  logic [LEN-1:0] next_sig;

  always_comb begin
    next_sig = {signature[LEN-2:0], ^(signature & TAPS)};
    next_sig = next_sig ^ LEN'(data_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature <= '0;
    end else if (clear) begin
      signature <= '0;
    end else if (en) begin
      signature <= next_sig;
    end
  end

  initial begin
    assert (N_IN >= 1 && N_IN <= LEN) else $error("misr: N_IN must be 1..LEN");
  end

endmodule
