// guide_rom: on-chip store of guide bits for stand-alone operation.
//
// When no tester is used, the guide bits that steer the LFSR come from a ROM
// instead: word i holds the N_CH bits injected at the i-th injection of the
// session. The contents are computed off line by the same cube-embedding
// procedure that produces tester data, and are given here as the packed
// parameter CONTENTS (word i in bits [i*N_CH +: N_CH]). The all-zero default
// turns the block into plain pseudo-random BIST.
//
// Interface: addr selects the word; data is combinational (asynchronous
// read), so the controller can present the address of the next injection and
// have the bits in the same cycle it injects. Addresses at or above DEPTH read
// zero, i.e. the LFSR runs unguided once the stored data is used up. The
// scheme names the ROM and its role; its organisation is this design's choice.
module guide_rom #(
  parameter int unsigned              N_CH     = 4,
  parameter int unsigned              DEPTH    = 256,
  parameter int unsigned              ADDR_W   = 16,
  parameter logic [DEPTH*N_CH-1:0]    CONTENTS = '0
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [N_CH-1:0]   data
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [N_CH-1:0] mem [DEPTH];

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      mem[i] = CONTENTS[i*N_CH +: N_CH];
    end
  end

  always_comb begin
    if (32'(addr) < DEPTH) begin
      data = mem[IDX_W'(addr)];
    end else begin
      data = '0;
    end
  end

endmodule
