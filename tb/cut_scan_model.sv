// cut_scan_model: behavioural model of a circuit under test with scan chains.
//
// Only for simulation. NUM_CHAINS chains of CHAIN_LEN cells. While scan_en is
// high every chain shifts one cell per clock: cell 0 takes scan_in[k] and the
// last cell drives scan_out[k]. When capture is high the cells take a response
// that depends non-linearly on the loaded vector:
//   cell[k][i] <= cell[k][i] ^ (cell[k+1][i] & cell[k][i+1])   (indices wrap)
// which stands in for the combinational logic of a real design. cells exposes
// the contents, flattened as cells[k*CHAIN_LEN + i], so a testbench can see
// the vector that was shifted in.
module cut_scan_model #(
  parameter int unsigned NUM_CHAINS = 32,
  parameter int unsigned CHAIN_LEN  = 52
) (
  input  logic                            clk,
  input  logic                            scan_en,
  input  logic                            capture,
  input  logic [NUM_CHAINS-1:0]           scan_in,
  output logic [NUM_CHAINS-1:0]           scan_out,
  output logic [NUM_CHAINS*CHAIN_LEN-1:0] cells
);

  initial cells = '0;

  always @(posedge clk) begin
    logic [NUM_CHAINS*CHAIN_LEN-1:0] nxt;
    nxt = cells;
    if (scan_en) begin
      for (int k = 0; k < NUM_CHAINS; k++) begin
        for (int i = CHAIN_LEN - 1; i > 0; i--) nxt[k*CHAIN_LEN + i] = cells[k*CHAIN_LEN + i - 1];
        nxt[k*CHAIN_LEN] = scan_in[k];
      end
    end else if (capture) begin
      for (int k = 0; k < NUM_CHAINS; k++) begin
        for (int i = 0; i < CHAIN_LEN; i++) begin
          nxt[k*CHAIN_LEN + i] = cells[k*CHAIN_LEN + i]
            ^ (cells[((k + 1) % NUM_CHAINS)*CHAIN_LEN + i] & cells[k*CHAIN_LEN + (i + 1) % CHAIN_LEN]);
        end
      end
    end
    cells <= nxt;
  end

  always_comb begin
    for (int k = 0; k < NUM_CHAINS; k++) scan_out[k] = cells[k*CHAIN_LEN + CHAIN_LEN - 1];
  end

endmodule
