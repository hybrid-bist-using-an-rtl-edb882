// tb_bist_ctrl: self-checking testbench for bist_ctrl.
//
// Runs sessions with several test lengths L and injection periods P on a
// controller with 5-cell chains and one with the default 52-cell chains. For
// every cycle of a session the outputs are compared with the expected
// schedule, built here from loops: for each vector v = 0..L, CHAIN_LEN shift
// cycles (LFSR shifting while v < L, guide bits taken on the first shift of
// vectors with v mod P = 0, MISR enabled for v > 0), then a capture cycle for
// v < L; then done. The session length L*(m+1)+m cycles, the injection
// count, L = 0 and P = 0 are checked, and a session is restarted from done.
module tb_bist_ctrl;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Outputs of one controller, packed for comparison:
  // {busy, done, scan_en, capture, lfsr_shift, inject, misr_en}
  typedef logic [6:0] outs_t;

  logic             start [2];
  logic [VEC_W-1:0] nvec  [2];
  logic [PER_W-1:0] per   [2];
  outs_t            o     [2];
  logic             mclr  [2];
  logic [VEC_W-1:0] vcnt  [2];
  logic [15:0]      icnt  [2];
  ctrl_state_e      st    [2];

  bist_ctrl #(.CHAIN_LEN(5)) u_small (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .num_vectors(nvec[0]), .inj_period(per[0]),
    .state(st[0]), .busy(o[0][6]), .done(o[0][5]), .scan_en(o[0][4]), .capture(o[0][3]),
    .lfsr_shift(o[0][2]), .inject(o[0][1]), .misr_en(o[0][0]), .misr_clear(mclr[0]),
    .vec_count(vcnt[0]), .inj_count(icnt[0]));

  bist_ctrl u_def (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .num_vectors(nvec[1]), .inj_period(per[1]),
    .state(st[1]), .busy(o[1][6]), .done(o[1][5]), .scan_en(o[1][4]), .capture(o[1][3]),
    .lfsr_shift(o[1][2]), .inject(o[1][1]), .misr_en(o[1][0]), .misr_clear(mclr[1]),
    .vec_count(vcnt[1]), .inj_count(icnt[1]));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one session on controller d with chain length m and compare every cycle.
  task automatic session(input int d, input int m, input int L, input int P);
    int peff, cycles, injections, vec;
    outs_t exp_o;
    peff = (P == 0) ? 1 : P;
    nvec[d] = VEC_W'(L);
    per[d]  = PER_W'(P);
    start[d] = 1;
    #1;
    check(mclr[d] == 1'b1, "misr_clear with start");
    @(negedge clk);
    start[d] = 0;
    nvec[d] = '1;   // latched at start: changing it now must not matter
    per[d]  = '1;
    cycles = 0;
    injections = 0;
    if (L > 0) begin
      for (int v = 0; v <= L; v++) begin
        for (int s = 0; s < m; s++) begin
          exp_o = {1'b1, 1'b0, 1'b1, 1'b0, (v < L), (v < L && s == 0 && v % peff == 0), (v > 0)};
          check(o[d] == exp_o, $sformatf("ctrl%0d L=%0d P=%0d v=%0d s=%0d: got %b want %b",
                                         d, L, P, v, s, o[d], exp_o));
          if (o[d][1]) begin
            check(icnt[d] == 16'(injections), "inj_count at injection");
            injections++;
          end
          check(vcnt[d] == VEC_W'(v), "vec_count during shift");
          @(negedge clk);
          cycles++;
        end
        if (v < L) begin
          exp_o = 7'b1001000;
          check(o[d] == exp_o, $sformatf("ctrl%0d capture v=%0d: got %b", d, v, o[d]));
          @(negedge clk);
          cycles++;
        end
      end
    end
    check(o[d] == 7'b0100000, $sformatf("ctrl%0d done after session L=%0d: got %b", d, L, o[d]));
    check(cycles == ((L > 0) ? L * (m + 1) + m : 0),
          $sformatf("session length %0d cycles", cycles));
    check(injections == (L + peff - 1) / peff, $sformatf("injection count %0d", injections));
    check(32'(icnt[d]) == (L + peff - 1) / peff, "final inj_count");
    vec = int'(vcnt[d]);
    check(vec == L, "final vec_count");
  endtask

  initial begin : main
    for (int d = 0; d < 2; d++) begin
      start[d] = 0; nvec[d] = 0; per[d] = 1;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(st[0] == ST_IDLE && o[0] == 7'b0 && o[1] == 7'b0, "idle after reset");
    session(0, 5, 3, 1);
    session(0, 5, 9, 4);     // one bit every fourth vector
    session(0, 5, 7, 0);     // 0 counts as 1
    session(0, 5, 0, 1);     // empty session
    session(0, 5, 1, 3);
    session(0, 5, 20, 3);
    session(1, 52, 6, 1);
    session(1, 52, 9, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
