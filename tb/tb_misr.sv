// tb_misr: self-checking testbench for misr.
//
// The default 32-bit, 32-input MISR is driven with random data, enable and
// clear for several thousand cycles and compared each cycle with a model of
// x^32 + x^22 + x^2 + x + 1 compaction written here bit by bit. A second,
// 8-bit instance with 3 inputs checks the narrow-input case, and a final test
// shows that a single flipped response bit changes the signature.
module tb_misr;
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

  logic        clr, en;
  logic [31:0] din, sig;
  logic        s_clr, s_en;
  logic [2:0]  s_din;
  logic [7:0]  s_sig;

  misr u_dut (.clk(clk), .rst_n(rst_n), .clear(clr), .en(en), .data_in(din), .signature(sig));
  misr #(.LEN(8), .N_IN(3), .TAPS(TAPS_8)) u_small (
    .clk(clk), .rst_n(rst_n), .clear(s_clr), .en(s_en), .data_in(s_din), .signature(s_sig));

  function automatic logic [31:0] step32(logic [31:0] s, logic [31:0] d);
    logic [31:0] n;
    for (int k = 31; k >= 1; k--) n[k] = s[k-1] ^ d[k];
    n[0] = s[31] ^ s[21] ^ s[1] ^ s[0] ^ d[0];
    return n;
  endfunction

  function automatic logic [7:0] step8(logic [7:0] s, logic [2:0] d);
    logic [7:0] n;
    for (int k = 7; k >= 1; k--) n[k] = s[k-1] ^ ((k < 3) ? d[k] : 1'b0);
    n[0] = s[7] ^ s[5] ^ s[4] ^ s[3] ^ d[0];
    return n;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] m32, sig_a;
    logic [7:0]  m8;
    logic [31:0] stream [64];
    clr = 0; en = 0; din = 0; s_clr = 0; s_en = 0; s_din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sig == '0 && s_sig == '0, "reset to zero");
    m32 = '0; m8 = '0;
    for (int i = 0; i < 4000; i++) begin
      clr = ($urandom_range(0, 199) == 0);
      en  = ($urandom_range(0, 4) != 0);
      din = $urandom;
      s_clr = ($urandom_range(0, 199) == 0);
      s_en  = ($urandom_range(0, 4) != 0);
      s_din = 3'($urandom);
      if (clr)     m32 = '0;
      else if (en) m32 = step32(m32, din);
      if (s_clr)     m8 = '0;
      else if (s_en) m8 = step8(m8, s_din);
      @(negedge clk);
      check(sig == m32, $sformatf("32-bit signature cycle %0d", i));
      check(s_sig == m8, $sformatf("8-bit signature cycle %0d", i));
    end
    // One flipped response bit must change the signature.
    for (int i = 0; i < 64; i++) stream[i] = $urandom;
    for (int pass = 0; pass < 2; pass++) begin
      clr = 1; en = 0;
      @(negedge clk);
      clr = 0; en = 1;
      for (int i = 0; i < 64; i++) begin
        din = stream[i] ^ ((pass == 1 && i == 17) ? 32'h0000_0400 : 32'h0);
        @(negedge clk);
      end
      en = 0;
      if (pass == 0) sig_a = sig;
      else check(sig != sig_a, "single-bit error detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
