// tb_guide_rom: self-checking testbench for guide_rom.
//
// A 4-channel, 64-word ROM is given contents from a formula (word i =
// (i*7 + 3) mod 16) and every address is read back and compared with the
// formula; addresses beyond the depth must read zero. The default instance
// (all-zero contents) must read zero everywhere.
module tb_guide_rom;

  localparam int unsigned DEPTH = 64;

  function automatic logic [DEPTH*4-1:0] make_contents();
    logic [DEPTH*4-1:0] c;
    for (int i = 0; i < DEPTH; i++) c[i*4 +: 4] = 4'((i * 7 + 3) % 16);
    return c;
  endfunction

  localparam logic [DEPTH*4-1:0] CONTENTS = make_contents();

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] addr, daddr;
  logic [3:0]  data, ddata;

  guide_rom #(.N_CH(4), .DEPTH(DEPTH), .ADDR_W(16), .CONTENTS(CONTENTS)) u_dut (
    .addr(addr), .data(data));
  guide_rom u_def (.addr(daddr), .data(ddata));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int i = 0; i < DEPTH + 8; i++) begin
      addr = 16'(i);
      #1;
      check(data == ((i < DEPTH) ? 4'((i * 7 + 3) % 16) : 4'h0),
            $sformatf("word %0d: got %h", i, data));
    end
    for (int i = 0; i < 300; i++) begin
      daddr = 16'(i);
      #1;
      check(ddata == 4'h0, "default contents zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
