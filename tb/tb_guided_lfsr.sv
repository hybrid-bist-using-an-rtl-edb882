// tb_guided_lfsr: self-checking testbench for guided_lfsr.
//
// 1. Worked example: a 4-bit LFSR with feedback from stages 2 and 3, start
//    state 1011, three scan chains of four cells fed from stages 0..2, one
//    guide bit per vector (free variables a, b, c). For all eight values of
//    (a, b, c) the three vectors in the chains are compared with the symbolic
//    expressions of the example, written here as tables of XOR terms.
// 2. Maximal length: the 8-bit and 16-bit default polynomials must return to
//    the start state after exactly 2^n - 1 steps and not before.
// 3. Reference model: the default 64-bit, 4-channel instance is run with
//    random shift, inject, guide bits and seed loads, and compared every
//    cycle with a model of the feedback and the spaced injection points.
module tb_guided_lfsr;
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

  // ---------------- 1. worked example ----------------
  logic       ex_seed_we, ex_shift, ex_inj;
  logic [0:0] ex_data;
  logic [3:0] ex_state, ex_sv;

  guided_lfsr #(.LEN(4), .TAPS(TAPS_4), .N_CH(1), .RESET_STATE(4'b0001)) u_ex (
    .clk(clk), .rst_n(rst_n), .seed_we(ex_seed_we), .seed(4'b1101),
    .shift_en(ex_shift), .inject_en(ex_inj), .inject_data(ex_data),
    .state(ex_state), .shift_value(ex_sv));
  // Start state written 1011 as stages 0,1,2,3 -> seed[0]=1, seed[1]=0,
  // seed[2]=1, seed[3]=1, i.e. 4'b1101.

  // Expressions: bit 3 = constant 1, bit 2 = c, bit 1 = b, bit 0 = a.
  // EXPR[v][row][col], col 0 is the cell nearest the scan input.
  typedef logic [3:0] term_t;
  localparam term_t A = 4'b0001, B = 4'b0010, C = 4'b0100, ONE = 4'b1000;
  term_t expr [3][3][4];
  initial begin
    expr[0][0] = '{A ^ ONE, ONE, ONE, A};
    expr[0][1] = '{ONE, ONE, A, ONE};
    expr[0][2] = '{ONE, A, ONE, 4'b0000};
    expr[1][0] = '{B, A, 4'b0000, A ^ ONE ^ B};
    expr[1][1] = '{A, 4'b0000, A ^ ONE ^ B, A ^ ONE};
    expr[1][2] = '{4'b0000, A ^ ONE ^ B, A ^ ONE, ONE};
    expr[2][0] = '{A ^ ONE ^ C, A ^ B, A, A ^ ONE ^ B ^ C};
    expr[2][1] = '{A ^ B, A, A ^ ONE ^ B ^ C, B};
    expr[2][2] = '{A, A ^ ONE ^ B ^ C, B, A};
  end

  function automatic logic eval(term_t t, logic [2:0] abc);
    return ^(t & {1'b1, abc[2], abc[1], abc[0]});
  endfunction

  // ---------------- 2. period ----------------
  logic p8_shift, p16_shift;
  logic [7:0]  p8_state, p8_sv;
  logic [15:0] p16_state, p16_sv;

  guided_lfsr #(.LEN(8), .TAPS(TAPS_8), .N_CH(1), .RESET_STATE(8'h01)) u_p8 (
    .clk(clk), .rst_n(rst_n), .seed_we(1'b0), .seed('0), .shift_en(p8_shift),
    .inject_en(1'b0), .inject_data(1'b0), .state(p8_state), .shift_value(p8_sv));
  guided_lfsr #(.LEN(16), .TAPS(TAPS_16), .N_CH(1), .RESET_STATE(16'h0001)) u_p16 (
    .clk(clk), .rst_n(rst_n), .seed_we(1'b0), .seed('0), .shift_en(p16_shift),
    .inject_en(1'b0), .inject_data(1'b0), .state(p16_state), .shift_value(p16_sv));

  // ---------------- 3. default instance against a model ----------------
  logic        d_seed_we, d_shift, d_inj;
  logic [63:0] d_seed, d_state, d_sv;
  logic [3:0]  d_data;

  guided_lfsr u_def (
    .clk(clk), .rst_n(rst_n), .seed_we(d_seed_we), .seed(d_seed),
    .shift_en(d_shift), .inject_en(d_inj), .inject_data(d_data),
    .state(d_state), .shift_value(d_sv));

  function automatic logic [63:0] model_step(logic [63:0] s, logic inj, logic [3:0] g);
    logic [63:0] n;
    logic fb;
    // x^64 + x^63 + x^61 + x^60 + 1 in tap-table form: stages 64,63,61,60
    fb = s[63] ^ s[62] ^ s[60] ^ s[59];
    n = {s[62:0], fb};
    if (inj) begin
      n[0]  ^= g[0];
      n[16] ^= g[1];
      n[32] ^= g[2];
      n[48] ^= g[3];
    end
    return n;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [3:0] chain [3];
    logic [3:0] got;
    logic [63:0] model;
    int period;

    ex_seed_we = 0; ex_shift = 0; ex_inj = 0; ex_data = 0;
    p8_shift = 0; p16_shift = 0;
    d_seed_we = 0; d_shift = 0; d_inj = 0; d_data = 0; d_seed = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(d_state == 64'h1 && p8_state == 8'h01, "reset state");

    // 1. worked example, all assignments of a, b, c
    for (int abc = 0; abc < 8; abc++) begin
      logic [2:0] v;
      v = 3'(abc);
      ex_seed_we = 1;
      @(negedge clk);
      ex_seed_we = 0;
      check(ex_state == 4'b1101, "example seed load");
      for (int vec = 0; vec < 3; vec++) begin
        for (int cyc = 0; cyc < 4; cyc++) begin
          ex_shift = 1;
          ex_inj   = (cyc == 0);
          ex_data  = v[vec];
          #1;
          for (int r = 0; r < 3; r++) chain[r] = {chain[r][2:0], ex_sv[r]};
          @(negedge clk);
        end
        ex_shift = 0; ex_inj = 0;
        for (int r = 0; r < 3; r++) begin
          for (int c = 0; c < 4; c++) got[c] = eval(expr[vec][r][c], v);
          check(chain[r] == got,
                $sformatf("example abc=%0d vector %0d chain %0d: got %b want %b",
                          abc, vec + 1, r + 1, chain[r], got));
        end
      end
    end

    // 2. maximal length of the 8- and 16-bit polynomials
    period = 0;
    p8_shift = 1;
    do begin
      @(negedge clk);
      period++;
    end while (p8_state != 8'h01 && period < 300);
    p8_shift = 0;
    check(period == 255, $sformatf("8-bit period %0d", period));
    period = 0;
    p16_shift = 1;
    do begin
      @(negedge clk);
      period++;
    end while (p16_state != 16'h0001 && period < 70000);
    p16_shift = 0;
    check(period == 65535, $sformatf("16-bit period %0d", period));

    // 3. default instance, random stimulus
    model = d_state;
    for (int i = 0; i < 3000; i++) begin
      d_seed_we = ($urandom_range(0, 99) == 0);
      d_seed    = {$urandom, $urandom};
      d_shift   = ($urandom_range(0, 3) != 0);
      d_inj     = ($urandom_range(0, 2) == 0);
      d_data    = 4'($urandom);
      #1;
      check(d_sv == model_step(model, d_inj, d_data), "default shift_value");
      if (d_seed_we)    model = d_seed;
      else if (d_shift) model = model_step(model, d_inj, d_data);
      @(negedge clk);
      check(d_state == model, $sformatf("default state step %0d", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
