// tb_hybrid_bist_rom: stand-alone operation of hybrid_bist_top from its ROM.
//
// A reduced top (16-stage LFSR, 4 channels, 8 chains of 6 cells, 16-bit
// MISR) is built with a 16-word guide ROM whose word i is (5*i + 9) mod 16.
// A session of 40 vectors with one injection every second vector uses 20
// words: the 16 stored ones, then four past the end that must read as zero.
// Every shift cycle is compared with a model of the LFSR fed with the ROM
// words in order; guide_req must stay low since the tester is not used. The
// signature is checked against a MISR model, and a tester-mode session
// follows to show that the source select switches back.
module tb_hybrid_bist_rom;
  import bist_pkg::*;

  localparam int R     = 16;
  localparam int NCH   = 4;
  localparam int NC    = 8;
  localparam int CL    = 6;
  localparam int ML    = 16;
  localparam int DEPTH = 16;
  localparam int SP    = R / NCH;

  function automatic logic [DEPTH*NCH-1:0] rom_image();
    logic [DEPTH*NCH-1:0] c;
    for (int i = 0; i < DEPTH; i++) c[i*NCH +: NCH] = NCH'((5 * i + 9) % 16);
    return c;
  endfunction

  function automatic logic [NCH-1:0] rom_word(int i);
    return (i < DEPTH) ? NCH'((5 * i + 9) % 16) : '0;
  endfunction

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

  logic             start, busy, done, seed_we, guide_req, scan_en, capture;
  logic [VEC_W-1:0] num_vectors, vec_count;
  logic [PER_W-1:0] inj_period;
  guide_src_e       guide_src;
  logic [R-1:0]     seed;
  logic [NCH-1:0]   tester_data;
  logic [NC-1:0]    scan_in, scan_out;
  logic [ML-1:0]    signature;
  logic [NC*CL-1:0] cells;

  hybrid_bist_top #(
    .LFSR_LEN(R), .LFSR_TAPS(TAPS_16), .LFSR_RESET(16'h0001), .N_CH(NCH),
    .NUM_CHAINS(NC), .CHAIN_LEN(CL), .MISR_LEN(ML), .MISR_TAPS(TAPS_16),
    .ROM_DEPTH(DEPTH), .ROM_ADDR_W(8), .ROM_CONTENTS(rom_image())
  ) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_vectors(num_vectors),
    .inj_period(inj_period), .guide_src(guide_src), .busy(busy), .done(done),
    .vec_count(vec_count), .seed_we(seed_we), .seed(seed), .guide_req(guide_req),
    .tester_data(tester_data), .scan_en(scan_en), .capture(capture),
    .scan_in(scan_in), .scan_out(scan_out), .signature(signature));

  cut_scan_model #(.NUM_CHAINS(NC), .CHAIN_LEN(CL)) u_cut (
    .clk(clk), .scan_en(scan_en), .capture(capture), .scan_in(scan_in),
    .scan_out(scan_out), .cells(cells));

  logic [R-1:0]  m_state;
  logic [ML-1:0] m_sig;
  int sh_cnt, cur_len, cur_per, inj_idx, mismatches, req_cnt;
  bit rom_mode;

  always @(negedge clk) begin
    if (rst_n && busy && scan_en) begin
      int vec;
      bit shifting, inj;
      logic [R-1:0] n;
      logic [NCH-1:0] g;
      vec = sh_cnt / CL;
      shifting = (vec < cur_len);
      inj = shifting && (sh_cnt % CL == 0) && (vec % cur_per == 0);
      tester_data = NCH'($urandom);
      #1;
      g = rom_mode ? rom_word(inj_idx) : tester_data;
      if (guide_req !== (inj && !rom_mode)) mismatches++;
      if (guide_req) req_cnt++;
      if (shifting) begin
        n = {m_state[R-2:0], ^(m_state & TAPS_16)};
        if (inj) for (int ch = 0; ch < NCH; ch++) n[ch*SP] ^= g[ch];
        if (scan_in !== n[NC-1:0]) mismatches++;
        m_state = n;
      end
      if (inj) inj_idx++;
      if (vec > 0) m_sig = {m_sig[ML-2:0], ^(m_sig & TAPS_16)} ^ ML'(scan_out);
      sh_cnt++;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input string name, input guide_src_e src, input int L, input int P);
    int cycles;
    rom_mode = (src == GUIDE_ROM);
    cur_len = L; cur_per = P; sh_cnt = 0; inj_idx = 0; mismatches = 0; req_cnt = 0;
    m_sig = '0;
    guide_src = src;
    num_vectors = VEC_W'(L);
    inj_period = PER_W'(P);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == L * (CL + 1) + CL, $sformatf("%s: %0d cycles", name, cycles));
    check(mismatches == 0, $sformatf("%s: %0d cycle mismatches", name, mismatches));
    check(signature == m_sig, $sformatf("%s: signature %h want %h", name, signature, m_sig));
    check(inj_idx == (L + P - 1) / P, $sformatf("%s: %0d injections", name, inj_idx));
    check(req_cnt == (rom_mode ? 0 : inj_idx), $sformatf("%s: %0d tester requests", name, req_cnt));
  endtask

  initial begin : main
    start = 0; seed_we = 0; seed = '0; num_vectors = '0; inj_period = 1;
    guide_src = GUIDE_TESTER; tester_data = '0; rom_mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    m_state = 16'h0001;
    check(dut.u_lfsr.state == 16'h0001, "reset state");
    run("ROM session", GUIDE_ROM, 40, 2);
    run("tester session", GUIDE_TESTER, 10, 1);
    run("ROM session again", GUIDE_ROM, 7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
