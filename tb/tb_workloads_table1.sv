// tb_workloads_table1: the evaluated test lengths and guide-bit rates on the
// default-size design.
//
// The benchmark evaluation reports, for four circuits and for 0.25, 1 and 4
// guide bits per vector, the test length L needed to embed the circuits'
// cubes and the resulting tester storage L*n. The cubes themselves are not
// available, so this testbench runs each (L, n) as a complete session with
// random guide bits and checks what the hardware decides:
//   - the number of guide bits taken from the tester is ceil(L/P)*channels
//     and agrees with the reported storage L*n. For n = 0.25 the reported
//     figure is rounded down, while the hardware also injects on vector 0, so
//     it may take one bit more when L is not a multiple of 4,
//   - the session lasts L*(m+1)+m cycles,
//   - in every shift cycle, scan_in and guide_req match a cycle-level model
//     of the guided LFSR written here,
//   - the final signature matches a MISR model fed from the scan outputs.
// The scan-chain model has 1664 cells; smaller circuits use a prefix of it.
module tb_workloads_table1;
  import bist_pkg::*;

  localparam int R   = 64;
  localparam int NCH = 4;
  localparam int NC  = 32;
  localparam int CL  = 52;
  localparam int ML  = 32;
  localparam int SP  = R / NCH;
  localparam logic [R-1:0]  LTAPS = TAPS_64;
  localparam logic [ML-1:0] MTAPS = TAPS_32;

  typedef struct {
    string name;
    int    len;      // test length L
    int    nused;    // channels used per injection
    int    period;   // vectors per injection
    int    storage;  // reported tester storage in bits
  } wl_t;

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

  hybrid_bist_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_vectors(num_vectors),
    .inj_period(inj_period), .guide_src(guide_src), .busy(busy), .done(done),
    .vec_count(vec_count), .seed_we(seed_we), .seed(seed), .guide_req(guide_req),
    .tester_data(tester_data), .scan_en(scan_en), .capture(capture),
    .scan_in(scan_in), .scan_out(scan_out), .signature(signature));

  cut_scan_model #(.NUM_CHAINS(NC), .CHAIN_LEN(CL)) u_cut (
    .clk(clk), .scan_en(scan_en), .capture(capture), .scan_in(scan_in),
    .scan_out(scan_out), .cells(cells));

  // cycle-level models
  logic [R-1:0]  m_state;
  logic [ML-1:0] m_sig;
  int            sh_cnt, cur_len, cur_per, cur_used, req_cnt, mismatches;

  // Each negedge: pick this cycle's tester bits, then check the outputs the
  // design will act on at the next rising edge.
  always @(negedge clk) begin
    if (rst_n && busy && scan_en) begin
      int vec;
      bit shifting, inj;
      logic [R-1:0] n;
      vec = sh_cnt / CL;
      shifting = (vec < cur_len);
      inj = shifting && (sh_cnt % CL == 0) && (vec % cur_per == 0);
      tester_data = '0;
      for (int ch = 0; ch < cur_used; ch++) tester_data[ch] = 1'($urandom);
      #1;
      if (guide_req !== inj) mismatches++;
      if (shifting) begin
        n = {m_state[R-2:0], ^(m_state & LTAPS)};
        if (inj) for (int ch = 0; ch < NCH; ch++) n[ch*SP] ^= tester_data[ch];
        if (scan_in !== n[NC-1:0]) mismatches++;
        m_state = n;
      end
      if (vec > 0) m_sig = {m_sig[ML-2:0], ^(m_sig & MTAPS)} ^ ML'(scan_out);
      if (guide_req) req_cnt++;
      sh_cnt++;
    end
  end

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input wl_t w);
    int cycles;
    cur_len = w.len; cur_per = w.period; cur_used = w.nused;
    sh_cnt = 0; req_cnt = 0; mismatches = 0; m_sig = '0;
    num_vectors = VEC_W'(w.len);
    inj_period  = PER_W'(w.period);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == w.len * (CL + 1) + CL, $sformatf("%s: %0d cycles", w.name, cycles));
    check(req_cnt * w.nused == ((w.len + w.period - 1) / w.period) * w.nused,
          $sformatf("%s: %0d guide bits", w.name, req_cnt * w.nused));
    check(req_cnt * w.nused - w.storage inside {0, 1},
          $sformatf("%s: %0d guide bits, reported storage %0d", w.name, req_cnt * w.nused, w.storage));
    check(mismatches == 0, $sformatf("%s: %0d cycle mismatches", w.name, mismatches));
    check(signature == m_sig, $sformatf("%s: signature %h want %h", w.name, signature, m_sig));
    $display("%s: L=%0d, %0d guide bits, %0d cycles", w.name, w.len, req_cnt * w.nused, cycles);
  endtask

  wl_t wl [12];

  initial begin : main
    wl[0]  = '{"s13207 n=0.25", 6104, 1, 4, 1526};
    wl[1]  = '{"s13207 n=1",    1856, 1, 1, 1856};
    wl[2]  = '{"s13207 n=4",     553, 4, 1, 2212};
    wl[3]  = '{"s15850 n=0.25",15216, 1, 4, 3804};
    wl[4]  = '{"s15850 n=1",    4124, 1, 1, 4124};
    wl[5]  = '{"s15850 n=4",    1103, 4, 1, 4412};
    wl[6]  = '{"s38417 n=0.25",85093, 1, 4, 21273};
    wl[7]  = '{"s38417 n=1",   21855, 1, 1, 21855};
    wl[8]  = '{"s38417 n=4",    5623, 4, 1, 22492};
    wl[9]  = '{"s38584 n=0.25", 9906, 1, 4, 2476};
    wl[10] = '{"s38584 n=1",    2592, 1, 1, 2592};
    wl[11] = '{"s38584 n=4",     685, 4, 1, 2740};
    start = 0; seed_we = 0; seed = '0; num_vectors = '0; inj_period = 1;
    guide_src = GUIDE_TESTER; tester_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    seed = {$urandom, $urandom} | R'(1);
    seed_we = 1;
    @(negedge clk);
    seed_we = 0;
    m_state = seed;
    foreach (wl[i]) run(wl[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
