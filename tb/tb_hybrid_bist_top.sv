// tb_hybrid_bist_top: end-to-end test of hybrid_bist_top at its default size.
//
// The testbench plays both the off-line tool and the tester. For each session
// it picks random test cubes (8 to 30 specified bits out of the 1664 scan
// cells; see below) and embeds them one after the other in the pseudo-random sequence
// with no lookahead: the LFSR is simulated symbolically, every injection adds
// fresh free variables (one per channel in use), and after each vector the
// cube's bits give a set of linear equations over GF(2). As soon as they can
// be solved, the variables are fixed (free ones at random), the LFSR state
// becomes known again and the next cube starts. The chosen guide bits are then
// fed to the design through the tester channels, and every vector that the
// design shifts into the scan-chain model is compared with the vector the
// testbench computed, and the embedded cube bits with the cube.
//
// The chains are fed from adjacent LFSR stages, so cell i of chain k always
// holds the same bit as cell i-1 of chain k+1: every "diagonal" k+i carries
// one LFSR output bit. The random cubes therefore specify at most one cell
// per diagonal; a cube with two conflicting cells on one diagonal cannot be
// produced by this arrangement whatever the guide bits.
//
// Sessions: 4 bits per vector (4 channels, every vector), 1 bit per vector,
// 1 bit every 4th vector, and one stand-alone session with guide bits from
// the (all-zero default) ROM. The first session starts from a loaded seed.
// Each session checks its cycle count, L*(m+1)+m, its guide-bit requests and
// the MISR signature, which the testbench recomputes from the scan outputs.
// Mechanisms counted, each of which must occur: seed load, injection, vector
// without injection, capture, MISR compaction, embedded cube, ROM session.
module tb_hybrid_bist_top;
  import bist_pkg::*;

  localparam int R    = 64;
  localparam int NCH  = 4;
  localparam int NC   = 32;
  localparam int CL   = 52;
  localparam int ML   = 32;
  localparam int VMAX = 64;
  localparam int SP   = R / NCH;
  localparam int NCELL = NC * CL;
  localparam logic [R-1:0]  LTAPS = TAPS_64;
  localparam logic [ML-1:0] MTAPS = TAPS_32;

  typedef logic [VMAX:0]    aff_t;   // bit VMAX: constant term, bits below: variables
  typedef logic [NCELL-1:0] vec_t;

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

  // ---------------- design and scan-chain model ----------------
  logic             start, busy, done, seed_we, guide_req, scan_en, capture;
  logic [VEC_W-1:0] num_vectors, vec_count;
  logic [PER_W-1:0] inj_period;
  guide_src_e       guide_src;
  logic [R-1:0]     seed;
  logic [NCH-1:0]   tester_data;
  logic [NC-1:0]    scan_in, scan_out;
  logic [ML-1:0]    signature;
  vec_t             cells;

  hybrid_bist_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_vectors(num_vectors),
    .inj_period(inj_period), .guide_src(guide_src), .busy(busy), .done(done),
    .vec_count(vec_count), .seed_we(seed_we), .seed(seed), .guide_req(guide_req),
    .tester_data(tester_data), .scan_en(scan_en), .capture(capture),
    .scan_in(scan_in), .scan_out(scan_out), .signature(signature));

  cut_scan_model #(.NUM_CHAINS(NC), .CHAIN_LEN(CL)) u_cut (
    .clk(clk), .scan_en(scan_en), .capture(capture), .scan_in(scan_in),
    .scan_out(scan_out), .cells(cells));

  // ---------------- session plan ----------------
  logic [NCH-1:0] guide_q [$];   // guide bits, one entry per injection
  vec_t           exp_vec [$];   // expected vector per vector index
  vec_t           exp_mask[$];   // embedded cube: specified cells
  vec_t           exp_val [$];   // embedded cube: values
  logic [R-1:0]   cstate;        // LFSR state known to the planner
  int             planned_inj;
  int             n_cube_fail;

  // mechanism counters
  int n_seed, n_inject, n_no_inject, n_capture, n_misr, n_embedded, n_rom;

  function automatic logic [R-1:0] conc_step(logic [R-1:0] st, bit inj, logic [NCH-1:0] g);
    logic [R-1:0] n;
    n = {st[R-2:0], ^(st & LTAPS)};
    if (inj) for (int ch = 0; ch < NCH; ch++) n[ch*SP] ^= g[ch];
    return n;
  endfunction

  // Apply one vector concretely: CL shifts, guide bits on the first.
  task automatic conc_vector(inout logic [R-1:0] st, input bit inj,
                             input logic [NCH-1:0] g, output vec_t v);
    for (int s = 0; s < CL; s++) begin
      st = conc_step(st, inj && s == 0, g);
      for (int k = 0; k < NC; k++) v[k*CL + (CL - 1 - s)] = st[k];
    end
  endtask

  // Gauss-Jordan elimination over GF(2). Row bit VMAX is the right-hand side.
  function automatic bit gf2_solve(aff_t rows[$], int nvars, output logic [VMAX-1:0] x);
    int pr = 0;
    int pivcol[$];
    aff_t t;
    x = '0;
    for (int c = 0; c < nvars && pr < rows.size(); c++) begin
      int sel = -1;
      for (int r = pr; r < rows.size(); r++) if (rows[r][c]) begin sel = r; break; end
      if (sel < 0) continue;
      t = rows[sel]; rows[sel] = rows[pr]; rows[pr] = t;
      for (int r = 0; r < rows.size(); r++) if (r != pr && rows[r][c]) rows[r] ^= rows[pr];
      pivcol.push_back(c);
      pr++;
    end
    for (int r = pr; r < rows.size(); r++) if (rows[r][VMAX]) return 1'b0;
    // free variables at random, then the pivots
    for (int c = 0; c < nvars; c++) x[c] = 1'($urandom);
    for (int r = 0; r < pr; r++) x[pivcol[r]] = 1'b0;
    for (int r = 0; r < pr; r++) begin
      logic b;
      b = rows[r][VMAX];
      for (int c = 0; c < nvars; c++) if (c != pivcol[r] && rows[r][c]) b ^= x[c];
      x[pivcol[r]] = b;
    end
    return 1'b1;
  endfunction

  // Plan one session: embed ncubes cubes, then tail vectors.
  // nused channels carry variables; P is the injection period; rom: no guide bits.
  task automatic plan_session(input int ncubes, input int nused, input int P,
                              input int tail, input bit rom, output int L);
    int v;
    guide_q.delete(); exp_vec.delete(); exp_mask.delete(); exp_val.delete();
    planned_inj = 0;
    v = 0;
    for (int c = 0; c < ncubes; c++) begin
      vec_t cmask, cval, vv;
      int s, nvars, w, wv0;
      aff_t S [R];
      aff_t N [R];
      aff_t hist [CL][NC];
      logic [R-1:0] wstart;
      logic [VMAX-1:0] x;
      bit solved;
      logic [NC+CL-2:0] dused;
      cmask = '0; cval = '0; dused = '0;
      s = $urandom_range(8, 30);
      for (int b = 0; b < s; ) begin
        int idx;
        idx = $urandom_range(0, NCELL - 1);
        if (!dused[idx / CL + idx % CL]) begin
          dused[idx / CL + idx % CL] = 1'b1;
          cmask[idx] = 1'b1;
          cval[idx] = 1'($urandom);
          b++;
        end
      end
      for (int i = 0; i < R; i++) S[i] = {cstate[i], {VMAX{1'b0}}};
      wstart = cstate;
      wv0 = v;
      nvars = 0;
      w = 0;
      solved = 0;
      while (!solved) begin
        bit inj;
        aff_t g [NCH];
        aff_t rows [$];
        inj = (v % P == 0);
        for (int ch = 0; ch < NCH; ch++) begin
          g[ch] = '0;
          if (inj && ch < nused && w * nused + ch < VMAX) begin
            g[ch][w * nused + ch] = 1'b1;
            nvars = w * nused + ch + 1;
          end
        end
        for (int sh = 0; sh < CL; sh++) begin
          aff_t fb;
          fb = '0;
          for (int i = 0; i < R; i++) if (LTAPS[i]) fb ^= S[i];
          N[0] = fb;
          for (int i = 1; i < R; i++) N[i] = S[i-1];
          if (inj && sh == 0) for (int ch = 0; ch < NCH; ch++) N[ch*SP] ^= g[ch];
          S = N;
          for (int k = 0; k < NC; k++) hist[sh][k] = N[k];
        end
        if (inj) w++;
        for (int idx = 0; idx < NCELL; idx++) begin
          if (cmask[idx]) begin
            aff_t e;
            e = hist[CL - 1 - idx % CL][idx / CL];
            e[VMAX] ^= cval[idx];
            rows.push_back(e);
          end
        end
        solved = gf2_solve(rows, nvars, x);
        v++;
        if (!solved && (nvars >= VMAX || v - wv0 > 400)) begin
          n_cube_fail++;
          x = '0;
          for (int c2 = 0; c2 < nvars; c2++) x[c2] = 1'($urandom);
          cmask = '0;
          solved = 1;
        end
      end
      // replay the window concretely with the chosen guide bits
      cstate = wstart;
      w = 0;
      for (int vi = wv0; vi < v; vi++) begin
        bit inj;
        logic [NCH-1:0] gb;
        inj = (vi % P == 0);
        gb = '0;
        if (inj) begin
          for (int ch = 0; ch < nused; ch++) if (w * nused + ch < VMAX) gb[ch] = x[w * nused + ch];
          guide_q.push_back(gb);
          planned_inj++;
          w++;
        end
        conc_vector(cstate, inj, gb, vv);
        exp_vec.push_back(vv);
        exp_mask.push_back((vi == v - 1) ? cmask : '0);
        exp_val.push_back((vi == v - 1) ? cval : '0);
      end
    end
    for (int t = 0; t < tail; t++) begin
      bit inj;
      logic [NCH-1:0] gb;
      vec_t vv;
      inj = (v % P == 0);
      gb = '0;
      if (inj) begin
        if (!rom) for (int ch = 0; ch < nused; ch++) gb[ch] = 1'($urandom);
        guide_q.push_back(gb);
        planned_inj++;
      end
      conc_vector(cstate, inj, gb, vv);
      exp_vec.push_back(vv);
      exp_mask.push_back('0);
      exp_val.push_back('0);
      v++;
    end
    L = v;
  endtask

  // ---------------- tester channels ----------------
  int gidx;
  always @(posedge clk) if (guide_req) gidx <= gidx + 1;
  always @(negedge clk) tester_data <= (gidx < guide_q.size()) ? guide_q[gidx] : '0;

  // ---------------- per-cycle observers ----------------
  logic [ML-1:0] tb_sig;
  int            sh_cnt;
  int            req_cnt;

  function automatic logic [ML-1:0] misr_step(logic [ML-1:0] s, logic [NC-1:0] d);
    logic [ML-1:0] n;
    n = {s[ML-2:0], ^(s & MTAPS)};
    return n ^ ML'(d);
  endfunction

  always @(negedge clk) begin
    if (rst_n && scan_en) begin
      if (sh_cnt >= CL) begin
        tb_sig = misr_step(tb_sig, scan_out);
        n_misr++;
      end
      sh_cnt++;
    end
    if (rst_n && guide_req) begin
      req_cnt++;
      n_inject++;
    end
    if (rst_n && capture) begin
      int vi;
      vi = int'(vec_count);
      n_capture++;
      if (vi < exp_vec.size()) begin
        check(cells == exp_vec[vi], $sformatf("vector %0d differs from the planned vector", vi));
        if (exp_mask[vi] != '0) begin
          check((cells & exp_mask[vi]) == exp_val[vi], $sformatf("cube in vector %0d not embedded", vi));
          if ((cells & exp_mask[vi]) == exp_val[vi]) n_embedded++;
        end
      end else begin
        check(1'b0, $sformatf("capture of unplanned vector %0d", vi));
      end
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_session(input string name, input int ncubes, input int nused,
                             input int P, input int tail, input guide_src_e src);
    int L, cycles;
    plan_session(ncubes, nused, P, tail, src == GUIDE_ROM, L);
    for (int vi = 0; vi < L; vi++) if (vi % P != 0) n_no_inject++;
    if (src == GUIDE_ROM) n_rom++;
    gidx = 0;
    num_vectors = VEC_W'(L);
    inj_period  = PER_W'(P);
    guide_src   = src;
    start = 1;
    tb_sig = '0;
    sh_cnt = 0;
    req_cnt = 0;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == L * (CL + 1) + CL,
          $sformatf("%s: %0d cycles for %0d vectors, want %0d", name, cycles, L, L * (CL + 1) + CL));
    check(req_cnt == ((src == GUIDE_ROM) ? 0 : planned_inj),
          $sformatf("%s: %0d guide requests, planned %0d", name, req_cnt, planned_inj));
    check(signature == tb_sig, $sformatf("%s: signature %h, want %h", name, signature, tb_sig));
    check(vec_count == VEC_W'(L), $sformatf("%s: vec_count", name));
    $display("%s: %0d vectors, %0d guide bits stored, signature %h", name, L,
             planned_inj * nused, signature);
  endtask

  initial begin : main
    n_seed = 0; n_inject = 0; n_no_inject = 0; n_capture = 0; n_misr = 0;
    n_embedded = 0; n_rom = 0; n_cube_fail = 0;
    start = 0; seed_we = 0; seed = '0; num_vectors = '0; inj_period = 1;
    guide_src = GUIDE_TESTER; gidx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cstate = R'(1);
    // seed load
    seed = {$urandom, $urandom} | R'(1);
    seed_we = 1;
    @(negedge clk);
    seed_we = 0;
    cstate = seed;
    n_seed++;

    run_session("4 bits per vector", 6, 4, 1, 3, GUIDE_TESTER);
    run_session("1 bit per vector", 4, 1, 1, 2, GUIDE_TESTER);
    run_session("1 bit per 4 vectors", 2, 1, 4, 5, GUIDE_TESTER);
    run_session("stand-alone from ROM", 0, 1, 1, 12, GUIDE_ROM);

    check(n_cube_fail == 0, $sformatf("%0d cubes could not be embedded", n_cube_fail));
    check(n_embedded == 12, $sformatf("%0d of 12 cubes embedded", n_embedded));
    check(n_seed > 0, "seed load happened");
    check(n_inject > 0, "guide-bit injection happened");
    check(n_no_inject > 0, "vector without injection happened");
    check(n_capture > 0, "capture happened");
    check(n_misr > 0, "MISR compaction happened");
    check(n_rom > 0, "ROM-guided session happened");
    $display("mechanisms: seed=%0d inject=%0d no_inject=%0d capture=%0d misr=%0d embedded=%0d rom=%0d",
             n_seed, n_inject, n_no_inject, n_capture, n_misr, n_embedded, n_rom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
