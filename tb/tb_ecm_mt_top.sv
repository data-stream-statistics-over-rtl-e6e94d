// tb_ecm_mt_top: end-to-end test of the multi-tuple ECM-sketch updater at
// its default size (W=55, D=3, T=3, K=5, L=20), with the external memory
// modelled by ecm_dram_model (2 cycles read latency, occasional stalls).
//
// Stimulus: groups of up to three tuples per cycle with timestamps that rise
// by about one per cycle. Phases: keys spread over 3000 values with a short
// window of 4000 units, so buckets expire; then, after the design has gone
// idle, time jumps ahead and the window becomes the evaluated 2,000,000
// units; spread keys again; finally a flood of one key (a denial-of-service
// pattern). Only buckets inside the window at the end are compared (aged-out
// buckets of levels not touched since may remain).
//
// Checks:
//  - routing: the testbench hashes every accepted tuple with its own copy of
//    the row hashes and predicts, per FrontStage, the sequence of
//    (EH index, time) it must serve; what each FrontStage actually starts
//    (main pipeline or escape EH) must follow that sequence;
//  - contents: a reference EH with all 20 levels per EH (and per escape EH)
//    is fed with what each structure received; at the end, levels 1..5 in
//    the FrontStage memories / escape registers and levels 6..20 in the
//    memory model must equal the reference, bucket for bucket;
//  - mechanisms, each must occur: input stall, two tuples of one cycle
//    colliding on one FrontStage, escape assignment, dual dequeue,
//    BackStage cascade, BackStage back-pressure, bucket expiry;
//  - rate: during the second spread phase the design must accept at least
//    one tuple per cycle on average (the evaluated design reached about
//    1.2 tuples per 150 MHz cycle); the rate is set by the BackStage.
module tb_ecm_mt_top;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NFS = T * D, LOCAL_NEH = (W + T - 1) / T, NB = L - K;
  localparam int NG  = D * W + NFS;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd2_000_000;
  logic in_valid = 0, in_ready;
  logic [T-1:0] tup_valid = '0;
  logic [KEY_W-1:0] tup_key [T];
  ts_t  tup_now [T];
  logic req_valid, req_ready, req_we, rsp_valid, stall = 0;
  logic [23:0] req_addr;
  lvl_rec_t wdata, rdata;
  logic [NFS-1:0] esc_en;
  logic [31:0] n_esc [NFS], n_stall [NFS], n_assign [NFS];
  logic bs_busy;
  logic [31:0] bs_ops, bs_cascade, bs_drop;

  ecm_mt_top dut (
    .clk, .rst_n, .window, .in_valid, .in_ready, .tup_valid, .tup_key, .tup_now,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req_we(req_we),
    .mem_req_addr(req_addr), .mem_req_wdata(wdata),
    .mem_rsp_valid(rsp_valid), .mem_rsp_rdata(rdata),
    .esc_en, .n_esc, .n_stall, .n_assign, .bs_busy, .bs_ops, .bs_cascade, .bs_drop
  );

  ecm_dram_model #(.DEPTH(NG * NB), .LAT(2)) u_mem (
    .clk, .stall, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata(wdata),
    .rsp_valid, .rsp_rdata(rdata)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL @%0t: %s", $time, s);
  endtask

  // ---------------- independent row hash
  function automatic int unsigned ref_col(logic [31:0] k, int unsigned r);
    logic [31:0] s;
    logic [15:0] h;
    s = 32'h1234_5679 + r * 32'h9E37_79B9;
    h = 0;
    for (int i = 0; i < 32; i++) begin
      s ^= s << 13; s ^= s >> 17; s ^= s << 5;
      if (k[i]) h ^= s[31:16];
    end
    return (int'(h) * W) >> 16;
  endfunction

  // ---------------- references
  eh_ref       m [NG];
  fs_req_t     route [NFS][$];     // expected per-FrontStage request order
  int n_in_stall = 0, n_collide = 0, n_dual = 0, n_bs_bp = 0;
  longint n_acc = 0;

  always @(posedge clk) begin
    stall <= $urandom_range(0, 7) == 0;
    if (rst_n) begin
      if (in_valid && !in_ready) n_in_stall++;
      if (dut.bs_valid && !dut.bs_ready) n_bs_bp++;
      if (in_valid && in_ready) begin
        int cnt [NFS];
        foreach (cnt[f]) cnt[f] = 0;
        for (int t = 0; t < T; t++) if (tup_valid[t]) begin
          n_acc++;
          for (int r = 0; r < D; r++) begin
            int c, f;
            fs_req_t q;
            c = ref_col(tup_key[t], r);
            f = r * T + c % T;
            q.idx = 6'(c / T);
            q.now = tup_now[t];
            route[f].push_back(q);
            cnt[f]++;
          end
        end
        foreach (cnt[f]) if (cnt[f] > 1) n_collide++;
      end
    end
  end

  for (genvar f = 0; f < NFS; f++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      int unsigned o;
      fs_req_t a, b;
      logic mv, xv;
      mv = dut.g_fs[f].u_fs.main_v;
      xv = dut.g_fs[f].u_fs.extra_v;
      if (mv && xv) n_dual++;
      if (mv || xv) begin
        checks++;
        a = route[f].pop_front();
        if (xv) begin
          b = route[f].pop_front();
          if (!((dut.g_fs[f].u_fs.main_now == a.now && 6'(dut.g_fs[f].u_fs.main_idx) == a.idx &&
                 dut.g_fs[f].u_fs.extra_now == b.now) ||
                (dut.g_fs[f].u_fs.main_now == b.now && 6'(dut.g_fs[f].u_fs.main_idx) == b.idx &&
                 dut.g_fs[f].u_fs.extra_now == a.now)))
            fail($sformatf("FrontStage %0d dual dequeue out of order", f));
          void'(m[D * W + f].insert(0, L, dut.g_fs[f].u_fs.extra_now, dut.g_fs[f].u_fs.extra_now, window, o));
        end else if (dut.g_fs[f].u_fs.main_now != a.now || 6'(dut.g_fs[f].u_fs.main_idx) != a.idx)
          fail($sformatf("FrontStage %0d served (%0d,%0d) expected (%0d,%0d)", f,
               dut.g_fs[f].u_fs.main_idx, dut.g_fs[f].u_fs.main_now, a.idx, a.now));
        void'(m[(f / T) * W + f % T + T * int'(dut.g_fs[f].u_fs.main_idx)].insert(
          0, L, dut.g_fs[f].u_fs.main_now, dut.g_fs[f].u_fs.main_now, window, o));
      end
    end
  end

  // ---------------- final comparison of the on-chip levels
  lvl_rec_t fmem [NFS][K][LOCAL_NEH];
  lvl_rec_t xrec [NFS][K];
  event     snap;

  for (genvar f = 0; f < NFS; f++) begin : g_snap
    for (genvar j = 0; j < K; j++) begin : g_l
      always @(snap) begin
        for (int i = 0; i < LOCAL_NEH; i++)
          fmem[f][j][i] = dut.g_fs[f].u_fs.u_main.g_lvl[j].u_lvl.vld[i] ?
                          dut.g_fs[f].u_fs.u_main.g_lvl[j].u_lvl.mem[i] : '0;
        xrec[f][j] = dut.g_fs[f].u_fs.u_extra.rec[j];
      end
    end
  end

  // buckets that have aged out but were not yet touched may remain on
  // either side; only buckets still inside the window are compared
  int unsigned t_end;

  task automatic compare(int g, int l, lvl_rec_t r);
    int nd, nr;
    nd = 0; nr = 0;
    for (int b = 0; b < r.cnt; b++) if (t_end - r.ts[b] < window) nd = b + 1;
    for (int b = 0; b < m[g].size_at(l); b++) if (t_end - m[g].ts_at(l, b) < window) nr = b + 1;
    checks++;
    if (nd != nr) begin
      fail($sformatf("EH %0d level %0d holds %0d live buckets, expected %0d", g, l + 1, nd, nr));
      return;
    end
    for (int b = 0; b < nd; b++)
      if (r.ts[b] != m[g].ts_at(l, b)) begin
        fail($sformatf("EH %0d level %0d bucket %0d", g, l + 1, b));
        return;
      end
  endtask

  initial begin
    #50_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned now = 1000;
    longint c0, a0;
    int unsigned exp_total;
    foreach (m[g]) m[g] = new(BPL, L);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    c0 = 0; a0 = 0;
    window = 32'd4000;
    for (int n = 0; n < 22000; n++) begin
      int phase;
      phase = (n < 18000) ? 0 : 1;
      if (n == 6000) begin
        // evaluated window from here on, set with the design idle; time jumps
        in_valid = 0;
        repeat (200) @(posedge clk);
        while (bs_busy) @(posedge clk);
        #1;
        window = 32'd2_000_000;
        now += 10000;
      end
      if (n == 8000) begin c0 = $time; a0 = n_acc; end
      if (n == 18000) begin
        real rate;
        rate = real'(n_acc - a0) / (real'($time - c0) / 10.0);
        $display("accepted %.3f tuples per cycle over the spread phase", rate);
        checks++;
        if (rate < 1.0) fail("rate below one tuple per cycle");
      end
      in_valid = 1;
      for (int t = 0; t < T; t++) begin
        tup_valid[t] = $urandom_range(0, 9) != 0;
        if (phase == 1 && $urandom_range(0, 7) != 0) tup_key[t] = 32'h8401_0304;
        else tup_key[t] = 32'h0A00_0000 + $urandom_range(0, 2999);
        tup_now[t] = now;
        if ($urandom_range(0, 2) == 0) now++;
      end
      forever begin
        bit rdy;
        rdy = in_ready;
        @(posedge clk);
        #1;
        if (rdy) break;
      end
    end
    in_valid = 0;
    tup_valid = '0;
    // drain
    repeat (200) @(posedge clk);
    while (bs_busy) @(posedge clk);
    repeat (20) @(posedge clk);
    #1;
    t_end = now;
    -> snap;
    #1;
    for (int f = 0; f < NFS; f++) begin
      checks++;
      if (route[f].size() != 0) fail($sformatf("FrontStage %0d left %0d requests unserved", f, route[f].size()));
    end
    for (int g = 0; g < NG; g++) begin
      for (int l = 0; l < K; l++) begin
        if (g < D * W) begin
          int r, c, f;
          r = g / W; c = g % W; f = r * T + c % T;
          compare(g, l, fmem[f][l][c / T]);
        end else compare(g, l, xrec[g - D * W][l]);
      end
      for (int l = K; l < L; l++) compare(g, l, u_mem.mem[g * NB + l - K]);
    end
    exp_total = 0;
    foreach (m[g]) exp_total += m[g].n_expired;
    begin
      int n_asg, n_es, n_hold;
      n_asg = 0; n_es = 0; n_hold = 0;
      for (int f = 0; f < NFS; f++) begin
        n_asg += n_assign[f]; n_es += n_esc[f]; n_hold += n_stall[f];
      end
      $display("tuples %0d, input stalls %0d, collisions %0d, escape assignments %0d, escape tuples %0d",
               n_acc, n_in_stall, n_collide, n_asg, n_es);
      $display("dual dequeues %0d, spill-queue holds %0d, BackStage ops %0d cascades %0d back-pressure %0d, expired buckets %0d, drops %0d",
               n_dual, n_hold, bs_ops, bs_cascade, n_bs_bp, exp_total, bs_drop);
      checks++;
      if (n_in_stall == 0) fail("no input stall");
      checks++;
      if (n_collide == 0) fail("no collision");
      checks++;
      if (n_asg == 0 || n_es == 0) fail("escape path never used");
      checks++;
      if (n_dual == 0) fail("no dual dequeue");
      checks++;
      if (bs_cascade == 0) fail("no BackStage cascade");
      checks++;
      if (n_bs_bp == 0) fail("no BackStage back-pressure");
      checks++;
      if (exp_total == 0) fail("no bucket expired");
      checks++;
      if (bs_drop != 0) fail("merge lost off the last level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
