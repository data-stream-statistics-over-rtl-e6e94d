// tb_ecm_top: end-to-end test of the whole top at its default size
// (W=55, D=3, T=3, K=5, L=20): the multi-tuple updater over a model of its
// external memory (2 cycles read latency, occasional stalls), and in
// parallel the fully pipelined and cost-aware updaters on a second tuple
// stream.
//
// Multi-tuple part, as in tb_ecm_mt_top: groups of up to three tuples per
// cycle; a short window of 4000 units so buckets expire, then the evaluated
// window of 2,000,000 with spread keys, then a flood of one key. Checked: the
// per-FrontStage request order against an independent copy of the hashes,
// every level of every EH and escape EH against a reference EH, the
// mechanisms (input stall, collision, escape, dual dequeue, BackStage
// cascade and back-pressure, expiry) and at least one tuple per cycle.
//
// Second stream: one tuple per cycle offered to the cost-aware and hybrid
// updaters (the hybrid one over its own, deliberately slow memory model:
// 8 cycles read latency, half of the requests stalled) and entering them and
// the fully pipelined one in the cycle both are ready. Spread keys, a flood
// of one key (the cost-aware workers must stall the input; the hybrid
// input stall is exercised by tb_ecm_hybrid_top at a smaller size), then a
// window of 300 units (buckets expire). At the end every level of every EH
// of the three updaters must match one shared reference, and no merge may
// leave level 20.
module tb_ecm_top;
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

  // second stream, shared by the fully pipelined and cost-aware updaters
  ts_t  w2 = 32'd2_000_000;
  logic v2 = 0, fp_valid, ca_valid, ca_ready, ca_busy;
  logic hy_valid, hy_ready, hy_busy;
  logic hreq_valid, hreq_ready, hreq_we, hrsp_valid, hstall = 0;
  logic [23:0] hreq_addr;
  lvl_rec_t hwdata, hrdata;
  logic [31:0] hy_n_stall, hy_ops, hy_cascade, hy_drop;
  logic [KEY_W-1:0] key2 = '0;
  ts_t  now2 = '0;
  logic [31:0] fp_n_drop;
  logic [31:0] ca_n_ops [2*D], ca_n_cascade [2*D], ca_n_drop [2*D];

  ecm_top dut (
    .clk, .rst_n,
    .mt_window(window), .mt_in_valid(in_valid), .mt_in_ready(in_ready), .mt_tup_valid(tup_valid),
    .mt_tup_key(tup_key), .mt_tup_now(tup_now),
    .mt_mem_req_valid(req_valid), .mt_mem_req_ready(req_ready), .mt_mem_req_we(req_we),
    .mt_mem_req_addr(req_addr), .mt_mem_req_wdata(wdata),
    .mt_mem_rsp_valid(rsp_valid), .mt_mem_rsp_rdata(rdata),
    .mt_esc_en(esc_en), .mt_n_esc(n_esc), .mt_n_stall(n_stall), .mt_n_assign(n_assign),
    .mt_bs_busy(bs_busy), .mt_bs_ops(bs_ops), .mt_bs_cascade(bs_cascade), .mt_bs_drop(bs_drop),
    .fp_window(w2), .fp_in_valid(fp_valid), .fp_in_key(key2), .fp_in_now(now2), .fp_n_drop,
    .ca_window(w2), .ca_in_valid(ca_valid), .ca_in_ready(ca_ready), .ca_in_key(key2), .ca_in_now(now2),
    .ca_busy, .ca_n_ops, .ca_n_cascade, .ca_n_drop,
    .hy_window(w2), .hy_in_valid(hy_valid), .hy_in_ready(hy_ready), .hy_in_key(key2), .hy_in_now(now2),
    .hy_mem_req_valid(hreq_valid), .hy_mem_req_ready(hreq_ready), .hy_mem_req_we(hreq_we),
    .hy_mem_req_addr(hreq_addr), .hy_mem_req_wdata(hwdata),
    .hy_mem_rsp_valid(hrsp_valid), .hy_mem_rsp_rdata(hrdata),
    .hy_n_stall, .hy_bs_busy(hy_busy), .hy_bs_ops(hy_ops), .hy_bs_cascade(hy_cascade), .hy_bs_drop(hy_drop)
  );

  ecm_dram_model #(.DEPTH(D * W * NB), .LAT(8)) u_hmem (
    .clk, .stall(hstall), .req_valid(hreq_valid), .req_ready(hreq_ready), .req_we(hreq_we),
    .req_addr(hreq_addr), .req_wdata(hwdata), .rsp_valid(hrsp_valid), .rsp_rdata(hrdata)
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
      if (dut.u_mt.bs_valid && !dut.u_mt.bs_ready) n_bs_bp++;
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
      mv = dut.u_mt.g_fs[f].u_fs.main_v;
      xv = dut.u_mt.g_fs[f].u_fs.extra_v;
      if (mv && xv) n_dual++;
      if (mv || xv) begin
        checks++;
        a = route[f].pop_front();
        if (xv) begin
          b = route[f].pop_front();
          if (!((dut.u_mt.g_fs[f].u_fs.main_now == a.now && 6'(dut.u_mt.g_fs[f].u_fs.main_idx) == a.idx &&
                 dut.u_mt.g_fs[f].u_fs.extra_now == b.now) ||
                (dut.u_mt.g_fs[f].u_fs.main_now == b.now && 6'(dut.u_mt.g_fs[f].u_fs.main_idx) == b.idx &&
                 dut.u_mt.g_fs[f].u_fs.extra_now == a.now)))
            fail($sformatf("FrontStage %0d dual dequeue out of order", f));
          void'(m[D * W + f].insert(0, L, dut.u_mt.g_fs[f].u_fs.extra_now, dut.u_mt.g_fs[f].u_fs.extra_now, window, o));
        end else if (dut.u_mt.g_fs[f].u_fs.main_now != a.now || 6'(dut.u_mt.g_fs[f].u_fs.main_idx) != a.idx)
          fail($sformatf("FrontStage %0d served (%0d,%0d) expected (%0d,%0d)", f,
               dut.u_mt.g_fs[f].u_fs.main_idx, dut.u_mt.g_fs[f].u_fs.main_now, a.idx, a.now));
        void'(m[(f / T) * W + f % T + T * int'(dut.u_mt.g_fs[f].u_fs.main_idx)].insert(
          0, L, dut.u_mt.g_fs[f].u_fs.main_now, dut.u_mt.g_fs[f].u_fs.main_now, window, o));
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
          fmem[f][j][i] = dut.u_mt.g_fs[f].u_fs.u_main.g_lvl[j].u_lvl.vld[i] ?
                          dut.u_mt.g_fs[f].u_fs.u_main.g_lvl[j].u_lvl.mem[i] : '0;
        xrec[f][j] = dut.u_mt.g_fs[f].u_fs.u_extra.rec[j];
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
    #80_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- fully pipelined, cost-aware and hybrid updaters
  // All three see the same tuples: a tuple is offered to the cost-aware and
  // hybrid updaters and enters all three in the cycle both are ready. One
  // reference EH per (row, column) therefore describes all three.
  eh_ref m2 [D * W];
  int    ref2_drops = 0, n_ca_stall = 0, n_hy_stall = 0;
  bit    s2_done = 0;

  always @(posedge clk) if (rst_n) begin
    int unsigned o;
    hstall <= $urandom_range(0, 1) == 0;   // a slow memory for the hybrid BackStage
    if (v2 && !ca_ready) n_ca_stall++;
    if (v2 && !hy_ready) n_hy_stall++;
    if (fp_valid)
      for (int r = 0; r < D; r++)
        if (m2[r * W + ref_col(key2, r)].insert(0, L, now2, now2, w2, o)) ref2_drops++;
  end

  assign fp_valid = v2 && ca_ready && hy_ready;
  assign ca_valid = v2 && hy_ready;
  assign hy_valid = v2 && ca_ready;

  lvl_rec_t pmem [D][L][W];   // fully pipelined: all levels
  lvl_rec_t cmem [D][L][W];   // cost-aware: level 1 pipelined, 2..L in workers
  lvl_rec_t hmem [D][L][W];   // hybrid: levels 1..K pipelined, K+1..L in memory
  event     snap2;
  for (genvar r = 0; r < D; r++) begin : g_snap2
    for (genvar j = 0; j < L; j++) begin : g_l
      always @(snap2)
        for (int i = 0; i < W; i++)
          pmem[r][j][i] = dut.u_fp.g_row[r].u_row.g_lvl[j].u_lvl.vld[i] ?
                          dut.u_fp.g_row[r].u_row.g_lvl[j].u_lvl.mem[i] : '0;
    end
    for (genvar j = 0; j < K; j++) begin : g_h
      always @(snap2)
        for (int i = 0; i < W; i++)
          hmem[r][j][i] = dut.u_hy.g_row[r].u_fs.g_lvl[j].u_lvl.vld[i] ?
                          dut.u_hy.g_row[r].u_fs.g_lvl[j].u_lvl.mem[i] : '0;
    end
    always @(snap2)
      for (int c = 0; c < W; c++)
        for (int l = K; l < L; l++) hmem[r][l][c] = u_hmem.mem[(r * W + c) * NB + l - K];
    always @(snap2)
      for (int c = 0; c < W; c++) begin
        cmem[r][0][c] = dut.u_ca.g_row[r].u_bl1.vld[c] ? dut.u_ca.g_row[r].u_bl1.mem[c] : '0;
        for (int l = 1; l < L; l++)
          cmem[r][l][c] = (c % 2 == 0) ? dut.u_ca.g_row[r].g_wk[0].u_wk.u_ram.mem[(c / 2) * (L - 1) + l - 1]
                                       : dut.u_ca.g_row[r].g_wk[1].u_wk.u_ram.mem[(c / 2) * (L - 1) + l - 1];
      end
  end

  task automatic compare2(string name, int r, int c, int l, lvl_rec_t rec, int unsigned t2);
    int nd, nr, g;
    g = r * W + c;
    nd = 0; nr = 0;
    for (int b = 0; b < rec.cnt; b++) if (t2 - rec.ts[b] < w2) nd = b + 1;
    for (int b = 0; b < m2[g].size_at(l); b++) if (t2 - m2[g].ts_at(l, b) < w2) nr = b + 1;
    checks++;
    if (nd != nr) begin
      fail($sformatf("%s row %0d EH %0d level %0d holds %0d live buckets, expected %0d", name, r, c, l + 1, nd, nr));
      return;
    end
    for (int b = 0; b < nd; b++)
      if (rec.ts[b] != m2[g].ts_at(l, b)) begin
        fail($sformatf("%s row %0d EH %0d level %0d bucket %0d", name, r, c, l + 1, b));
        return;
      end
  endtask

  initial begin
    int unsigned t2 = 500, exp2, drops, casc;
    foreach (m2[g]) m2[g] = new(BPL, L);
    repeat (3) @(posedge clk);
    @(posedge clk);
    #1;
    for (int n = 0; n < 40000; n++) begin
      if (n == 30000) begin
        // short window, set with both updaters idle
        v2 = 0;
        repeat (2 * L + 6) @(posedge clk);
        while (ca_busy || hy_busy) @(posedge clk);
        #1;
        w2 = 32'd300;
      end
      v2 = $urandom_range(0, 7) != 0;
      if (n >= 15000 && n < 22000 && $urandom_range(0, 3) != 0) key2 = 32'hC0A8_0101;
      else key2 = 32'hC0A8_0000 + $urandom_range(0, 999);
      now2 = t2;
      if ($urandom_range(0, 1) == 0) t2++;
      forever begin
        bit rdy;
        rdy = ca_ready && hy_ready;
        @(posedge clk);
        #1;
        if (rdy || !v2) break;
      end
    end
    v2 = 0;
    repeat (2 * L + 6) @(posedge clk);
    while (ca_busy || hy_busy) @(posedge clk);
    repeat (4) @(posedge clk);
    #1;
    -> snap2;
    #1;
    for (int r = 0; r < D; r++)
      for (int c = 0; c < W; c++)
        for (int l = 0; l < L; l++) begin
          compare2("fully pipelined", r, c, l, pmem[r][l][c], t2);
          compare2("cost-aware", r, c, l, cmem[r][l][c], t2);
          compare2("hybrid", r, c, l, hmem[r][l][c], t2);
        end
    exp2 = 0;
    foreach (m2[g]) exp2 += m2[g].n_expired;
    drops = 0; casc = 0;
    for (int p = 0; p < 2 * D; p++) begin drops += ca_n_drop[p]; casc += ca_n_cascade[p]; end
    $display("second stream: cost-aware stall cycles %0d, worker cascades %0d, hybrid stall cycles %0d (counted %0d), BackStage cascades %0d",
             n_ca_stall, casc, n_hy_stall, hy_n_stall, hy_cascade);
    $display("second stream: expired buckets %0d, drops %0d/%0d/%0d (reference %0d)",
             exp2, fp_n_drop, drops, hy_drop, ref2_drops);
    checks++;
    if (fp_n_drop != ref2_drops || drops != ref2_drops || hy_drop != ref2_drops)
      fail("drop count differs from the reference");
    checks++;
    if (32'(n_hy_stall) != hy_n_stall || hy_cascade == 0)
      fail("hybrid stalls miscounted or no BackStage cascade");
    checks++;
    if (n_ca_stall == 0) fail("cost-aware input never stalled");
    checks++;
    if (casc == 0) fail("no cascade inside a cost-aware worker");
    checks++;
    if (exp2 == 0) fail("no bucket expired in the second stream");
    s2_done = 1;
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
    wait (s2_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
