// tb_ecm_hybrid_top: the hybrid updater with 7 EHs per row, 3 rows, 2
// on-chip levels and 8 levels in all, over the memory model (3 cycles read
// latency, random request stalls), so cascades reach the last level within a
// short run. Tuples are offered on most cycles under in_valid/in_ready; keys
// come from a small set, times rise by about one per tuple. Phases: spread
// keys with a long window; a flood of one key; spread keys with a window of
// 300 units so that buckets expire.
//
// The testbench hashes every accepted tuple with its own copy of the row
// hashes and feeds a reference EH (all levels) per (row, column). At the
// end, levels 1..2 of every FrontStage and levels 3..8 in the memory model
// must hold the reference's live buckets, and bs_drop must equal the merges
// the reference pushed off the last level. Coverage: input stall, BackStage
// back-pressure and cascades, drops and expiry must all occur; n_stall must
// count the stalled cycles.
module tb_ecm_hybrid_top;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NW = 7, ND = 3, NK = 2, NL = 8, NB = NL - NK;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd100_000_000;
  logic in_valid = 0, in_ready, busy;
  logic [KEY_W-1:0] in_key = '0;
  ts_t  in_now = '0;
  logic req_valid, req_ready, req_we, rsp_valid, stall = 0;
  logic [23:0] req_addr;
  lvl_rec_t wdata, rdata;
  logic [31:0] n_stall_dut, bs_ops, bs_cascade, bs_drop;
  int   n_bp = 0;

  ecm_hybrid_top #(.NW(NW), .ND(ND), .NK(NK), .NL(NL)) dut (
    .clk, .rst_n, .window, .in_valid, .in_ready, .in_key, .in_now,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req_we(req_we),
    .mem_req_addr(req_addr), .mem_req_wdata(wdata),
    .mem_rsp_valid(rsp_valid), .mem_rsp_rdata(rdata),
    .n_stall(n_stall_dut), .bs_busy(busy), .bs_ops, .bs_cascade, .bs_drop
  );

  ecm_dram_model #(.DEPTH(ND * NW * NB), .LAT(3)) u_mem (
    .clk, .stall, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata(wdata),
    .rsp_valid, .rsp_rdata(rdata)
  );

  always @(posedge clk) begin
    stall <= $urandom_range(0, 4) == 0;
    if (rst_n && dut.bs_valid && !dut.bs_ready) n_bp++;
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL @%0t: %s", $time, s);
  endtask

  initial begin
    #20_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent row hash: H3 over a xorshift stream, then multiply-shift
  function automatic int unsigned ref_col(logic [31:0] k, int unsigned r);
    logic [31:0] s;
    logic [15:0] h;
    s = 32'h1234_5679 + r * 32'h9E37_79B9;
    h = 0;
    for (int i = 0; i < 32; i++) begin
      s ^= s << 13; s ^= s >> 17; s ^= s << 5;
      if (k[i]) h ^= s[31:16];
    end
    return (int'(h) * NW) >> 16;
  endfunction

  eh_ref m [ND * NW];
  int    ref_drops = 0, n_stall = 0;

  always @(posedge clk) if (rst_n) begin
    int unsigned o;
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready)
      for (int r = 0; r < ND; r++)
        if (m[r * NW + ref_col(in_key, r)].insert(0, NL, in_now, in_now, window, o)) ref_drops++;
  end

  lvl_rec_t lmem [ND][NL][NW];
  event     snap;
  for (genvar r = 0; r < ND; r++) begin : g_snap
    for (genvar j = 0; j < NK; j++) begin : g_l
      always @(snap)
        for (int c = 0; c < NW; c++)
          lmem[r][j][c] = dut.g_row[r].u_fs.g_lvl[j].u_lvl.vld[c] ? dut.g_row[r].u_fs.g_lvl[j].u_lvl.mem[c] : '0;
    end
    always @(snap)
      for (int c = 0; c < NW; c++)
        for (int l = NK; l < NL; l++) lmem[r][l][c] = u_mem.mem[(r * NW + c) * NB + l - NK];
  end

  initial begin
    int unsigned now = 100, exp_total;
    foreach (m[g]) m[g] = new(BPL, NL);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 60000; n++) begin
      if (n == 45000) begin
        // short window, set with the design idle
        in_valid = 0;
        repeat (10) @(posedge clk);
        while (busy) @(posedge clk);
        repeat (4) @(posedge clk);
        #1;
        window = 32'd300;
      end
      in_valid = $urandom_range(0, 7) != 0;
      if (n >= 30000 && n < 35000 && $urandom_range(0, 3) != 0) in_key = 32'hC0A8_0101;
      else in_key = 32'hC0A8_0000 + $urandom_range(0, 60);
      in_now   = now;
      if ($urandom_range(0, 1) == 0) now++;
      forever begin
        bit rdy;
        rdy = in_ready;
        @(posedge clk);
        #1;
        if (rdy || !in_valid) break;
      end
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (4) @(posedge clk);
    #1;
    -> snap;
    #1;
    for (int r = 0; r < ND; r++)
      for (int c = 0; c < NW; c++)
        for (int l = 0; l < NL; l++) begin
          lvl_rec_t rec;
          int nd, nr, g;
          g = r * NW + c;
          rec = lmem[r][l][c];
          nd = 0; nr = 0;
          for (int b = 0; b < rec.cnt; b++) if (now - rec.ts[b] < window) nd = b + 1;
          for (int b = 0; b < m[g].size_at(l); b++) if (now - m[g].ts_at(l, b) < window) nr = b + 1;
          checks++;
          if (nd != nr) fail($sformatf("row %0d EH %0d level %0d holds %0d live buckets, expected %0d",
                                       r, c, l + 1, nd, nr));
          else for (int b = 0; b < nd; b++)
            if (rec.ts[b] != m[g].ts_at(l, b)) begin
              fail($sformatf("row %0d EH %0d level %0d bucket %0d", r, c, l + 1, b));
              break;
            end
        end
    exp_total = 0;
    foreach (m[g]) exp_total += m[g].n_expired;
    $display("stall cycles %0d (counted %0d), BackStage back-pressure %0d, ops %0d, cascades %0d, drops %0d (reference %0d), expired buckets %0d",
             n_stall, n_stall_dut, n_bp, bs_ops, bs_cascade, bs_drop, ref_drops, exp_total);
    checks++;
    if (bs_drop != ref_drops) fail("drop count differs from the reference");
    checks++;
    if (n_stall == 0 || 32'(n_stall) != n_stall_dut) fail("input stall missing or miscounted");
    checks++;
    if (bs_cascade == 0 || n_bp == 0) fail("no BackStage cascade or back-pressure");
    checks++;
    if (bs_drop == 0) fail("no merge left the last level");
    checks++;
    if (exp_total == 0) fail("no bucket expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
