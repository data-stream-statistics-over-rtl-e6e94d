// tb_ecm_ca_top: the cost-aware updater with 7 EHs per row, 3 rows, 8 levels
// and two workers per row, so cascades reach the last level within a short
// run. Tuples are offered on most cycles under in_valid/in_ready; keys come
// from a small set, times rise by about one per tuple. Phases: spread keys
// with a long window; a flood of one key (every second tuple spills into one
// worker, which must stall the input); spread keys with a window of 300
// units so that buckets expire.
//
// The testbench hashes every accepted tuple with its own copy of the row
// hashes and feeds a reference EH (all levels) per (row, column). At the
// end, level 1 of every row and levels 2..8 in every worker's memory must
// hold the reference's live buckets, and the summed n_drop must equal the
// merges the reference pushed off the last level. Coverage: input stall,
// cascades inside the workers, drops and expiry must all occur.
module tb_ecm_ca_top;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NW = 7, ND = 3, NL = 8, NWK = 2, NP = ND * NWK;
  localparam int WK_NEH = (NW + NWK - 1) / NWK;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd100_000_000;
  logic in_valid = 0, in_ready, busy;
  logic [KEY_W-1:0] in_key = '0;
  ts_t  in_now = '0;
  logic [31:0] n_ops [NP], n_cascade [NP], n_drop [NP];

  ecm_ca_top #(.NW(NW), .ND(ND), .NL(NL), .NWK(NWK)) dut (
    .clk, .rst_n, .window, .in_valid, .in_ready, .in_key, .in_now,
    .busy, .n_ops, .n_cascade, .n_drop
  );

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
    always @(snap)
      for (int c = 0; c < NW; c++) begin
        lmem[r][0][c] = dut.g_row[r].u_bl1.vld[c] ? dut.g_row[r].u_bl1.mem[c] : '0;
        for (int l = 1; l < NL; l++)
          lmem[r][l][c] = (c % NWK == 0) ? dut.g_row[r].g_wk[0].u_wk.u_ram.mem[(c / NWK) * (NL - 1) + l - 1]
                                         : dut.g_row[r].g_wk[1].u_wk.u_ram.mem[(c / NWK) * (NL - 1) + l - 1];
      end
  end

  initial begin
    int unsigned now = 100, exp_total, drops, casc;
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
    drops = 0; casc = 0;
    for (int p = 0; p < NP; p++) begin drops += n_drop[p]; casc += n_cascade[p]; end
    $display("stall cycles %0d, worker cascades %0d, drops %0d (reference %0d), expired buckets %0d",
             n_stall, casc, drops, ref_drops, exp_total);
    checks++;
    if (drops != ref_drops) fail("drop count differs from the reference");
    checks++;
    if (n_stall == 0) fail("input never stalled");
    checks++;
    if (casc == 0) fail("no cascade inside a worker");
    checks++;
    if (drops == 0) fail("no merge left the last level");
    checks++;
    if (exp_total == 0) fail("no bucket expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
