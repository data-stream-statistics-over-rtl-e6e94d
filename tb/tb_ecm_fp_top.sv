// tb_ecm_fp_top: the fully pipelined updater with 5 EHs per row, 3 rows and
// 8 levels, so that cascades climb to the last level and merges fall off it
// within a short run. A tuple is offered on most cycles (there is no ready);
// keys come from a small set, times rise by about one per tuple. Phases: a
// long window (buckets fill all levels, merges leave level 8), then a short
// window of 300 units so that buckets expire.
//
// The testbench hashes every tuple with its own copy of the row hashes and
// feeds a reference EH (all levels, queue based) per (row, column). At the
// end every level memory of every row must hold the reference's live
// buckets, and n_drop must equal the merges the reference pushed off the last
// level. Coverage: drops and expiry must both occur.
module tb_ecm_fp_top;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NW = 5, ND = 3, NL = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd100_000_000;
  logic in_valid = 0;
  logic [KEY_W-1:0] in_key = '0;
  ts_t  in_now = '0;
  logic [31:0] n_drop;

  ecm_fp_top #(.NW(NW), .ND(ND), .NL(NL)) dut (
    .clk, .rst_n, .window, .in_valid, .in_key, .in_now, .n_drop
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
  int    ref_drops = 0;

  always @(posedge clk) if (rst_n && in_valid) begin
    int unsigned o;
    for (int r = 0; r < ND; r++)
      if (m[r * NW + ref_col(in_key, r)].insert(0, NL, in_now, in_now, window, o)) ref_drops++;
  end

  lvl_rec_t fmem [ND][NL][NW];
  event     snap;
  for (genvar r = 0; r < ND; r++) begin : g_snap
    for (genvar j = 0; j < NL; j++) begin : g_l
      always @(snap)
        for (int i = 0; i < NW; i++)
          fmem[r][j][i] = dut.g_row[r].u_row.g_lvl[j].u_lvl.vld[i] ?
                          dut.g_row[r].u_row.g_lvl[j].u_lvl.mem[i] : '0;
    end
  end

  initial begin
    int unsigned now = 100, exp_total;
    foreach (m[g]) m[g] = new(BPL, NL);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 60000; n++) begin
      if (n == 50000) begin
        // short window, set with the pipeline empty
        in_valid = 0;
        repeat (2 * NL + 4) @(posedge clk);
        #1;
        window = 32'd300;
      end
      in_valid = $urandom_range(0, 7) != 0;
      in_key   = 32'hC0A8_0000 + $urandom_range(0, 40);
      in_now   = now;
      if ($urandom_range(0, 1) == 0) now++;
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (2 * NL + 6) @(posedge clk);
    #1;
    -> snap;
    #1;
    for (int r = 0; r < ND; r++)
      for (int c = 0; c < NW; c++)
        for (int l = 0; l < NL; l++) begin
          lvl_rec_t rec;
          int nd, nr, g;
          g = r * NW + c;
          rec = fmem[r][l][c];
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
    $display("drops %0d (reference %0d), expired buckets %0d", n_drop, ref_drops, exp_total);
    checks++;
    if (n_drop != ref_drops) fail("drop count differs from the reference");
    checks++;
    if (n_drop == 0) fail("no merge left the last level");
    checks++;
    if (exp_total == 0) fail("no bucket expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
