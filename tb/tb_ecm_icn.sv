// tb_ecm_icn: random tuple groups (T=3, D=3, W=55) with random column
// hashes and random free space in the 9 queues. For each group the testbench
// works out which FrontStage each (tuple, row) pair belongs to (row*T +
// column mod T) and its local index (column div T), checks the push masks and
// data, and checks that in_ready is low exactly when some queue would get more
// entries than it has free slots. Cases with several tuples on one FrontStage
// and stalled groups are counted and must both occur.
module tb_ecm_icn;
  import ecm_pkg::*;

  int checks = 0, failures = 0;
  logic       in_valid, in_ready;
  logic [2:0] tup_valid;
  ts_t        tup_now [3];
  logic [5:0] col [3][3];
  logic [4:0] q_free [9];
  logic [2:0] push_valid [9];
  fs_req_t    push_data [9][3];

  ecm_icn #(.NT(3), .ND(3), .NW(55), .QCW(5)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_multi = 0, n_stall = 0;
    for (int n = 0; n < 20000; n++) begin
      int cnt [9];
      bit exp_ready;
      logic [2:0] exp_pv [9];
      in_valid  = $urandom_range(0, 7) != 0;
      tup_valid = 3'($urandom);
      foreach (tup_now[t]) tup_now[t] = $urandom;
      foreach (col[t, r]) col[t][r] = 6'($urandom_range(0, 54));
      foreach (q_free[f]) q_free[f] = 5'($urandom_range(0, 3));
      foreach (cnt[f]) begin cnt[f] = 0; exp_pv[f] = 0; end
      for (int t = 0; t < 3; t++)
        for (int r = 0; r < 3; r++)
          if (tup_valid[t]) begin
            int f;
            f = r * 3 + int'(col[t][r]) % 3;
            cnt[f]++;
            exp_pv[f][t] = 1;
          end
      exp_ready = 1;
      foreach (cnt[f]) begin
        if (cnt[f] > q_free[f]) exp_ready = 0;
        if (cnt[f] > 1) n_multi++;
      end
      #1;
      checks++;
      if (in_ready != exp_ready) begin failures++; $display("FAIL ready"); end
      if (in_valid && !exp_ready) n_stall++;
      for (int f = 0; f < 9; f++) begin
        checks++;
        if (push_valid[f] != ((in_valid && exp_ready) ? exp_pv[f] : 3'b0)) begin
          failures++; $display("FAIL push_valid fs %0d", f);
        end
        for (int t = 0; t < 3; t++)
          if (exp_pv[f][t] && (32'(push_data[f][t].idx) != int'(col[t][f/3]) / 3 || push_data[f][t].now != tup_now[t])) begin
            failures++; $display("FAIL push_data fs %0d tuple %0d", f, t);
          end
      end
    end
    checks++;
    if (n_multi == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("collisions %0d stalls %0d", n_multi, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
