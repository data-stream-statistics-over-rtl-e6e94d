// tb_ecm_level_update: checks ecm_level_update, the per-level EH algorithm
// (combinational; inputs are driven, then sampled after #1).
// First the worked example of the design notes with BPL=11 (a level filled to
// capacity merges its two oldest buckets into one ending at the newer of the
// two), then a long random sequence on one level with expiry, compared after
// every step with the queue-based reference model.
module tb_ecm_level_update;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  lvl_rec_t    u_cur;
  ts_t         u_new_ts, u_now, u_win;
  lvl_result_t u_res;

  ecm_level_update dut (.cur(u_cur), .new_ts(u_new_ts), .now(u_now), .window(u_win), .res(u_res));

  task automatic upd(lvl_rec_t c, ts_t t, ts_t n, ts_t w, output lvl_result_t r);
    u_cur = c; u_new_ts = t; u_now = n; u_win = w;
    #1;
    r = u_res;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lvl_rec_t    rec;
    lvl_result_t r;
    eh_ref       ref_m;
    int unsigned now, win, exp_ts;
    bit          exp_sp;

    // directed: fill with times 1..11, then insert 12
    rec = '0;
    for (int i = 1; i <= 11; i++) begin
      upd(rec, ts_t'(i), ts_t'(i), 32'd1000, r);
      check(!r.spill, "no spill while filling");
      rec = r.rec;
    end
    check(rec.cnt == 11 && rec.ts[0] == 11 && rec.ts[10] == 1, "full level layout");
    upd(rec, 32'd12, 32'd12, 32'd1000, r);
    check(r.spill && r.spill_ts == 2, "merge of buckets 1 and 2 ends at 2");
    check(r.rec.cnt == 10 && r.rec.ts[0] == 12 && r.rec.ts[9] == 3, "level after merge");
    // expiry: window 5 at time 14 keeps buckets ending 10..12 (ages 4,3,2)
    upd(r.rec, 32'd14, 32'd14, 32'd5, r);
    check(!r.spill && r.rec.cnt == 4 && r.rec.ts[3] == 10, "expired tail dropped");

    // random against reference
    ref_m = new(BPL, 1);
    rec   = '0;
    now   = 32'hFFFF_F000;   // crosses the timestamp wrap
    for (int n = 0; n < 20000; n++) begin
      now += $urandom_range(0, 3);
      win  = (n % 5000 < 2500) ? 32'd1_000_000 : 32'd40;
      exp_sp = ref_m.insert(0, 1, now, now, win, exp_ts);
      upd(rec, now, now, win, r);
      rec = r.rec;
      check(r.spill == exp_sp && (!exp_sp || r.spill_ts == exp_ts), "spill matches reference");
      if (32'(rec.cnt) != ref_m.size_at(0)) check(0, "count matches reference");
      else for (int i = 0; i < rec.cnt; i++)
        if (rec.ts[i] != ref_m.ts_at(0, i)) check(0, "timestamp matches reference");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
