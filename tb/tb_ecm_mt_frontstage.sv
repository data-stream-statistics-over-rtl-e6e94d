// tb_ecm_mt_frontstage: one FrontStage of the multi-tuple design (8 EHs,
// 2 on-chip levels, row 1, lane 2 of T=3) fed with up to 3 requests per
// cycle, every request with its own timestamp.
//  - Steering: every cycle the entries leaving the queue (one, or two when
//    the escape path is active) must be the oldest queued ones; an entry for
//    the escape EH must belong to the assigned owner.
//  - Contents: a reference EH per main EH and one for the escape EH are fed
//    with exactly what the two structures received; every spill on the output
//    must be the next one its reference predicts, tagged with the right
//    global EH id (55 + 2 + 3*idx for main EHs, 200 for the escape EH).
//  - Mechanisms: a uniform phase must be served at one entry per cycle; a
//    phase flooding one EH must make the detector assign the escape EH and
//    dequeue two entries per cycle; a phase with the output blocked must
//    hold the queue (spill-queue back-pressure) without losing a spill.
module tb_ecm_mt_frontstage;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NEH = 8, NLVL = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd50_000_000;
  logic [2:0] push_valid = 0;
  fs_req_t    push_data [3];
  logic [4:0] q_free;
  logic       out_valid, out_ready = 1, esc_en;
  spill_t     out_data;
  logic [31:0] n_esc, n_stall, n_assign;

  ecm_mt_frontstage #(.LOCAL_NEH(NEH), .ROW(1), .LANE(2), .ESC_GID(200), .NLVL(NLVL)) dut (
    .clk, .rst_n, .window, .push_valid, .push_data, .q_free,
    .out_valid, .out_data, .out_ready, .esc_en, .n_esc, .n_stall, .n_assign
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  eh_ref       m [NEH + 1];            // index NEH is the escape EH
  int unsigned expq [NEH + 1][$];      // expected spill end times
  fs_req_t     pend [$];               // pushed, not yet dequeued
  int n_dual = 0, n_single_busy = 0, n_busy = 0, n_spill = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, s);
  endtask

  // queue-side checks and reference feeding, sampled at each clock edge
  always @(posedge clk) if (rst_n) begin
    int unsigned o;
    fs_req_t a, b;
    if (dut.q_count != 0 && !dut.hold) begin
      n_busy++;
      if (dut.main_v && !dut.extra_v) n_single_busy++;
    end
    if (dut.main_v && dut.extra_v) n_dual++;
    if (dut.main_v || dut.extra_v) begin
      checks++;
      a = pend.pop_front();
      if (dut.extra_v) begin
        b = pend.pop_front();
        // the two oldest, one to each structure
        if (!((dut.main_now == a.now && dut.extra_now == b.now && 6'(dut.main_idx) == a.idx && b.idx == 6'(dut.owner)) ||
              (dut.main_now == b.now && dut.extra_now == a.now && 6'(dut.main_idx) == b.idx && a.idx == 6'(dut.owner))))
          fail("dual dequeue is not the two oldest entries");
        if (m[NEH].insert(0, NLVL, dut.extra_now, dut.extra_now, window, o)) expq[NEH].push_back(o);
      end else if (dut.main_now != a.now || 6'(dut.main_idx) != a.idx) fail("dequeue order");
      if (m[dut.main_idx].insert(0, NLVL, dut.main_now, dut.main_now, window, o))
        expq[dut.main_idx].push_back(o);
    end
    if (out_valid && out_ready) begin
      int e;
      checks++;
      n_spill++;
      e = (out_data.gid == 200) ? NEH : (int'(out_data.gid) - 57) / 3;
      if (out_data.lvl != NLVL + 1) fail("spill level");
      if (e < 0 || e > NEH || (e < NEH && int'(out_data.gid) != 57 + 3 * e)) fail("spill gid");
      else if (expq[e].size() == 0) fail("unexpected spill");
      else if (expq[e].pop_front() != out_data.ts) fail($sformatf("spill time of EH %0d", e));
    end
  end

  initial begin
    #5_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned now = 100;
    foreach (m[i]) m[i] = new(BPL, NLVL);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 30000; n++) begin
      int phase, k, lim;
      phase = (n / 2500) % 4;   // 0 uniform, 1 flood, 2 uniform, 3 blocked output
      out_ready = (phase == 3) ? ($urandom_range(0, 15) == 0) : ($urandom_range(0, 5) != 0);
      lim = q_free;
      push_valid = '0;
      for (int i = 0; i < 3; i++) begin
        bit want;
        case (phase)
          1:       want = 1;
          3:       want = $urandom_range(0, 1) == 0;
          default: want = (i == 0) && $urandom_range(0, 2) != 0;
        endcase
        k = (phase == 1 && $urandom_range(0, 9) != 0) ? 5 : $urandom_range(0, NEH - 1);
        push_data[i].idx = 6'(k);
        push_data[i].now = now;
        if (want && lim > 0) begin
          push_valid[i] = 1;
          lim--;
          pend.push_back(push_data[i]);
          now++;
        end
      end
      @(posedge clk);
      #1;
    end
    push_valid = 0;
    out_ready = 1;
    repeat (400) @(posedge clk);
    #1;
    for (int e = 0; e <= NEH; e++) begin
      checks++;
      if (expq[e].size() != 0) fail($sformatf("missing spills of EH %0d", e));
    end
    checks++;
    if (pend.size() != 0) fail("requests never served");
    checks++;
    if (n_assign == 0 || n_dual == 0 || n_stall == 0 || n_esc == 0)
      fail($sformatf("mechanism missing: assign %0d dual %0d stall %0d esc %0d", n_assign, n_dual, n_stall, n_esc));
    checks++;
    if (n_busy != n_single_busy + n_dual) fail("an available cycle went unused");
    $display("spills %0d, dual dequeues %0d, escape tuples %0d, held cycles %0d, assignments %0d",
             n_spill, n_dual, n_esc, n_stall, n_assign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
