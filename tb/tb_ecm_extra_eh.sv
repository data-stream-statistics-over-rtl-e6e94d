// tb_ecm_extra_eh: feeds the register-based escape EH (3 levels) with
// tuples on random cycles, compares each spill out of level 3 with the
// reference EH (end time, tuple time, and a latency of one cycle per level
// plus the testbench's 2-cycle drive/sample offset), checks last_now, then
// pulses 'clear' and checks that all levels are empty and that the reference
// restarted from empty agrees again.
module tb_ecm_extra_eh;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NLVL = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, clear = 0;
  ts_t  window = 32'd1_000_000;
  logic in_valid = 0;
  ts_t  in_now = 0;
  logic sv;
  ts_t  sts, snow, last_now;
  longint cyc = 0;

  ecm_extra_eh #(.NLVL(NLVL)) dut (
    .clk, .rst_n, .window, .clear, .in_valid, .in_now,
    .spill_valid(sv), .spill_ts(sts), .spill_now(snow), .last_now
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge: reset before the first clock
  always @(posedge clk) cyc++;

  typedef struct { int unsigned ts, now; longint due; } exp_t;
  exp_t  expq[$];
  eh_ref m;
  int    nspill = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL @%0d: %s", cyc, s);
  endtask

  always @(posedge clk) if (rst_n && sv) begin
    exp_t e;
    checks++;
    nspill++;
    if (expq.size() == 0) fail("unexpected spill");
    else begin
      e = expq.pop_front();
      if (e.ts != sts || e.now != snow) fail("spill mismatch");
      if (e.due != cyc) fail($sformatf("latency: at %0d expected %0d", cyc, e.due));
    end
  end

  initial begin
    #2_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n_tup);
    int unsigned o;
    for (int n = 0; n < n_tup; n++) begin
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
      end else begin
        in_now   <= in_now + $urandom_range(0, 2);
        #0;
        in_valid <= 1;
      end
      @(posedge clk);
      if (in_valid) begin
        if (m.insert(0, NLVL, in_now, in_now, window, o)) expq.push_back('{o, in_now, cyc + NLVL + 1});
      end
    end
    in_valid <= 0;
    repeat (NLVL + 3) @(posedge clk);
  endtask

  initial begin
    m = new(BPL, NLVL);
    in_now = 50;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(5000);
    checks++;
    if (expq.size() != 0 || nspill < 20) fail("spill count");
    checks++;
    if (last_now != in_now) fail("last_now");
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    @(posedge clk);
    for (int l = 0; l < NLVL; l++) begin
      checks++;
      if (dut.rec[l].cnt != 0) fail("clear");
    end
    m = new(BPL, NLVL);
    run(3000);
    checks++;
    if (expq.size() != 0) fail("spills after clear");
    $display("spills %0d", nspill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
