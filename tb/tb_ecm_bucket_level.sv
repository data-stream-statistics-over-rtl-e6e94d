// tb_ecm_bucket_level: drives one bucket level over 8 EHs with a bucket
// every cycle whose end time (now/2) differs from the tuple time, as for a
// level above the first, with frequent repeats of the same EH so that the
// write-forwarding path is used. Every spill is compared with the reference
// EH model (EH, end time, tuple time) and must appear a fixed 2 cycles after
// its bucket (plus the testbench's own 2-cycle drive/sample offset). Expiry
// is exercised with a short window; the memory is compared at the end.
module tb_ecm_bucket_level;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NEH = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window;
  logic in_valid = 0;
  logic [2:0] in_idx = 0;
  ts_t  in_ts = 0, in_now = 0;
  logic ov;
  logic [2:0] oidx;
  ts_t  ots_o, onow;
  longint cyc = 0;
  int   nfwd = 0;

  ecm_bucket_level #(.NEH(NEH)) dut (
    .clk, .rst_n, .window, .in_valid, .in_idx, .in_ts, .in_now,
    .out_valid(ov), .out_idx(oidx), .out_ts(ots_o), .out_now(onow)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge: reset before the first clock
  always @(posedge clk) cyc++;

  typedef struct { int unsigned idx, ts, now; longint due; } exp_t;
  exp_t   expq[$];
  eh_ref  m [NEH];
  int     nspill = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL @%0d: %s", cyc, s);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.s1_valid && dut.fw_valid && dut.fw_idx == dut.s1_idx) nfwd++;
    if (ov) begin
      exp_t e;
      checks++;
      nspill++;
      if (expq.size() == 0) fail("unexpected spill");
      else begin
        e = expq.pop_front();
        if (e.idx != 32'(oidx) || e.ts != ots_o || e.now != onow) fail("spill mismatch");
        if (e.due != cyc) fail($sformatf("spill latency: at %0d expected %0d", cyc, e.due));
      end
    end
  end

  initial begin
    #2_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned now = 1000, o;
    foreach (m[i]) m[i] = new(BPL, 1);
    window = 32'd1_000_000;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 30000; n++) begin
      int unsigned k;
      if (n == 20000) begin
        in_valid <= 0;
        repeat (4) @(posedge clk);
        window = 32'd100;
      end
      now += $urandom_range(0, 2);
      k = ($urandom_range(0, 2) == 0) ? 32'(in_idx) : $urandom_range(0, NEH-1);
      in_valid <= 1;
      in_idx   <= 3'(k);
      in_ts    <= now / 2;
      in_now   <= now;
      if (m[k].insert(0, 1, now / 2, now, window, o))
        expq.push_back('{k, o, now, cyc + 4});
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (expq.size() != 0) fail("missing spills");
    if (nspill < 100) fail("too few spills");
    if (nfwd < 100) fail("forwarding path not exercised");
    for (int i = 0; i < NEH; i++) begin
      lvl_rec_t r;
      r = dut.mem[i];
      checks++;
      if (32'(r.cnt) != m[i].size_at(0)) fail($sformatf("EH %0d count", i));
      else for (int b = 0; b < r.cnt; b++)
        if (r.ts[b] != m[i].ts_at(0, b)) fail($sformatf("EH %0d bucket %0d", i, b));
    end
    $display("spills %0d, forwarded reads %0d", nspill, nfwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
