// tb_ecm_frontstage: drives a 3-level FrontStage over 8 EHs with one tuple
// per cycle (keys chosen to collide often, so back-to-back updates of one EH
// exercise the forwarding path) and compares every spill leaving level 3 with
// the reference EH model: same EH, same bucket end time, same tuple time, and
// exactly 2 cycles per level after its tuple entered (the constant 2 added
// to the expected cycle is the testbench's own drive and sample delay). Then
// the window is cut, with the pipeline empty, so that expiry is exercised,
// and the memory of every level is compared with the reference at the end.
module tb_ecm_frontstage;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NEH = 8, NLVL = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window;
  logic in_valid = 0;
  logic [2:0] in_idx = 0;
  ts_t  in_now = 0;
  logic sv;
  logic [2:0] sidx;
  ts_t  sts, snow;
  longint cyc = 0;

  ecm_frontstage #(.NEH(NEH), .NLVL(NLVL)) dut (
    .clk, .rst_n, .window, .in_valid, .in_idx, .in_now,
    .spill_valid(sv), .spill_idx(sidx), .spill_ts(sts), .spill_now(snow)
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

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (sv) begin
      checks++;
      nspill++;
      if (expq.size() == 0) fail("unexpected spill");
      else begin
        exp_t e;
        e = expq.pop_front();
        if (e.idx != 32'(sidx) || e.ts != sts || e.now != snow) fail($sformatf("spill mismatch idx %0d/%0d ts %0d/%0d", sidx, e.idx, sts, e.ts));
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
    int unsigned now = 100, ots;
    foreach (m[i]) m[i] = new(BPL, NLVL);
    window = 32'd1_000_000;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 40000; n++) begin
      int unsigned k;
      if (n == 30000) begin
        // change the window only with the pipeline empty
        in_valid <= 0;
        repeat (2*NLVL + 2) @(posedge clk);
        window = 32'd200;
      end
      now += $urandom_range(0, 1);
      k = ($urandom_range(0, 3) == 0) ? 32'(in_idx) : $urandom_range(0, NEH-1);
      in_valid <= 1;
      in_idx   <= 3'(k);
      in_now   <= now;
      if (m[k].insert(0, NLVL, now, now, window, ots))
        expq.push_back('{k, ots, now, cyc + 2*NLVL + 2});
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (2*NLVL + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) fail("missing spills");
    if (nspill < 100) fail("too few spills");
    // final memory contents
    for (int i = 0; i < NEH; i++) begin
      lvl_rec_t r;
      for (int l = 0; l < NLVL; l++) begin
        case (l)
          0: r = dut.g_lvl[0].u_lvl.mem[i];
          1: r = dut.g_lvl[1].u_lvl.mem[i];
          default: r = dut.g_lvl[2].u_lvl.mem[i];
        endcase
        checks++;
        if (32'(r.cnt) != m[i].size_at(l)) fail($sformatf("EH %0d level %0d count", i, l));
        else for (int b = 0; b < r.cnt; b++)
          if (r.ts[b] != m[i].ts_at(l, b)) fail($sformatf("EH %0d level %0d bucket %0d", i, l, b));
      end
    end
    $display("spills seen: %0d", nspill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
