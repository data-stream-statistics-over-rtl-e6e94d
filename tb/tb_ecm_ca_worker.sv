// tb_ecm_ca_worker: a cost-aware worker for levels 2..8 of 12 EHs with its
// on-chip level memory. Buckets arrive as spills of level 1, produced by a
// reference level-1 EH per EH fed with random tuples, offered at random
// times with a random rate and held while in_ready is low; the first ones
// arrive while the memory is still being cleared after reset. At the end the
// memory word of every (EH, level) must equal the reference EH's level.
// Cascades, back-pressure, almost_full and a merge leaving the last level
// (counted in n_drop, tiny level count here) must all occur; the drop count
// must agree with the reference; in_ready may only be low while almost_full
// is high; busy must be high during the clearing sweep.
module tb_ecm_ca_worker;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NEH = 12, NK = 1, NL = 8, NB = NL - NK;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd100_000_000;
  logic in_valid = 0, in_ready;
  spill_t in_data = '0;
  logic busy, almost_full;
  logic [31:0] n_ops, n_cascade, n_drop;

  ecm_ca_worker #(.NEH(NEH), .NLVL_TOT(NL), .AF_SLACK(3)) dut (
    .clk, .rst_n, .window, .in_valid, .in_data, .in_ready, .almost_full,
    .busy, .n_ops, .n_cascade, .n_drop
  );

  always #5 clk = ~clk;

  eh_ref m [NEH];
  int    n_bp = 0, ref_drops = 0, ref_ops = 0, n_af = 0, n_bad_rdy = 0;

  int n_in = 0, n_sent = 0;
  always @(posedge clk) begin
    if (in_valid && in_ready) n_in++;
  end
  always @(posedge clk) begin
    if (in_valid && !in_ready) n_bp++;
    if (rst_n && almost_full) n_af++;
    if (rst_n && !in_ready && !almost_full) n_bad_rdy++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned now = 10, o;
    foreach (m[i]) m[i] = new(BPL, NL);
    #1 rst_n = 0;   // a real falling edge resets the DUT before the first clock
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy low while the memory is cleared"); end
    for (int n = 0; n < 60000; n++) begin
      int unsigned k;
      now += 1;
      k = (n % 7 == 0) ? 0 : $urandom_range(0, NEH - 1);
      // levels 1..NK in the reference; a spill of level NK goes to the DUT
      if (m[k].insert(0, NK, now, now, window, o)) begin
        int unsigned o2;
        n_sent++;
        in_valid    = 1;
        in_data.gid = 16'(k);
        in_data.lvl = 6'(NK + 1);
        in_data.ts  = o;
        in_data.now = now;
        // the rest of the cascade, in the reference
        if (m[k].insert(NK, NL, o, now, window, o2)) ref_drops++;
        forever begin
          bit rdy;
          rdy = in_ready;
          @(posedge clk);
          #1;
          if (rdy) break;
        end
        in_valid = 0;
        repeat ($urandom_range(0, (n < 30000) ? 1 : 12)) begin
          @(posedge clk);
          #1;
        end
      end
    end
    in_valid <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int e = 0; e < NEH; e++)
      for (int l = NK; l < NL; l++) begin
        lvl_rec_t r;
        r = dut.u_ram.mem[e * NB + l - NK];
        checks++;
        if (32'(r.cnt) != m[e].size_at(l)) begin
          failures++;
          $display("FAIL EH %0d level %0d count %0d expected %0d", e, l, r.cnt, m[e].size_at(l));
        end else for (int b = 0; b < r.cnt; b++)
          if (r.ts[b] != m[e].ts_at(l, b)) begin
            failures++;
            $display("FAIL EH %0d level %0d bucket %0d", e, l, b);
          end
      end
    checks++;
    if (n_drop != ref_drops) begin failures++; $display("FAIL drops %0d expected %0d", n_drop, ref_drops); end
    checks++;
    if (n_cascade == 0 || n_bp == 0 || n_drop == 0 || n_af == 0) begin
      failures++; $display("FAIL coverage: cascades %0d backpressure %0d drops %0d almost_full %0d", n_cascade, n_bp, n_drop, n_af);
    end
    checks++;
    if (n_bad_rdy != 0) begin failures++; $display("FAIL in_ready low without almost_full %0d times", n_bad_rdy); end
    $display("sent %0d accepted %0d", n_sent, n_in);
    $display("ops %0d cascades %0d backpressure cycles %0d drops %0d", n_ops, n_cascade, n_bp, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
