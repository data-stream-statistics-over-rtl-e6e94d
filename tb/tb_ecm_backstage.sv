// tb_ecm_backstage: a BackStage for levels 3..8 (2 levels on chip) of 12
// EHs, over the memory model with 3 cycles of read latency and random request
// stalls. Buckets arrive as spills of level 2, produced by a reference
// 2-level EH per EH fed with random tuples, offered at random times with a
// random rate and held while in_ready is low. At the end the memory word of
// every (EH, level) must equal the reference EH's level. Cascades (buckets
// taken from the Updates FIFO), back-pressure (in_ready low) and a merge
// leaving the last level (counted in n_drop, tiny last level count here)
// must all occur, and the counters must agree with the reference.
module tb_ecm_backstage;
  import ecm_pkg::*;
  import eh_ref_pkg::*;

  localparam int NEH = 12, NK = 2, NL = 8, NB = NL - NK;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd100_000_000;
  logic in_valid = 0, in_ready;
  spill_t in_data = '0;
  logic req_valid, req_ready, req_we, rsp_valid, busy, stall = 0;
  logic [23:0] req_addr;
  lvl_rec_t wdata, rdata;
  logic [31:0] n_ops, n_cascade, n_drop;

  ecm_backstage #(.NLVL_TOT(NL), .NLVL_FRNT(NK)) dut (
    .clk, .rst_n, .window, .in_valid, .in_data, .in_ready,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req_we(req_we),
    .mem_req_addr(req_addr), .mem_req_wdata(wdata),
    .mem_rsp_valid(rsp_valid), .mem_rsp_rdata(rdata),
    .busy, .n_ops, .n_cascade, .n_drop
  );

  ecm_dram_model #(.DEPTH(NEH * NB), .LAT(3)) u_mem (
    .clk, .stall, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata(wdata),
    .rsp_valid, .rsp_rdata(rdata)
  );

  always #5 clk = ~clk;

  eh_ref m [NEH];
  int    n_bp = 0, ref_drops = 0, ref_ops = 0;

  int n_in = 0, n_sent = 0;
  always @(posedge clk) begin
    if (in_valid && in_ready) n_in++;
  end
  always @(posedge clk) begin
    stall <= $urandom_range(0, 4) == 0;
    if (in_valid && !in_ready) n_bp++;
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
        r = u_mem.mem[e * NB + l - NK];
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
    if (n_cascade == 0 || n_bp == 0 || n_drop == 0) begin
      failures++; $display("FAIL coverage: cascades %0d backpressure %0d drops %0d", n_cascade, n_bp, n_drop);
    end
    $display("sent %0d accepted %0d", n_sent, n_in);
    $display("ops %0d cascades %0d backpressure cycles %0d drops %0d", n_ops, n_cascade, n_bp, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
