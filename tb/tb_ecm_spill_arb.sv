// tb_ecm_spill_arb: nine random valid/ready sources (each holding a
// numbered item until it is taken) and a randomly ready sink. Checks that
// every transfer carries the data of a valid source, that exactly the granted
// source sees ready, that the grant is the first valid source at or after the
// round-robin pointer (so with all sources busy each is served once every
// nine transfers), and that every item arrives exactly once, in order per
// source.
module tb_ecm_spill_arb;
  import ecm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [8:0] in_valid = 0, in_ready;
  spill_t     in_data [9];
  logic       out_valid, out_ready = 0;
  spill_t     out_data;
  int         sent [9], got [9];

  ecm_spill_arb #(.N(9)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge: reset before the first clock

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr = 0;
    foreach (sent[i]) begin sent[i] = 0; got[i] = 0; end
    foreach (in_data[i]) in_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int n = 0; n < 20000; n++) begin
      int g;
      spill_t taken;
      for (int i = 0; i < 9; i++)
        if (!in_valid[i] && $urandom_range(0, (n < 10000) ? 1 : 0) == 0) begin
          in_valid[i] = 1;
          in_data[i].gid = 16'(i);
          in_data[i].ts  = sent[i];
          sent[i]++;
        end
      out_ready = $urandom_range(0, 3) != 0;
      #1;
      g = -1;
      for (int k = 0; k < 9; k++) if (g < 0 && in_valid[(ptr + k) % 9]) g = (ptr + k) % 9;
      checks++;
      if (out_valid != (g >= 0) || (g >= 0 && (out_data != in_data[g] ||
          in_ready != ((out_ready ? 9'b1 : 9'b0) << g)))) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d grant expected %0d ready %b ov %b gnt %0d ptr %0d iv %b", n, g, in_ready, out_valid, dut.gnt, dut.ptr, in_valid);
      end
      taken = out_data;
      @(posedge clk);
      #1;
      if (g >= 0 && out_ready) begin
        if (32'(taken.ts) != got[g] || 32'(taken.gid) != g) begin failures++; $display("FAIL order"); end
        got[g]++;
        in_valid[g] = 0;
        ptr = (g + 1) % 9;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
