// tb_ecm_queue: random pushes of 0..3 entries (with gaps in the valid mask)
// and pops of 0..2 entries per cycle on a 16-deep queue, never beyond its
// free space or fill level, compared with a SystemVerilog queue: order of
// entries, both head outputs, count and free after every cycle. Full and
// empty are both reached.
module tb_ecm_queue;
  import ecm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [2:0] push_valid = 0;
  fs_req_t    push_data [3];
  logic [1:0] pop_n = 0;
  fs_req_t    head [2];
  logic [4:0] count, free;
  fs_req_t    model[$];
  int n_full = 0, n_empty = 0;

  ecm_queue #(.E(fs_req_t), .DEPTH(16), .NPUSH(3), .NPOP(2)) dut (
    .clk, .rst_n, .push_valid, .push_data, .pop_n, .head, .count, .free
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge: reset before the first clock

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL: %s", s);
  endtask

  initial begin
    #1_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ctr = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 20000; n++) begin
      int np, nq, bias;
      // check state
      checks++;
      if (32'(count) != model.size() || 32'(free) != 16 - model.size()) fail("count/free");
      if (model.size() > 0 && head[0] != model[0]) fail("head0");
      if (model.size() > 1 && head[1] != model[1]) fail($sformatf("head1 n=%0d size=%0d got %p exp %p", n, model.size(), head[1], model[1]));
      if (model.size() == 16) n_full++;
      if (model.size() == 0) n_empty++;
      // choose operations
      bias = (n / 2000) % 2;
      nq = $urandom_range(0, (model.size() < 2) ? model.size() : 2);
      if (bias == 0 && nq > 0 && $urandom_range(0, 1) == 0) nq--;
      push_valid = '0;
      np = 0;
      for (int i = 0; i < 3; i++) begin
        push_data[i].idx = 6'($urandom);
        push_data[i].now = ctr;
        if ((model.size() + np < 16) && $urandom_range(0, bias ? 2 : 1) == 0) begin
          push_valid[i] = 1;
          np++;
          ctr++;
        end
      end
      pop_n = 2'(nq);
      repeat (nq) void'(model.pop_front());
      for (int i = 0; i < 3; i++) if (push_valid[i]) model.push_back(push_data[i]);
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_full == 0 || n_empty == 0) fail("full and empty not both reached");
    $display("full %0d empty %0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
