// tb_ecm_hh_detect: drives the heavy-hitter detector through its cases and
// checks the outputs one cycle after each input change: saturation assigns
// the queue-head EH and enables the escape path (with a one-cycle clear of
// the escape EH), draining disables it but keeps the owner, saturation by
// another EH while the escape EH still holds live buckets enables nothing,
// saturation by the owner re-enables without clearing, and once a full window
// has passed since the escape EH's last tuple a new EH is assigned. Then a
// random run is compared with a cycle model of the same rule.
module tb_ecm_hh_detect;
  import ecm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  ts_t  window = 32'd1000, now = 0, extra_last = 0;
  logic [4:0] q_count = 0, head_idx = 0;
  logic esc_en, owner_valid, clear_extra;
  logic [4:0] owner;
  logic [31:0] n_assign;

  ecm_hh_detect #(.CW(5), .IDX_W(5), .HH_ON(12), .HH_OFF(4)) dut (
    .clk, .rst_n, .window, .now, .q_count, .head_idx, .extra_last,
    .esc_en, .owner_valid, .owner, .clear_extra, .n_assign
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge: reset before the first clock

  task automatic expect_out(logic e, logic ov, logic [4:0] o, logic c, string s);
    checks++;
    if (esc_en !== e || owner_valid !== ov || (ov && owner !== o) || clear_extra !== c) begin
      failures++;
      $display("FAIL %s: esc %b owner_valid %b owner %0d clear %b", s, esc_en, owner_valid, owner, clear_extra);
    end
  endtask

  task automatic step(logic [4:0] qc, logic [4:0] hi, ts_t t, ts_t xl);
    q_count <= qc; head_idx <= hi; now <= t; extra_last <= xl;
    @(posedge clk);
    #1;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m_en, m_ov, m_clr;
    logic [4:0] m_own;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    expect_out(0, 0, 0, 0, "after reset");
    step(11, 7, 100, 0);   expect_out(0, 0, 0, 0, "below threshold");
    step(12, 7, 101, 0);   expect_out(1, 1, 7, 1, "assign on saturation");
    step(14, 7, 102, 101); expect_out(1, 1, 7, 0, "stay enabled");
    step(5, 3, 110, 109);  expect_out(1, 1, 7, 0, "hysteresis");
    step(3, 3, 111, 110);  expect_out(0, 1, 7, 0, "drained");
    step(13, 3, 200, 150); expect_out(0, 1, 7, 0, "other EH, escape EH busy");
    step(13, 7, 201, 150); expect_out(1, 1, 7, 0, "owner saturates again");
    step(2, 7, 300, 290);  expect_out(0, 1, 7, 0, "drained again");
    step(15, 9, 1290, 290); expect_out(1, 1, 9, 1, "re-assigned after a window");
    checks++;
    if (n_assign != 2) begin failures++; $display("FAIL n_assign %0d", n_assign); end
    // random run against a model of the rule
    m_en = esc_en; m_ov = owner_valid; m_own = owner; m_clr = 0;
    for (int n = 0; n < 5000; n++) begin
      logic [4:0] qc, hi;
      ts_t t, xl;
      qc = 5'($urandom_range(0, 16));
      hi = 5'($urandom_range(0, 3));
      t  = now + $urandom_range(0, 300);
      xl = t - $urandom_range(0, 1500);
      m_clr = 0;
      if (qc >= 12 && !m_en) begin
        if (m_ov && m_own == hi) m_en = 1;
        else if (!m_ov || (t - xl) >= window) begin
          m_en = 1; m_ov = 1; m_own = hi; m_clr = 1;
        end
      end else if (qc < 4) m_en = 0;
      step(qc, hi, t, xl);
      expect_out(m_en, m_ov, m_own, m_clr, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
