// tb_ecm_hash: checks the H3 row hash. A second H3 implementation in the
// testbench (same xorshift generator for the bit masks, same multiply-shift
// reduction) predicts the column of random keys; every column must lie in
// 0..W-1, and over 55,000 random keys each column must get between half and
// twice its fair share. Two seeds must give different functions.
module tb_ecm_hash;
  import ecm_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] key;
  logic [5:0]  col_a, col_b;
  int          hist [W];

  ecm_hash #(.SEED(32'h1234_5679)) u_a (.key, .col(col_a));
  ecm_hash #(.SEED(32'hB06C_6632)) u_b (.key, .col(col_b));

  function automatic int unsigned ref_col(logic [31:0] k, int unsigned seed);
    logic [31:0] s;
    logic [15:0] h;
    s = seed;
    h = 0;
    for (int i = 0; i < 32; i++) begin
      s ^= s << 13; s ^= s >> 17; s ^= s << 5;
      if (k[i]) h ^= s[31:16];
    end
    return (int'(h) * W) >> 16;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int differ = 0;
    foreach (hist[i]) hist[i] = 0;
    for (int n = 0; n < 55000; n++) begin
      key = $urandom;
      #1;
      checks++;
      if (32'(col_a) != ref_col(key, 32'h1234_5679) || col_a >= W) begin
        failures++;
        if (failures < 5) $display("FAIL key %h col %0d exp %0d", key, col_a, ref_col(key, 32'h1234_5679));
      end
      if (col_a < W) hist[col_a]++;
      if (col_a != col_b) differ++;
    end
    foreach (hist[i]) begin
      checks++;
      if (hist[i] < 500 || hist[i] > 2000) begin
        failures++;
        $display("FAIL column %0d count %0d", i, hist[i]);
      end
    end
    checks++;
    if (differ < 50000) begin failures++; $display("FAIL seeds agree too often"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
