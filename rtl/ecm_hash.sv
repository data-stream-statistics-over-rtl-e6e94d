// ecm_hash: maps a tuple key to one EH column of an ECM sketch row.
//
// The sketch needs one independent hash function per row; the design uses an
// H3 hash: a 16-bit value formed by XOR-ing, for every set key bit i, a fixed
// random 16-bit word Q[i]. The 16-bit value h is reduced to a column by
// multiply-shift, col = (h * W) >> 16, which covers 0..W-1 nearly uniformly
// without a divider. Q is generated at elaboration by a 32-bit xorshift
// generator started from SEED, so each row gets its own function by giving it
// its own seed. The choice of H3 and of the range reduction is this design's;
// the sketch only requires pairwise-independent row hashes.
//
// Interface: key in, col out, purely combinational (no latency).
module ecm_hash #(
  parameter int unsigned KEY_W = ecm_pkg::KEY_W,
  parameter int unsigned W     = ecm_pkg::W,
  parameter int unsigned SEED  = 32'h1234_5679,
  localparam int unsigned COL_W = $clog2(W)
) (
  input  logic [KEY_W-1:0] key,
  output logic [COL_W-1:0] col
);

  typedef logic [KEY_W-1:0][15:0] qmat_t;

  function automatic qmat_t gen_q(int unsigned seed);
    qmat_t q;
    logic [31:0] s;
    s = (seed == 0) ? 32'h9E37_79B9 : seed;
    for (int i = 0; i < KEY_W; i++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
      q[i] = s[31:16];
    end
    return q;
  endfunction

  localparam qmat_t Q = gen_q(SEED);

  logic [15:0]       h;
  logic [16+COL_W:0] prod;

  always_comb begin
    h = '0;
    for (int i = 0; i < KEY_W; i++)
      if (key[i]) h = h ^ Q[i];
    prod = (17+COL_W)'(h) * (17+COL_W)'(W);
    col  = prod[16 +: COL_W];
  end

endmodule
