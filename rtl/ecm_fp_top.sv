// ecm_fp_top: fully pipelined ECM-sketch updater: per row a hash and all L
// bucket levels as a linear pipeline, one tuple per cycle guaranteed.
//
// Each of the D rows is an ecm_hash followed by an ecm_frontstage holding
// all L levels of its W EHs (one block-RAM memory per level, indexed by the
// EH's column). A tuple enters level 1 of one EH per row; a cascade walks up
// the pipeline two cycles per level while the next tuples follow, so no
// input can ever be refused and there is no ready signal. The price is one
// memory per level and row, sized for the rare worst case. A merge leaving
// level L has no place to go; it is counted in n_drop (the level count is
// chosen so that the window expires buckets before that). Defaults: W=55,
// D=3, L=20. The structure (a row = hash + linear pipeline of L levels, each
// level one memory indexed by the EH's column) is the fully pipelined
// architecture as published; the hash, the two-cycle level timing and the
// drop counter are this design's choices.
module ecm_fp_top
  import ecm_pkg::*;
#(
  parameter int unsigned NW = ecm_pkg::W,
  parameter int unsigned ND = ecm_pkg::D,
  parameter int unsigned NL = ecm_pkg::L,
  localparam int unsigned COL_W = $clog2(NW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              window,
  input  logic             in_valid,
  input  logic [KEY_W-1:0] in_key,
  input  ts_t              in_now,
  output logic [31:0]      n_drop
);

  logic [ND-1:0] drop;

  for (genvar r = 0; r < ND; r++) begin : g_row
    logic [COL_W-1:0] col, sidx;
    ts_t              sts, snow;

    ecm_hash #(.KEY_W(KEY_W), .W(NW), .SEED(32'h1234_5679 + r * 32'h9E37_79B9)) u_hash (
      .key(in_key), .col
    );

    ecm_frontstage #(.NEH(NW), .NLVL(NL), .IDX_W(COL_W)) u_row (
      .clk, .rst_n, .window, .in_valid, .in_idx(col), .in_now,
      .spill_valid(drop[r]), .spill_idx(sidx), .spill_ts(sts), .spill_now(snow)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_drop <= '0;
    else        n_drop <= n_drop + 32'($countones(drop));
  end

endmodule
