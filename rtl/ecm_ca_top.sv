// ecm_ca_top: cost-aware ECM-sketch updater: per row a hash, bucket level 1
// fully pipelined in block RAM, and NWK serial ECM Workers for levels 2..L.
//
// Most insertions stop at level 1 or 2, so instead of a pipeline stage per
// level each row keeps only level 1 as a pipeline stage (ecm_bucket_level)
// and hands the rarer spills to serial workers (ecm_ca_worker), which walk
// the cascade level by level in their own memory. Several workers per row
// add processing bandwidth without adding memory: each worker owns the EHs
// whose column index is congruent to its number modulo NWK (the column is
// split as col mod NWK -> worker, col div NWK -> EH inside the worker).
//
// Interface: one tuple (key, timestamp) per cycle under in_valid/in_ready.
// in_ready drops when any worker's New Merge FIFO is nearly full, so the
// throughput is one tuple per cycle until a burst of cascades overloads a
// worker. Defaults are the evaluated configuration: two workers per row
// (six in all), W=55, D=3, L=20 levels. Splitting the EHs among the
// workers by column is this design's choice.
module ecm_ca_top
  import ecm_pkg::*;
#(
  parameter int unsigned NW  = ecm_pkg::W,
  parameter int unsigned ND  = ecm_pkg::D,
  parameter int unsigned NL  = ecm_pkg::L,
  parameter int unsigned NWK = 2,
  localparam int unsigned COL_W = $clog2(NW),
  localparam int unsigned NP    = ND * NWK
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              window,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [KEY_W-1:0] in_key,
  input  ts_t              in_now,
  output logic             busy,
  output logic [31:0]      n_ops     [NP],
  output logic [31:0]      n_cascade [NP],
  output logic [31:0]      n_drop    [NP]
);

  localparam int unsigned WK_NEH = (NW + NWK - 1) / NWK;

  logic [NP-1:0] af, wk_busy, wk_ready;

  assign in_ready = !(|af);
  assign busy     = |wk_busy;

  for (genvar r = 0; r < ND; r++) begin : g_row
    logic [COL_W-1:0] col, sidx;
    logic             sv;
    ts_t              sts, snow;

    ecm_hash #(.KEY_W(KEY_W), .W(NW), .SEED(32'h1234_5679 + r * 32'h9E37_79B9)) u_hash (
      .key(in_key), .col
    );

    ecm_bucket_level #(.NEH(NW), .IDX_W(COL_W)) u_bl1 (
      .clk, .rst_n, .window,
      .in_valid(in_valid && in_ready), .in_idx(col), .in_ts(in_now), .in_now,
      .out_valid(sv), .out_idx(sidx), .out_ts(sts), .out_now(snow)
    );

    for (genvar k = 0; k < NWK; k++) begin : g_wk
      spill_t d;
      logic   v;
      always_comb begin
        d.gid = 16'(32'(sidx) / NWK);
        d.lvl = 6'd2;
        d.ts  = sts;
        d.now = snow;
        v     = sv && (32'(sidx) % NWK == k);
      end

      ecm_ca_worker #(.NEH(WK_NEH), .NLVL_TOT(NL), .AF_SLACK(3)) u_wk (
        .clk, .rst_n, .window, .in_valid(v), .in_data(d), .in_ready(wk_ready[r*NWK+k]),
        .almost_full(af[r*NWK+k]), .busy(wk_busy[r*NWK+k]),
        .n_ops(n_ops[r*NWK+k]), .n_cascade(n_cascade[r*NWK+k]), .n_drop(n_drop[r*NWK+k])
      );

      a_no_loss: assert property (@(posedge clk) disable iff (!rst_n) v |-> wk_ready[r*NWK+k]);
    end
  end

endmodule
