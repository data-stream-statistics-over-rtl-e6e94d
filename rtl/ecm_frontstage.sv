// ecm_frontstage: the first K bucket levels of a group of EHs, fully
// pipelined.
//
// A tuple that has been hashed to EH 'in_idx' enters level 1 as a new bucket
// of size 1 ending at its arrival time. Each level is an ecm_bucket_level; a
// merge at level j becomes a bucket entering level j+1 two cycles later, so
// the cascading update of one tuple walks down the pipeline while the next
// tuples follow one per cycle. Throughput is therefore one tuple per cycle
// whatever the data. A merge at level K leaves on the spill port for the
// levels kept off chip (the BackStage); with K equal to the total number of
// levels this is a complete fully pipelined sketch row.
//
// Latency: 2 cycles per level, a spill leaves 2*K cycles after its tuple.
module ecm_frontstage
  import ecm_pkg::*;
#(
  parameter int unsigned NEH   = ecm_pkg::W,
  parameter int unsigned NLVL  = ecm_pkg::K,
  parameter int unsigned IDX_W = (NEH > 1) ? $clog2(NEH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              window,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  ts_t              in_now,
  output logic             spill_valid,
  output logic [IDX_W-1:0] spill_idx,
  output ts_t              spill_ts,
  output ts_t              spill_now
);

  logic             v   [NLVL+1];
  logic [IDX_W-1:0] idx [NLVL+1];
  ts_t              ts  [NLVL+1];
  ts_t              now [NLVL+1];

  assign v[0]   = in_valid;
  assign idx[0] = in_idx;
  assign ts[0]  = in_now;
  assign now[0] = in_now;

  for (genvar j = 0; j < NLVL; j++) begin : g_lvl
    ecm_bucket_level #(.NEH(NEH), .IDX_W(IDX_W)) u_lvl (
      .clk, .rst_n, .window,
      .in_valid (v[j]),   .in_idx (idx[j]),   .in_ts (ts[j]),   .in_now (now[j]),
      .out_valid(v[j+1]), .out_idx(idx[j+1]), .out_ts(ts[j+1]), .out_now(now[j+1])
    );
  end

  assign spill_valid = v[NLVL];
  assign spill_idx   = idx[NLVL];
  assign spill_ts    = ts[NLVL];
  assign spill_now   = now[NLVL];

endmodule
