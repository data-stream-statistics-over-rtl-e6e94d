// ecm_extra_eh: the escape path of a FrontStage, the first K bucket levels
// of one single EH held in flip-flops instead of block RAM.
//
// When one EH receives more updates than its FrontStage pipeline can take,
// its updates are split between the main pipeline and this structure, which
// keeps a second sub-EH for the same key group; a query adds the two. Level j
// is one register stage: an arriving bucket updates the level's record with
// ecm_level_update in the same cycle, and a merge is registered and
// applied to level j+1 in the next cycle. One tuple per cycle, spill latency
// K cycles. 'last_now' is the time of the newest tuple recorded, which tells
// when every bucket held here has expired. 'clear' empties all levels.
module ecm_extra_eh
  import ecm_pkg::*;
#(
  parameter int unsigned NLVL = ecm_pkg::K
) (
  input  logic clk,
  input  logic rst_n,
  input  ts_t  window,
  input  logic clear,
  input  logic in_valid,
  input  ts_t  in_now,
  output logic spill_valid,
  output ts_t  spill_ts,
  output ts_t  spill_now,
  output ts_t  last_now
);

  lvl_rec_t    rec [NLVL];
  lvl_result_t res [NLVL];
  logic        v   [NLVL+1];
  ts_t         ts  [NLVL+1];
  ts_t         now [NLVL+1];

  assign v[0]   = in_valid;
  assign ts[0]  = in_now;
  assign now[0] = in_now;

  for (genvar j = 0; j < NLVL; j++) begin : g_lvl
    ecm_level_update u_upd (.cur(rec[j]), .new_ts(ts[j]), .now(now[j]), .window, .res(res[j]));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rec[j] <= '0;
        v[j+1] <= 1'b0;
        ts[j+1] <= '0;
        now[j+1] <= '0;
      end else begin
        v[j+1] <= v[j] && res[j].spill;
        if (v[j]) begin
          ts[j+1]  <= res[j].spill_ts;
          now[j+1] <= now[j];
        end
        if (clear)     rec[j] <= '0;
        else if (v[j]) rec[j] <= res[j].rec;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        last_now <= '0;
    else if (in_valid) last_now <= in_now;
  end

  assign spill_valid = v[NLVL];
  assign spill_ts    = ts[NLVL];
  assign spill_now   = now[NLVL];

endmodule
