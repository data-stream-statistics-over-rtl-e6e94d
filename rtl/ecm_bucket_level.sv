// ecm_bucket_level: one bucket level of every EH served by a FrontStage.
//
// The level's data for all NEH exponential histograms lives in a memory
// indexed by EH id (one word = count + BPL end timestamps). An arriving
// bucket (a new tuple at level 1, a spill from the level below otherwise)
// makes the stage load the EH's word, run ecm_level_update (expire,
// shift in, merge the two oldest on overflow), store the word back, and hand
// a merged bucket to the next level through the output pipeline register.
//
// Timing: the memory has a registered read port, as a block RAM does, so a
// bucket spends two cycles here (read, then update+write) and a new bucket can
// enter every cycle. A bucket that hits the same EH as the one in the update
// cycle ahead of it takes that one's written word from a forwarding register
// instead of the stale memory output. A valid bit per EH, cleared on reset,
// marks words never written, so the memory itself needs no clearing.
// Holding a level's buckets in one wide word (the structure draws them as
// parallel memories) and the two-cycle stage are this design's choices.
module ecm_bucket_level
  import ecm_pkg::*;
#(
  parameter int unsigned NEH   = ecm_pkg::W,
  parameter int unsigned IDX_W = (NEH > 1) ? $clog2(NEH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              window,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  ts_t              in_ts,
  input  ts_t              in_now,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output ts_t              out_ts,
  output ts_t              out_now
);

  lvl_rec_t mem [NEH];
  logic [NEH-1:0] vld;

  // stage 1: read
  logic             s1_valid;
  logic [IDX_W-1:0] s1_idx;
  ts_t              s1_ts, s1_now;
  lvl_rec_t         s1_rd;
  logic             s1_rd_vld;

  // forwarding register: last word written
  logic             fw_valid;
  logic [IDX_W-1:0] fw_idx;
  lvl_rec_t         fw_rec;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_rd     <= mem[in_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_idx    <= '0;
      s1_ts     <= '0;
      s1_now    <= '0;
      s1_rd_vld <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_idx    <= in_idx;
        s1_ts     <= in_ts;
        s1_now    <= in_now;
        s1_rd_vld <= vld[in_idx];
      end
    end
  end

  // stage 2: update and write back
  lvl_rec_t    cur;
  lvl_result_t res;

  always_comb begin
    if (fw_valid && fw_idx == s1_idx) cur = fw_rec;
    else if (s1_rd_vld)               cur = s1_rd;
    else                              cur = '0;
  end

  ecm_level_update u_upd (.cur, .new_ts(s1_ts), .now(s1_now), .window, .res);

  always_ff @(posedge clk) begin
    if (s1_valid) mem[s1_idx] <= res.rec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld       <= '0;
      fw_valid  <= 1'b0;
      fw_idx    <= '0;
      fw_rec    <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_ts    <= '0;
      out_now   <= '0;
    end else begin
      fw_valid  <= s1_valid;
      out_valid <= s1_valid && res.spill;
      if (s1_valid) begin
        vld[s1_idx] <= 1'b1;
        fw_idx      <= s1_idx;
        fw_rec      <= res.rec;
        out_idx     <= s1_idx;
        out_ts      <= res.spill_ts;
        out_now     <= s1_now;
      end
    end
  end

endmodule
