// ecm_level_update: the update of one exponential-histogram level, the step
// that every bucket-level engine of the design repeats (pipelined bucket
// levels, the register-based escape EH and the serial workers).
//
// Input is the level's record (count + end times, newest first), the end
// time of the arriving bucket, the arrival time of the tuple that caused it
// and the window length. Output is the new record and, when the level
// overflowed, the bucket that moves up:
//   1. expire: every bucket whose end time is a full window old or more
//      (now - ts >= window, modulo 2^TS_W) is dropped; since the list is
//      time ordered, expired buckets are always a tail of it;
//   2. insert: the arriving bucket is shifted in at the newest end;
//   3. merge: if the level now holds BPL+1 buckets, the two oldest are
//      replaced by one bucket of twice the size that ends where the newer of
//      the two ended; that bucket is the spill to the next level.
// Dropping every expired bucket of the touched level (rather than one) is
// this design's choice. Purely combinational.
module ecm_level_update
  import ecm_pkg::*;
(
  input  lvl_rec_t    cur,
  input  ts_t         new_ts,
  input  ts_t         now,
  input  ts_t         window,
  output lvl_result_t res
);

  logic [CNT_W-1:0] live;

  always_comb begin
    live = '0;
    // expired buckets form the oldest tail of the list
    for (int i = 0; i < BPL; i++) begin
      if (CNT_W'(i) < cur.cnt && ts_live(cur.ts[i], now, window))
        live = CNT_W'(i + 1);
    end
    res.rec.ts[0] = new_ts;
    for (int i = 1; i < BPL; i++) res.rec.ts[i] = cur.ts[i-1];
    res.spill    = 1'b0;
    res.spill_ts = '0;
    if (live == CNT_W'(BPL)) begin
      // BPL+1 buckets: merge cur.ts[BPL-1] (oldest) with cur.ts[BPL-2]
      res.spill    = 1'b1;
      res.spill_ts = cur.ts[BPL-2];
      res.rec.cnt  = CNT_W'(BPL - 1);
    end else begin
      res.rec.cnt  = live + 1'b1;
    end
    // clear unused slots so the record is canonical
    for (int i = 0; i < BPL; i++)
      if (CNT_W'(i) >= res.rec.cnt) res.rec.ts[i] = '0;
  end

endmodule
