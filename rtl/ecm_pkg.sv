// ecm_pkg: shared constants and types of the ECM-sketch updater.
//
// An ECM sketch is D rows of W exponential histograms. Each EH keeps its
// buckets in levels: level j holds buckets of size 2^(j-1), at most BPL of
// them. A level record stores a count and the end timestamps of its buckets,
// newest first (ts[0] is the newest). The bucket size is implied by the level,
// and a bucket's start is the end of the next-older bucket, so end times are
// all that is stored.
//
// The update of one level record (expire, insert, merge) is the module
// ecm_level_update; ts_live() below is its expiry test.
//
// The sizes (W=55, D=3, k=11, K=5 front levels, T=3 tuples per cycle) are
// the evaluated configuration; BPL=1+ceil(1/(2*eps))=11 for eps=0.05 and
// L=ceil(log2(2N/k))+1=20 for a window of N=2,000,000 time units. Timestamp
// and key widths (32 bits) are this design's choice.
package ecm_pkg;

  // sketch geometry (evaluated configuration)
  localparam int unsigned W      = 55;   // EHs per row
  localparam int unsigned D      = 3;    // rows (hash functions)
  localparam int unsigned K_EH   = 11;   // k = ceil(1/eps)
  localparam int unsigned BPL    = 11;   // max buckets per level = 1+ceil(1/(2 eps))
  localparam int unsigned L      = 20;   // bucket levels per EH
  localparam int unsigned K      = 5;    // levels mapped on chip (FrontStage)
  localparam int unsigned T      = 3;    // tuples accepted per cycle

  localparam int unsigned TS_W   = 32;   // timestamp width
  localparam int unsigned KEY_W  = 32;   // key width (e.g. an IPv4 address)
  localparam int unsigned CNT_W  = $clog2(BPL + 1);

  typedef logic [TS_W-1:0] ts_t;

  // one level of one EH
  typedef struct packed {
    logic [CNT_W-1:0]         cnt;
    logic [BPL-1:0][TS_W-1:0] ts;   // ts[0] newest; entries >= cnt unused
  } lvl_rec_t;

  localparam int unsigned REC_W = $bits(lvl_rec_t);

  typedef struct packed {
    lvl_rec_t rec;       // updated level record
    logic     spill;     // a merged bucket leaves for the next level
    ts_t      spill_ts;  // end time of the merged bucket
  } lvl_result_t;

  // a bucket still overlaps the window ending at 'now'
  function automatic logic ts_live(ts_t ts, ts_t now, ts_t window);
    ts_t age;
    age = now - ts;
    return age < window;
  endfunction

  // entry in a FrontStage input queue
  typedef struct packed {
    logic [5:0] idx;   // local EH index inside the FrontStage (W/T < 64)
    ts_t        now;   // tuple time
  } fs_req_t;

  // spill travelling from a FrontStage to the BackStage
  typedef struct packed {
    logic [15:0] gid;  // global EH id: row*W+col, or D*W+fs for an escape EH
    logic [5:0]  lvl;  // level the bucket enters (K+1 .. L)
    ts_t         ts;   // end time of the bucket
    ts_t         now;  // tuple time
  } spill_t;

endpackage
