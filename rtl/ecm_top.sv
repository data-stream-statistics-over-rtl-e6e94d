// ecm_top: the four ECM-sketch updater architectures side by side, each
// with its own ports (prefix mt_, fp_, ca_, hy_) and a shared clock and reset.
//
//  - mt_: multi-tuple architecture (ecm_mt_top), the main design: three
//    tuples per cycle, nine FrontStages with escape paths for heavy hitters,
//    one BackStage working on external memory. Its memory port is brought
//    out; the memory itself (DRAM and its controller) is not part of the RTL.
//  - fp_: fully pipelined architecture (ecm_fp_top): one tuple per cycle,
//    every bucket level of every row a pipeline stage, never stalls.
//  - ca_: cost-aware architecture (ecm_ca_top): one tuple per cycle, level 1
//    pipelined, levels 2..L in two serial workers per row with on-chip
//    memory; stalls only under bursts of cascades.
//  - hy_: hybrid architecture (ecm_hybrid_top): one tuple per cycle, K=5
//    levels pipelined per row, levels 6..L in one BackStage over external
//    memory, whose port is brought out like the mt_ one.
//
// The four do not share state or ports; each has its own window input.
// Bringing all four out in one top is this design's choice: the
// multi-tuple design builds on the other three, which are also complete
// updaters in their own right. All parameters are at their defaults
// (W=55 EHs per row, D=3 rows, L=20 levels, K=5 on-chip levels, T=3).
module ecm_top
  import ecm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,

  // multi-tuple updater
  input  ts_t               mt_window,
  input  logic              mt_in_valid,
  output logic              mt_in_ready,
  input  logic [T-1:0]      mt_tup_valid,
  input  logic [KEY_W-1:0]  mt_tup_key [T],
  input  ts_t               mt_tup_now [T],
  output logic              mt_mem_req_valid,
  input  logic              mt_mem_req_ready,
  output logic              mt_mem_req_we,
  output logic [23:0]       mt_mem_req_addr,
  output lvl_rec_t          mt_mem_req_wdata,
  input  logic              mt_mem_rsp_valid,
  input  lvl_rec_t          mt_mem_rsp_rdata,
  output logic [T*D-1:0]    mt_esc_en,
  output logic [31:0]       mt_n_esc    [T*D],
  output logic [31:0]       mt_n_stall  [T*D],
  output logic [31:0]       mt_n_assign [T*D],
  output logic              mt_bs_busy,
  output logic [31:0]       mt_bs_ops,
  output logic [31:0]       mt_bs_cascade,
  output logic [31:0]       mt_bs_drop,

  // fully pipelined updater
  input  ts_t               fp_window,
  input  logic              fp_in_valid,
  input  logic [KEY_W-1:0]  fp_in_key,
  input  ts_t               fp_in_now,
  output logic [31:0]       fp_n_drop,

  // cost-aware updater
  input  ts_t               ca_window,
  input  logic              ca_in_valid,
  output logic              ca_in_ready,
  input  logic [KEY_W-1:0]  ca_in_key,
  input  ts_t               ca_in_now,
  output logic              ca_busy,
  output logic [31:0]       ca_n_ops     [2*D],
  output logic [31:0]       ca_n_cascade [2*D],
  output logic [31:0]       ca_n_drop    [2*D],

  // hybrid updater
  input  ts_t               hy_window,
  input  logic              hy_in_valid,
  output logic              hy_in_ready,
  input  logic [KEY_W-1:0]  hy_in_key,
  input  ts_t               hy_in_now,
  output logic              hy_mem_req_valid,
  input  logic              hy_mem_req_ready,
  output logic              hy_mem_req_we,
  output logic [23:0]       hy_mem_req_addr,
  output lvl_rec_t          hy_mem_req_wdata,
  input  logic              hy_mem_rsp_valid,
  input  lvl_rec_t          hy_mem_rsp_rdata,
  output logic [31:0]       hy_n_stall,
  output logic              hy_bs_busy,
  output logic [31:0]       hy_bs_ops,
  output logic [31:0]       hy_bs_cascade,
  output logic [31:0]       hy_bs_drop
);

  ecm_mt_top u_mt (
    .clk, .rst_n, .window(mt_window),
    .in_valid(mt_in_valid), .in_ready(mt_in_ready), .tup_valid(mt_tup_valid),
    .tup_key(mt_tup_key), .tup_now(mt_tup_now),
    .mem_req_valid(mt_mem_req_valid), .mem_req_ready(mt_mem_req_ready),
    .mem_req_we(mt_mem_req_we), .mem_req_addr(mt_mem_req_addr),
    .mem_req_wdata(mt_mem_req_wdata), .mem_rsp_valid(mt_mem_rsp_valid),
    .mem_rsp_rdata(mt_mem_rsp_rdata),
    .esc_en(mt_esc_en), .n_esc(mt_n_esc), .n_stall(mt_n_stall), .n_assign(mt_n_assign),
    .bs_busy(mt_bs_busy), .bs_ops(mt_bs_ops), .bs_cascade(mt_bs_cascade), .bs_drop(mt_bs_drop)
  );

  ecm_fp_top u_fp (
    .clk, .rst_n, .window(fp_window),
    .in_valid(fp_in_valid), .in_key(fp_in_key), .in_now(fp_in_now), .n_drop(fp_n_drop)
  );

  ecm_ca_top u_ca (
    .clk, .rst_n, .window(ca_window),
    .in_valid(ca_in_valid), .in_ready(ca_in_ready), .in_key(ca_in_key), .in_now(ca_in_now),
    .busy(ca_busy), .n_ops(ca_n_ops), .n_cascade(ca_n_cascade), .n_drop(ca_n_drop)
  );

  ecm_hybrid_top u_hy (
    .clk, .rst_n, .window(hy_window),
    .in_valid(hy_in_valid), .in_ready(hy_in_ready), .in_key(hy_in_key), .in_now(hy_in_now),
    .mem_req_valid(hy_mem_req_valid), .mem_req_ready(hy_mem_req_ready),
    .mem_req_we(hy_mem_req_we), .mem_req_addr(hy_mem_req_addr),
    .mem_req_wdata(hy_mem_req_wdata), .mem_rsp_valid(hy_mem_rsp_valid),
    .mem_rsp_rdata(hy_mem_rsp_rdata),
    .n_stall(hy_n_stall), .bs_busy(hy_bs_busy), .bs_ops(hy_bs_ops),
    .bs_cascade(hy_bs_cascade), .bs_drop(hy_bs_drop)
  );

endmodule
