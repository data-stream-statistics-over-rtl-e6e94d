// ecm_ca_worker: ECM Worker of the cost-aware architecture, the serial
// engine for bucket levels 2..L of a group of EHs, with their records in
// on-chip memory.
//
// It is the same serial engine as the BackStage (ecm_backstage: New Merge
// FIFO for spills of bucket level 1, Updates FIFO looping a cascade back,
// priority to the cascade), attached to an ecm_level_ram holding NEH*(L-1)
// level records instead of external DRAM. A spill is addressed by the EH's
// index inside this worker's group. With a one-cycle memory a level update
// takes five cycles. 'almost_full' rises when the New Merge FIFO has
// AF_SLACK or fewer free slots, early enough for the tuple source to stop
// before a spill can be lost; 'busy' is high while any work is pending or
// the memory is still being cleared after reset. The worker itself (one
// serial bucket stage, New Merge FIFO, loop-back Updates FIFO) follows the
// published cost-aware design; the cascade priority, FIFO depths and the
// almost-full warning are this design's choices.
module ecm_ca_worker
  import ecm_pkg::*;
#(
  parameter int unsigned NEH      = (ecm_pkg::W + 1) / 2,
  parameter int unsigned NLVL_TOT = ecm_pkg::L,
  parameter int unsigned AF_SLACK = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ts_t         window,
  input  logic        in_valid,
  input  spill_t      in_data,
  output logic        in_ready,
  output logic        almost_full,
  output logic        busy,
  output logic [31:0] n_ops,
  output logic [31:0] n_cascade,
  output logic [31:0] n_drop
);

  localparam int unsigned DEPTH = NEH * (NLVL_TOT - 1);

  logic        req_valid, req_ready, req_we, rsp_valid, bs_busy;
  logic [23:0] req_addr;
  lvl_rec_t    wdata, rdata;

  ecm_backstage #(.NLVL_TOT(NLVL_TOT), .NLVL_FRNT(1), .ADDR_W(24), .AF_SLACK(AF_SLACK)) u_eng (
    .clk, .rst_n, .window, .in_valid, .in_data, .in_ready,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req_we(req_we),
    .mem_req_addr(req_addr), .mem_req_wdata(wdata),
    .mem_rsp_valid(rsp_valid), .mem_rsp_rdata(rdata),
    .almost_full, .busy(bs_busy), .n_ops, .n_cascade, .n_drop
  );

  ecm_level_ram #(.DEPTH(DEPTH), .ADDR_W(24)) u_ram (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata(wdata),
    .rsp_valid, .rsp_rdata(rdata)
  );

  assign busy = bs_busy || !req_ready;

endmodule
