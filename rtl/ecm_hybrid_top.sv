// ecm_hybrid_top: hybrid ECM-sketch updater: per row a hash and the first K
// bucket levels fully pipelined on chip (FrontStage), and one serial
// BackStage keeping levels K+1..L of every EH in external memory.
//
// One tuple per cycle enters all D rows. Each row's FrontStage (ecm_frontstage
// with NK levels) absorbs most of the work; a merge leaving level K becomes a
// spill for global EH row*W+col, level K+1, and waits in the row's spill
// queue. A round-robin arbiter (ecm_spill_arb) passes the spills to the
// BackStage (ecm_backstage), which walks each cascade through memory word
// gid*(L-K) + (level-K-1), as in the multi-tuple design. Because the
// BackStage is slow, the input is stopped (in_ready low) while any spill
// queue has fewer free slots than the spills the pipeline may still produce
// (one per level stage, 2*NK+2), so no spill is ever lost.
//
// Interface: tuples under in_valid/in_ready; the external memory port of the
// BackStage is brought out (request valid/ready, write enable, word address,
// write data; in-order read response). Spill queue depth and the stall rule
// are this design's choices; the split into K on-chip levels and a
// memory-backed worker for the rest follows the hybrid architecture.
module ecm_hybrid_top
  import ecm_pkg::*;
#(
  parameter int unsigned NW      = ecm_pkg::W,
  parameter int unsigned ND      = ecm_pkg::D,
  parameter int unsigned NK      = ecm_pkg::K,
  parameter int unsigned NL      = ecm_pkg::L,
  parameter int unsigned ADDR_W  = 24,
  parameter int unsigned S_DEPTH = 32,
  localparam int unsigned COL_W  = $clog2(NW)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ts_t               window,
  // tuples
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [KEY_W-1:0]  in_key,
  input  ts_t               in_now,
  // external memory for levels K+1..L
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output lvl_rec_t          mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  lvl_rec_t          mem_rsp_rdata,
  // status
  output logic [31:0]       n_stall,   // cycles the input was stopped
  output logic              bs_busy,
  output logic [31:0]       bs_ops,
  output logic [31:0]       bs_cascade,
  output logic [31:0]       bs_drop
);

  localparam int unsigned SCW = $clog2(S_DEPTH + 1);

  logic [ND-1:0] room, sq_valid, sq_ready;
  spill_t        sq_data [ND];

  assign in_ready = &room;

  for (genvar r = 0; r < ND; r++) begin : g_row
    logic [COL_W-1:0] col, sidx;
    logic             sv;
    ts_t              sts, snow;
    spill_t           push [1];
    spill_t           head [1];
    logic [SCW-1:0]   s_count, s_free;

    ecm_hash #(.KEY_W(KEY_W), .W(NW), .SEED(32'h1234_5679 + r * 32'h9E37_79B9)) u_hash (
      .key(in_key), .col
    );

    ecm_frontstage #(.NEH(NW), .NLVL(NK), .IDX_W(COL_W)) u_fs (
      .clk, .rst_n, .window, .in_valid(in_valid && in_ready), .in_idx(col), .in_now,
      .spill_valid(sv), .spill_idx(sidx), .spill_ts(sts), .spill_now(snow)
    );

    always_comb begin
      push[0].gid = 16'(r * NW) + 16'(sidx);
      push[0].lvl = 6'(NK + 1);
      push[0].ts  = sts;
      push[0].now = snow;
    end

    ecm_queue #(.E(spill_t), .DEPTH(S_DEPTH), .NPUSH(1), .NPOP(1)) u_sq (
      .clk, .rst_n, .push_valid(sv), .push_data(push),
      .pop_n(sq_valid[r] && sq_ready[r]), .head, .count(s_count), .free(s_free)
    );

    assign room[r]     = s_free >= SCW'(2 * NK + 2);
    assign sq_valid[r] = s_count != '0;
    assign sq_data[r]  = head[0];
  end

  logic   bs_valid, bs_ready;
  spill_t bs_data;

  ecm_spill_arb #(.N(ND)) u_arb (
    .clk, .rst_n, .in_valid(sq_valid), .in_data(sq_data), .in_ready(sq_ready),
    .out_valid(bs_valid), .out_data(bs_data), .out_ready(bs_ready)
  );

  ecm_backstage #(.NLVL_TOT(NL), .NLVL_FRNT(NK), .ADDR_W(ADDR_W)) u_bs (
    .clk, .rst_n, .window,
    .in_valid(bs_valid), .in_data(bs_data), .in_ready(bs_ready),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata,
    .almost_full(), .busy(bs_busy), .n_ops(bs_ops), .n_cascade(bs_cascade), .n_drop(bs_drop)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     n_stall <= '0;
    else if (in_valid && !in_ready) n_stall <= n_stall + 1'b1;
  end

endmodule
