// ecm_backstage: the serial worker that owns bucket levels K+1..L of every
// EH, with their records in external memory (DRAM).
//
// Spills from the FrontStages arrive on a valid/ready port into the New Merge
// FIFO. The worker takes one bucket at a time, preferring the Updates FIFO,
// which holds the next step of a cascade it is working on, over new merges.
// For a bucket entering level 'lvl' of EH 'gid' it reads memory word
// gid*(L-K) + (lvl-K-1), runs ecm_level_update on it, writes the word
// back and, if the level overflowed, queues the merged bucket for level lvl+1
// in the Updates FIFO. A merge out of the last level L is dropped and counted
// (n_drop); the level count is chosen so that this does not happen.
//
// Memory port: a request (valid/ready, write enable, word address, write
// data) and a read response (valid, data). One request is outstanding at a
// time and the memory must answer reads in order; the memory is expected to
// hold zeros (all levels empty) at start. A bucket costs one read and one
// write, i.e. 2 + read latency cycles at least, so the BackStage relies on
// spills being rare; the FIFOs absorb bursts and in_ready back-pressures the
// FrontStages when the New Merge FIFO is full; almost_full warns AF_SLACK
// entries earlier, for a source that cannot stop at once. FIFO depths and
// the priority rule are this design's choices.
module ecm_backstage
  import ecm_pkg::*;
#(
  parameter int unsigned NLVL_TOT  = ecm_pkg::L,
  parameter int unsigned NLVL_FRNT = ecm_pkg::K,
  parameter int unsigned ADDR_W    = 24,
  parameter int unsigned NMF_DEPTH = 16,
  parameter int unsigned UPD_DEPTH = 2,
  parameter int unsigned AF_SLACK  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ts_t               window,
  input  logic              in_valid,
  input  spill_t            in_data,
  output logic              in_ready,
  // external memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output lvl_rec_t          mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  lvl_rec_t          mem_rsp_rdata,
  // status
  output logic              almost_full, // New Merge FIFO has AF_SLACK or fewer free slots
  output logic              busy,
  output logic [31:0]       n_ops,      // level updates performed
  output logic [31:0]       n_cascade,  // of which taken from the Updates FIFO
  output logic [31:0]       n_drop      // merges out of the last level
);

  localparam int unsigned NB = NLVL_TOT - NLVL_FRNT;  // levels held here

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WAIT, S_WR} state_t;
  state_t state;

  // FIFOs
  localparam int unsigned NCW = $clog2(NMF_DEPTH + 1);
  localparam int unsigned UCW = $clog2(UPD_DEPTH + 1);
  spill_t         nmf_head [1], upd_head [1], nmf_push [1], upd_push [1];
  logic [NCW-1:0] nmf_count, nmf_free;
  logic [UCW-1:0] upd_count, upd_free;
  logic           nmf_pop, upd_pop, upd_pv;

  assign in_ready    = nmf_free != '0;
  assign almost_full = 32'(nmf_free) <= AF_SLACK;
  assign nmf_push[0] = in_data;

  ecm_queue #(.E(spill_t), .DEPTH(NMF_DEPTH), .NPUSH(1), .NPOP(1)) u_nmf (
    .clk, .rst_n, .push_valid(in_valid && in_ready), .push_data(nmf_push),
    .pop_n(nmf_pop), .head(nmf_head), .count(nmf_count), .free(nmf_free)
  );

  ecm_queue #(.E(spill_t), .DEPTH(UPD_DEPTH), .NPUSH(1), .NPOP(1)) u_upd (
    .clk, .rst_n, .push_valid(upd_pv), .push_data(upd_push),
    .pop_n(upd_pop), .head(upd_head), .count(upd_count), .free(upd_free)
  );

  // current bucket and its updated level record
  spill_t      cur;
  lvl_result_t res, upd;   // registered and combinational result

  ecm_level_update u_lvl (.cur(mem_rsp_rdata), .new_ts(cur.ts), .now(cur.now), .window, .res(upd));

  assign upd_pop = (state == S_IDLE) && upd_count != '0;
  assign nmf_pop = (state == S_IDLE) && upd_count == '0 && nmf_count != '0;

  assign mem_req_valid = (state == S_RD) || (state == S_WR);
  assign mem_req_we    = (state == S_WR);
  assign mem_req_addr  = ADDR_W'(32'(cur.gid) * NB + 32'(cur.lvl) - NLVL_FRNT - 1);
  assign mem_req_wdata = res.rec;
  assign busy          = (state != S_IDLE) || nmf_count != '0 || upd_count != '0;

  always_comb begin
    upd_push[0]     = cur;
    upd_push[0].lvl = cur.lvl + 1'b1;
    upd_push[0].ts  = res.spill_ts;
    upd_pv = (state == S_WR) && mem_req_ready && res.spill &&
             32'(cur.lvl) < NLVL_TOT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      res       <= '0;
      n_ops     <= '0;
      n_cascade <= '0;
      n_drop    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (upd_pop) begin
            cur       <= upd_head[0];
            n_cascade <= n_cascade + 1;
            state     <= S_RD;
          end else if (nmf_pop) begin
            cur   <= nmf_head[0];
            state <= S_RD;
          end
        end
        S_RD:   if (mem_req_ready) state <= S_WAIT;
        S_WAIT: if (mem_rsp_valid) begin
          res   <= upd;
          state <= S_WR;
        end
        S_WR:   if (mem_req_ready) begin
          n_ops <= n_ops + 1;
          if (res.spill && 32'(cur.lvl) >= NLVL_TOT) n_drop <= n_drop + 1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_upd_room: assert property (@(posedge clk) disable iff (!rst_n)
                               upd_pv |-> upd_free != '0);

endmodule
