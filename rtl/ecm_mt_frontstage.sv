// ecm_mt_frontstage: one FrontStage of the multi-tuple architecture, with its
// input queue, heavy-hitter escape path and spill queue.
//
// The interconnect pushes up to T requests per cycle (EH index + tuple time)
// into the input queue. Each cycle the steering logic takes the oldest entry
// to the main FrontStage pipeline (ecm_frontstage, K block-RAM levels of the
// LOCAL_NEH EHs mapped here). When ecm_hh_detect has enabled the escape path
// for EH 'owner', a second entry can leave in the same cycle: of the two
// oldest entries, one that belongs to the owner goes to the escape structure
// (ecm_extra_eh) and the other to the main pipeline, so a burst of one key
// is served two per cycle and its updates are split between two sub-EHs.
// Spills leaving level K of either structure (up to two per cycle) enter the
// spill queue, which feeds the BackStage through a valid/ready port. Entries
// are tagged with a global EH id: ROW*W + local*T + LANE for the main EHs
// (the column of a row is spread over T FrontStages by column mod T) and
// ESC_GID for the escape EH, whose upper levels the BackStage keeps apart.
//
// Stall: the input queue is not served while the spill queue has fewer free
// slots than spills still possible from the pipelines (3K+2), so no spill is
// ever lost. The queue depths and this rule are this design's choices.
module ecm_mt_frontstage
  import ecm_pkg::*;
#(
  parameter int unsigned LOCAL_NEH = (ecm_pkg::W + ecm_pkg::T - 1) / ecm_pkg::T,
  parameter int unsigned ROW       = 0,
  parameter int unsigned LANE      = 0,
  parameter int unsigned ESC_GID   = ecm_pkg::D * ecm_pkg::W,
  parameter int unsigned NLVL      = ecm_pkg::K,
  parameter int unsigned NPUSH     = ecm_pkg::T,
  parameter int unsigned Q_DEPTH   = 16,
  parameter int unsigned S_DEPTH   = 32,
  parameter int unsigned HH_ON     = 12,
  parameter int unsigned HH_OFF    = 4,
  localparam int unsigned IDX_W    = (LOCAL_NEH > 1) ? $clog2(LOCAL_NEH) : 1,
  localparam int unsigned QCW      = $clog2(Q_DEPTH + 1),
  localparam int unsigned SCW      = $clog2(S_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              window,
  // from the interconnect
  input  logic [NPUSH-1:0] push_valid,
  input  fs_req_t          push_data [NPUSH],
  output logic [QCW-1:0]   q_free,
  // to the BackStage arbiter
  output logic             out_valid,
  output spill_t           out_data,
  input  logic             out_ready,
  // status
  output logic             esc_en,
  output logic [31:0]      n_esc,      // tuples recorded by the escape EH
  output logic [31:0]      n_stall,    // cycles the queue was held by the spill queue
  output logic [31:0]      n_assign    // heavy hitters assigned to the escape EH
);

  // ---------------- input queue
  fs_req_t        head [2];
  logic [QCW-1:0] q_count;
  logic [1:0]     pop_n;

  ecm_queue #(.E(fs_req_t), .DEPTH(Q_DEPTH), .NPUSH(NPUSH), .NPOP(2)) u_inq (
    .clk, .rst_n, .push_valid, .push_data, .pop_n,
    .head, .count(q_count), .free(q_free)
  );

  // ---------------- heavy-hitter detection
  logic             owner_valid, clear_extra;
  logic [IDX_W-1:0] owner;
  ts_t              extra_last;

  ecm_hh_detect #(.CW(QCW), .IDX_W(IDX_W), .HH_ON(HH_ON), .HH_OFF(HH_OFF)) u_hh (
    .clk, .rst_n, .window, .now(head[0].now), .q_count,
    .head_idx(IDX_W'(head[0].idx)), .extra_last,
    .esc_en, .owner_valid, .owner, .clear_extra, .n_assign
  );

  // ---------------- spill queue state
  logic [SCW-1:0] s_count, s_free;
  logic           hold;

  assign hold = s_free < SCW'(3 * NLVL + 2);

  // ---------------- steering
  logic             main_v, extra_v;
  logic [IDX_W-1:0] main_idx;
  ts_t              main_now, extra_now;

  always_comb begin
    logic h0_own, h1_own, two;
    h0_own    = owner_valid && IDX_W'(head[0].idx) == owner;
    h1_own    = owner_valid && IDX_W'(head[1].idx) == owner;
    two       = esc_en && q_count >= QCW'(2) && !clear_extra;
    main_v    = 1'b0;
    extra_v   = 1'b0;
    main_idx  = IDX_W'(head[0].idx);
    main_now  = head[0].now;
    extra_now = head[1].now;
    pop_n     = 2'd0;
    if (!hold && q_count != '0) begin
      if (two && h1_own) begin
        main_v  = 1'b1;
        extra_v = 1'b1;
        pop_n   = 2'd2;
      end else if (two && h0_own) begin
        extra_v   = 1'b1;
        extra_now = head[0].now;
        main_v    = 1'b1;
        main_idx  = IDX_W'(head[1].idx);
        main_now  = head[1].now;
        pop_n     = 2'd2;
      end else begin
        main_v = 1'b1;
        pop_n  = 2'd1;
      end
    end
  end

  // ---------------- main pipeline and escape EH
  logic             m_sv, x_sv;
  logic [IDX_W-1:0] m_sidx;
  ts_t              m_sts, m_snow, x_sts, x_snow;

  ecm_frontstage #(.NEH(LOCAL_NEH), .NLVL(NLVL), .IDX_W(IDX_W)) u_main (
    .clk, .rst_n, .window,
    .in_valid(main_v), .in_idx(main_idx), .in_now(main_now),
    .spill_valid(m_sv), .spill_idx(m_sidx), .spill_ts(m_sts), .spill_now(m_snow)
  );

  ecm_extra_eh #(.NLVL(NLVL)) u_extra (
    .clk, .rst_n, .window, .clear(clear_extra),
    .in_valid(extra_v), .in_now(extra_now),
    .spill_valid(x_sv), .spill_ts(x_sts), .spill_now(x_snow), .last_now(extra_last)
  );

  // ---------------- spill queue
  spill_t s_push [2];
  spill_t s_head [1];
  logic   s_pop;

  always_comb begin
    s_push[0].gid = 16'(ROW * W + LANE) + 16'(m_sidx) * 16'(T);
    s_push[0].lvl = 6'(NLVL + 1);
    s_push[0].ts  = m_sts;
    s_push[0].now = m_snow;
    s_push[1].gid = 16'(ESC_GID);
    s_push[1].lvl = 6'(NLVL + 1);
    s_push[1].ts  = x_sts;
    s_push[1].now = x_snow;
  end

  assign out_valid = s_count != '0;
  assign out_data  = s_head[0];
  assign s_pop     = out_valid && out_ready;

  ecm_queue #(.E(spill_t), .DEPTH(S_DEPTH), .NPUSH(2), .NPOP(1)) u_sq (
    .clk, .rst_n, .push_valid({x_sv, m_sv}), .push_data(s_push), .pop_n(s_pop),
    .head(s_head), .count(s_count), .free(s_free)
  );

  // ---------------- statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_esc   <= '0;
      n_stall <= '0;
    end else begin
      if (extra_v) n_esc <= n_esc + 1;
      if (hold && q_count != '0) n_stall <= n_stall + 1;
    end
  end

endmodule
