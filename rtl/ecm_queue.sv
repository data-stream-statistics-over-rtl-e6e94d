// ecm_queue: circular FIFO that takes up to NPUSH entries and releases up to
// NPOP entries per cycle.
//
// It is the input queue of a FrontStage (the interconnect may deliver one
// entry per accepted tuple in a cycle, and the steering logic removes up to
// two entries per cycle, one for the main pipeline and one for the escape
// path), and, with other counts, the spill queue of a FrontStage and the two
// FIFOs of the BackStage. Pushed entries whose valid bit is set are stored in
// index order, skipping the others, so entries of one cycle keep the order of
// their tuples. head[i] is the i-th oldest entry (valid while i < count);
// pop_n removes that many from the front. Writes and reads take effect at the
// clock edge; 'count' and 'free' are registered state. The user must not push
// more than 'free' entries nor pop more than 'count' (checked by assertions).
module ecm_queue #(
  parameter type         E     = ecm_pkg::fs_req_t,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NPUSH = ecm_pkg::T,
  parameter int unsigned NPOP  = 2,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = $clog2(NPOP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPUSH-1:0] push_valid,
  input  E                 push_data [NPUSH],
  input  logic [PW-1:0]    pop_n,
  output E                 head      [NPOP],
  output logic [CW-1:0]    count,
  output logic [CW-1:0]    free
);

  E               mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;
  logic [CW-1:0]  n_push;

  always_comb begin
    n_push = '0;
    for (int i = 0; i < NPUSH; i++) n_push = n_push + CW'(push_valid[i]);
    for (int i = 0; i < NPOP; i++) head[i] = mem[AW'(rd_ptr + AW'(i))];
    free = CW'(DEPTH) - count;
  end

  // slot of each pushed entry: after the valid entries before it
  logic [AW-1:0] wpos [NPUSH];

  always_comb begin
    wpos[0] = wr_ptr;
    for (int i = 1; i < NPUSH; i++) wpos[i] = wpos[i-1] + AW'(push_valid[i-1]);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NPUSH; i++)
      if (push_valid[i]) mem[wpos[i]] <= push_data[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wr_ptr + AW'(n_push);
      rd_ptr <= rd_ptr + AW'(pop_n);
      count  <= count + n_push - CW'(pop_n);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) n_push <= free);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) CW'(pop_n) <= count);

endmodule
