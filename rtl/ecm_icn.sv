// ecm_icn: interconnect between the T input tuples and the T*D FrontStages.
//
// Every tuple is hashed once per sketch row; row r's column c belongs to
// FrontStage r*T + (c mod T), where it is EH number c div T. The ICN turns the
// T*D (tuple, row) pairs of a cycle into push requests for the FrontStage
// input queues, in tuple order so that two tuples hitting the same EH are
// queued, and served, in arrival order. All tuples of a cycle are accepted
// together: in_ready is low whenever some queue has fewer free slots than the
// requests it would receive (a collision burst), which stalls the input.
// Purely combinational; the queues' free counts are registered.
module ecm_icn
  import ecm_pkg::*;
#(
  parameter int unsigned NT    = ecm_pkg::T,
  parameter int unsigned ND    = ecm_pkg::D,
  parameter int unsigned NW    = ecm_pkg::W,
  parameter int unsigned QCW   = 5,
  localparam int unsigned COL_W = $clog2(NW),
  localparam int unsigned NFS   = NT * ND
) (
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [NT-1:0]    tup_valid,
  input  ts_t              tup_now [NT],
  input  logic [COL_W-1:0] col     [NT][ND],
  input  logic [QCW-1:0]   q_free  [NFS],
  output logic [NT-1:0]    push_valid [NFS],
  output fs_req_t          push_data  [NFS][NT]
);

  logic [NT-1:0] req [NFS];

  always_comb begin
    in_ready = 1'b1;
    for (int f = 0; f < NFS; f++) begin
      logic [QCW:0] n;
      n = '0;
      for (int t = 0; t < NT; t++) begin
        req[f][t] = tup_valid[t] &&
                    (32'(col[t][f / NT]) % NT == f % NT);
        push_data[f][t].idx = 6'(32'(col[t][f / NT]) / NT);
        push_data[f][t].now = tup_now[t];
        n = n + (QCW+1)'(req[f][t]);
      end
      if (n > (QCW+1)'(q_free[f])) in_ready = 1'b0;
    end
    for (int f = 0; f < NFS; f++)
      push_valid[f] = (in_valid && in_ready) ? req[f] : '0;
  end

endmodule
