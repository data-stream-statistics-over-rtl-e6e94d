// ecm_mt_top: ECM-sketch updater that accepts up to T tuples per cycle
// (the multi-tuple architecture), with the upper bucket levels in DRAM.
//
// An ECM sketch counts, over a sliding time window, how often each key was
// seen: D rows of W exponential histograms (EHs), one hash function per row;
// a tuple updates one EH per row, and a frequency estimate is the minimum
// over the rows. An EH insertion sometimes cascades through many bucket
// levels, but on average touches only about two, so the design splits the
// levels: the first K levels are pipelined on chip, the rest are served by
// one serial BackStage worker with its data in external memory.
//
// Data flow: each of the T tuples is hashed by D row hashes (ecm_hash), the
// interconnect (ecm_icn) sends each (tuple, row) pair to one of T*D
// FrontStages (row r, column c -> FrontStage r*T + c mod T), which queue the
// requests and update their K on-chip levels (ecm_mt_frontstage). A key that
// floods one FrontStage is split onto that FrontStage's escape EH. Spills out
// of level K are merged round-robin (ecm_spill_arb) into the BackStage
// (ecm_backstage), which owns levels K+1..L of all D*W EHs plus the T*D
// escape EHs and talks to the memory port.
//
// Interface: in_valid/in_ready handshake for a group of up to T tuples
// (tup_valid marks which are present), each with a key and a timestamp;
// timestamps must not decrease in tuple order. 'window' is the window length
// in timestamp units. The memory port is that of ecm_backstage; the memory
// must start cleared. Status counters report escape-path use, stalls and
// BackStage activity. Defaults are the evaluated configuration
// (W=55, D=3, T=3, K=5, L=20).
module ecm_mt_top
  import ecm_pkg::*;
#(
  parameter int unsigned NW      = ecm_pkg::W,
  parameter int unsigned ND      = ecm_pkg::D,
  parameter int unsigned NT      = ecm_pkg::T,
  parameter int unsigned NK      = ecm_pkg::K,
  parameter int unsigned NL      = ecm_pkg::L,
  parameter int unsigned ADDR_W  = 24,
  parameter int unsigned Q_DEPTH = 16,
  parameter int unsigned HH_ON   = 12,
  parameter int unsigned HH_OFF  = 4,
  localparam int unsigned NFS    = NT * ND,
  localparam int unsigned COL_W  = $clog2(NW)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ts_t               window,
  // tuples
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [NT-1:0]     tup_valid,
  input  logic [KEY_W-1:0]  tup_key [NT],
  input  ts_t               tup_now [NT],
  // external memory for levels K+1..L
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output lvl_rec_t          mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  lvl_rec_t          mem_rsp_rdata,
  // status
  output logic [NFS-1:0]    esc_en,
  output logic [31:0]       n_esc    [NFS],
  output logic [31:0]       n_stall  [NFS],
  output logic [31:0]       n_assign [NFS],
  output logic              bs_busy,
  output logic [31:0]       bs_ops,
  output logic [31:0]       bs_cascade,
  output logic [31:0]       bs_drop
);

  localparam int unsigned LOCAL_NEH = (NW + NT - 1) / NT;
  localparam int unsigned QCW       = $clog2(Q_DEPTH + 1);

  // ---------------- hashing
  logic [COL_W-1:0] col [NT][ND];

  for (genvar t = 0; t < NT; t++) begin : g_tup
    for (genvar r = 0; r < ND; r++) begin : g_row
      ecm_hash #(.KEY_W(KEY_W), .W(NW), .SEED(32'h1234_5679 + r * 32'h9E37_79B9)) u_hash (
        .key(tup_key[t]), .col(col[t][r])
      );
    end
  end

  // ---------------- interconnect
  logic [QCW-1:0] q_free     [NFS];
  logic [NT-1:0]  push_valid [NFS];
  fs_req_t        push_data  [NFS][NT];

  ecm_icn #(.NT(NT), .ND(ND), .NW(NW), .QCW(QCW)) u_icn (
    .in_valid, .in_ready, .tup_valid, .tup_now, .col, .q_free, .push_valid, .push_data
  );

  // ---------------- FrontStages
  logic [NFS-1:0] fs_valid, fs_ready;
  spill_t         fs_data [NFS];

  for (genvar f = 0; f < NFS; f++) begin : g_fs
    ecm_mt_frontstage #(
      .LOCAL_NEH(LOCAL_NEH), .ROW(f / NT), .LANE(f % NT), .ESC_GID(ND * NW + f),
      .NLVL(NK), .NPUSH(NT), .Q_DEPTH(Q_DEPTH), .HH_ON(HH_ON), .HH_OFF(HH_OFF)
    ) u_fs (
      .clk, .rst_n, .window,
      .push_valid(push_valid[f]), .push_data(push_data[f]), .q_free(q_free[f]),
      .out_valid(fs_valid[f]), .out_data(fs_data[f]), .out_ready(fs_ready[f]),
      .esc_en(esc_en[f]), .n_esc(n_esc[f]), .n_stall(n_stall[f]), .n_assign(n_assign[f])
    );
  end

  // ---------------- spill merge and BackStage
  logic   bs_valid, bs_ready;
  spill_t bs_data;

  ecm_spill_arb #(.N(NFS)) u_arb (
    .clk, .rst_n, .in_valid(fs_valid), .in_data(fs_data), .in_ready(fs_ready),
    .out_valid(bs_valid), .out_data(bs_data), .out_ready(bs_ready)
  );

  ecm_backstage #(.NLVL_TOT(NL), .NLVL_FRNT(NK), .ADDR_W(ADDR_W)) u_bs (
    .clk, .rst_n, .window,
    .in_valid(bs_valid), .in_data(bs_data), .in_ready(bs_ready),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata,
    .almost_full(), .busy(bs_busy), .n_ops(bs_ops), .n_cascade(bs_cascade), .n_drop(bs_drop)
  );

endmodule
