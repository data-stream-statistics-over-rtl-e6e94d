// ecm_dram_model: behavioural model of the external memory that holds the
// upper bucket levels, for simulation only. Word-addressed, one level record
// per word, cleared to zero at start. It accepts a request every cycle that
// 'stall' is low; a write takes effect at once, a read returns its word LAT
// cycles later on the response port, in request order.
module ecm_dram_model
  import ecm_pkg::*;
#(
  parameter int unsigned ADDR_W = 24,
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned LAT    = 2
) (
  input  logic              clk,
  input  logic              stall,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  lvl_rec_t          req_wdata,
  output logic              rsp_valid,
  output lvl_rec_t          rsp_rdata
);

  lvl_rec_t mem [DEPTH];
  logic     v [LAT];
  lvl_rec_t d [LAT];

  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (v[i]) v[i] = 1'b0;
  end

  assign req_ready = !stall;
  assign rsp_valid = v[LAT-1];
  assign rsp_rdata = d[LAT-1];

  always @(posedge clk) begin
    if (req_valid && req_ready && req_we) mem[req_addr] <= req_wdata;
    v[0] <= req_valid && req_ready && !req_we;
    d[0] <= mem[req_addr];
    for (int i = 1; i < LAT; i++) begin
      v[i] <= v[i-1];
      d[i] <= d[i-1];
    end
  end

endmodule
