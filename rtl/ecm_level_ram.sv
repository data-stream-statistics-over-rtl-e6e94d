// ecm_level_ram: on-chip (block-RAM) store of EH level records behind the
// same request/response port as the external memory of the BackStage, so
// the serial worker can run on either. One request per cycle is accepted; a
// write takes effect at the clock edge, a read answers one cycle later.
// Contents are cleared by a sweep after reset, during which req_ready is low
// (DEPTH cycles), so the worker always starts from empty levels. The
// published worker keeps its levels in block RAM; the port shape, the
// one-cycle read and the clearing sweep are this design's choices.
module ecm_level_ram
  import ecm_pkg::*;
#(
  parameter int unsigned DEPTH  = 1026,
  parameter int unsigned ADDR_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  lvl_rec_t          req_wdata,
  output logic              rsp_valid,
  output lvl_rec_t          rsp_rdata
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  lvl_rec_t      mem [DEPTH];
  logic          init;
  logic [AW-1:0] init_addr;

  assign req_ready = !init;

  always_ff @(posedge clk) begin
    if (init)
      mem[init_addr] <= '0;
    else if (req_valid && req_we)
      mem[AW'(req_addr)] <= req_wdata;
    rsp_rdata <= mem[AW'(req_addr)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init      <= 1'b1;
      init_addr <= '0;
      rsp_valid <= 1'b0;
    end else begin
      rsp_valid <= req_valid && req_ready && !req_we;
      if (init) begin
        init_addr <= init_addr + 1'b1;
        if (32'(init_addr) == DEPTH - 1) init <= 1'b0;
      end
    end
  end

endmodule
