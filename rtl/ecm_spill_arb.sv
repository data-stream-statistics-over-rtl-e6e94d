// ecm_spill_arb: round-robin multiplexer that merges the spill streams of
// the N FrontStages into the single BackStage input.
//
// Each input is a valid/ready stream. Among the valid inputs the first one at
// or after the pointer is granted; its data is forwarded and its ready follows
// the output ready. After a transfer the pointer moves past the granted input,
// so no FrontStage can be starved. Combinational path from valid to ready;
// only the pointer is a register. The round-robin policy is this design's
// choice.
module ecm_spill_arb
  import ecm_pkg::*;
#(
  parameter int unsigned N  = ecm_pkg::T * ecm_pkg::D,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_valid,
  input  spill_t       in_data [N],
  output logic [N-1:0] in_ready,
  output logic         out_valid,
  output spill_t       out_data,
  input  logic         out_ready
);

  logic [PW-1:0] ptr, gnt;
  logic          found;

  always_comb begin
    found = 1'b0;
    gnt   = '0;
    for (int i = 0; i < N; i++) begin
      int unsigned j;
      j = (32'(ptr) + i) % N;
      if (!found && in_valid[j]) begin
        found = 1'b1;
        gnt   = PW'(j);
      end
    end
    out_valid = found;
    out_data  = in_data[gnt];
    in_ready  = '0;
    in_ready[gnt] = found && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      ptr <= '0;
    else if (out_valid && out_ready) ptr <= (32'(gnt) == N - 1) ? '0 : gnt + 1'b1;
  end

endmodule
