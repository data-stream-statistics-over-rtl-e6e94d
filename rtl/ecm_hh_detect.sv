// ecm_hh_detect: heavy-hitter detection for one FrontStage.
//
// A skewed stream (one key sending far more tuples than the others) piles up
// updates for one EH in the FrontStage input queue, and those must be served
// one per cycle. This block watches the queue: when its fill level reaches
// HH_ON, the EH at the head of the queue is taken as the culprit and, if the
// escape structure is free, the escape structure is assigned to it ('owner')
// and the escape path is enabled. The path stays enabled until the queue has
// drained below HH_OFF; the assignment itself is kept, since the escape
// structure now holds part of that EH's history. The escape structure becomes
// free again once a full window has passed since it last recorded a tuple
// (all its buckets have then expired); 'clear_extra' then empties it in the
// cycle of the new assignment. Thresholds and the re-assignment rule are this
// design's choices. Outputs are registered.
module ecm_hh_detect
  import ecm_pkg::*;
#(
  parameter int unsigned CW     = 5,
  parameter int unsigned IDX_W  = 5,
  parameter int unsigned HH_ON  = 12,
  parameter int unsigned HH_OFF = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              window,
  input  ts_t              now,        // time of the queue head
  input  logic [CW-1:0]    q_count,
  input  logic [IDX_W-1:0] head_idx,
  input  ts_t              extra_last, // last tuple time in the escape structure
  output logic             esc_en,
  output logic             owner_valid,
  output logic [IDX_W-1:0] owner,
  output logic             clear_extra,
  output logic [31:0]      n_assign    // number of escape assignments made
);

  logic saturated, drained, owner_free;

  always_comb begin
    saturated  = q_count >= CW'(HH_ON);
    drained    = q_count <  CW'(HH_OFF);
    owner_free = !owner_valid || !ts_live(extra_last, now, window);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      esc_en      <= 1'b0;
      owner_valid <= 1'b0;
      owner       <= '0;
      clear_extra <= 1'b0;
      n_assign    <= '0;
    end else begin
      clear_extra <= 1'b0;
      if (saturated && !esc_en) begin
        if (owner_valid && owner == head_idx) begin
          esc_en <= 1'b1;
        end else if (owner_free) begin
          esc_en      <= 1'b1;
          owner_valid <= 1'b1;
          owner       <= head_idx;
          clear_extra <= 1'b1;
          n_assign    <= n_assign + 1;
        end
      end else if (drained) begin
        esc_en <= 1'b0;
      end
    end
  end

endmodule
