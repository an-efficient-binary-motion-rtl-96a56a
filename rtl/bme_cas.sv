// bme_cas: compare-and-select of the minimum SAD and its motion vector.
//
// After a SAD slot the PEs selected by `mask` hold final SADs. The CAS
// finds the smallest of them (lowest PE index on a tie) and, on `update`,
// replaces the kept best when it is strictly smaller, recording the
// candidate's window offset (h = h_base + PE index, v = v_pos). `clear`
// starts a new search. Because candidates arrive in scan order and only a
// strictly smaller SAD replaces the best, the first minimum found wins.
// Outputs are registered and valid the cycle after `update`. The tie rule
// is this design's choice.
module bme_cas #(
  parameter int unsigned NP = bme_pkg::N_PE,
  parameter int unsigned CW = bme_pkg::CNT_W,
  parameter int unsigned OW = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           update,
  input  logic [NP-1:0]  mask,
  input  logic [CW-1:0]  sads [NP],
  input  logic [OW-1:0]  h_base,
  input  logic [OW-1:0]  v_pos,
  output logic [CW-1:0]  best_sad,
  output logic [OW-1:0]  best_h,
  output logic [OW-1:0]  best_v,
  output logic           found
);
  logic          slot_any;
  logic [CW-1:0] slot_min;
  logic [OW-1:0] slot_idx;

  always_comb begin
    slot_any = 1'b0;
    slot_min = '1;
    slot_idx = '0;
    for (int k = 0; k < NP; k++) begin
      if (mask[k] && (!slot_any || sads[k] < slot_min)) begin
        slot_any = 1'b1;
        slot_min = sads[k];
        slot_idx = OW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad <= '1;
      best_h   <= '0;
      best_v   <= '0;
      found    <= 1'b0;
    end else if (clear) begin
      best_sad <= '1;
      best_h   <= '0;
      best_v   <= '0;
      found    <= 1'b0;
    end else if (update && slot_any && (!found || slot_min < best_sad)) begin
      best_sad <= slot_min;
      best_h   <= h_base + slot_idx;
      best_v   <= v_pos;
      found    <= 1'b1;
    end
  end

endmodule
