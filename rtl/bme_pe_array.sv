// bme_pe_array: the 16 processing elements and their data dispatch.
//
// All PEs receive the same operation and the same current-BAB row. The data
// dispatch is fixed wiring: from the N_PE+BAB-1 = 31-pixel window slice
// (bit 30 = leftmost pixel) PE k takes the 16 pixels sr_bus[30-k -: 16], i.e.
// the candidate row of horizontal offset k within the current pass, so 16
// horizontally adjacent candidates are served by one row read. `pe_en` (the class-match mask) gates the SAD operations of
// each PE. Outputs are the PEs' count registers (Reg1..Reg16) and SAD
// registers, valid one clock after the op that produced them.
module bme_pe_array
  import bme_pkg::*;
#(
  parameter int unsigned NP    = bme_pkg::N_PE,
  parameter int unsigned BAB_W = bme_pkg::BAB,
  parameter int unsigned CW    = bme_pkg::CNT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_op_t              op,
  input  logic [NP-1:0]       pe_en,
  input  logic [NP+BAB_W-2:0] sr_bus,
  input  logic [BAB_W-1:0]    cur_row,
  output logic [CW-1:0]       counts [NP],
  output logic [CW-1:0]       sads   [NP]
);
  localparam int unsigned BW = NP + BAB_W - 1;

  for (genvar k = 0; k < NP; k++) begin : g_pe
    bme_pe #(.BAB_W(BAB_W), .CW(CW)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .op      (op),
      .en      (pe_en[k]),
      .cand_row(sr_bus[BW-1-k -: BAB_W]),
      .cur_row (cur_row),
      .count   (counts[k]),
      .sad     (sads[k])
    );
  end

endmodule
