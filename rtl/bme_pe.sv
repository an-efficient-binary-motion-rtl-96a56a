// bme_pe: one processing element of the binary motion estimation array.
//
// A candidate row and the current-BAB row are XORed; a MUX selects either
// that difference (SAD mode) or the raw candidate row (counting mode) into
// an adder tree, and one add/subtract accumulator updates one of two
// registers:
//   count_reg - ones in this PE's candidate BAB. It is built over 16 rows
//               (CNT_FIRST, then CNT_ADD) and afterwards kept current while
//               the window slides down: CNT_ADD the new bottom row, CNT_SUB
//               the expired top row.
//   sad_reg   - SAD of the candidate BAB, accumulated over 16 rows
//               (SAD_FIRST, then SAD_ACC). SAD ops act only when `en` is set,
//               so PEs without a class match stay idle.
// Every op takes effect at the next rising clock edge; results are
// registered outputs. The XOR/tree/accumulator structure and the two
// registers follow the architecture; the shared adder and the op encoding
// are this design's choice. Asynchronous active-low reset.
module bme_pe
  import bme_pkg::*;
#(
  parameter int unsigned BAB_W = bme_pkg::BAB,
  parameter int unsigned CW    = bme_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pe_op_t           op,
  input  logic             en,
  input  logic [BAB_W-1:0] cand_row,
  input  logic [BAB_W-1:0] cur_row,
  output logic [CW-1:0]    count,
  output logic [CW-1:0]    sad
);
  localparam int unsigned TW = $clog2(BAB_W) + 1;

  logic            sad_mode;
  logic [BAB_W-1:0] tree_in;
  logic [TW-1:0]   ones;
  logic [CW-1:0]   acc_a, acc_y;
  logic            acc_sub;

  assign sad_mode = (op == PE_SAD_FIRST) || (op == PE_SAD_ACC);
  assign tree_in  = sad_mode ? (cand_row ^ cur_row) : cand_row;

  bme_adder_tree #(.W(BAB_W)) u_tree (.bits(tree_in), .sum(ones));

  // Shared accumulator: operand A is the register being updated (or zero).
  always_comb begin
    unique case (op)
      PE_CNT_ADD, PE_CNT_SUB: acc_a = count;
      PE_SAD_ACC:             acc_a = sad;
      default:                acc_a = '0;
    endcase
  end
  assign acc_sub = (op == PE_CNT_SUB);
  assign acc_y   = acc_sub ? (acc_a - CW'(ones)) : (acc_a + CW'(ones));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      sad   <= '0;
    end else begin
      unique case (op)
        PE_CNT_FIRST, PE_CNT_ADD, PE_CNT_SUB: count <= acc_y;
        PE_SAD_FIRST, PE_SAD_ACC:             if (en) sad <= acc_y;
        default: ;
      endcase
    end
  end

endmodule
