// bme_cur_bab: current-BAB buffer and CurrMB counter.
//
// Stores the 16x16 current binary alpha block, one row per write. The row
// at rd_row is driven to all PEs (combinational read). When cnt_acc is set
// the ones of that row are added into the CurrMB register at the next clock
// (cnt_first starts a new count), so counting the whole BAB takes 16 cycles.
// CurrMB is the count the class match compares every candidate against.
// The separate adder tree for this count is this design's choice.
module bme_cur_bab #(
  parameter int unsigned BAB_W = bme_pkg::BAB,
  parameter int unsigned CW    = bme_pkg::CNT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(BAB_W)-1:0] wr_row,
  input  logic [BAB_W-1:0]         wr_data,
  input  logic [$clog2(BAB_W)-1:0] rd_row,
  input  logic                     cnt_acc,
  input  logic                     cnt_first,
  output logic [BAB_W-1:0]         cur_row,
  output logic [CW-1:0]            curr_mb
);
  logic [BAB_W-1:0] mem [BAB_W];
  logic [$clog2(BAB_W):0] ones;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
  end

  assign cur_row = mem[rd_row];

  bme_adder_tree #(.W(BAB_W)) u_tree (.bits(cur_row), .sum(ones));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       curr_mb <= '0;
    else if (cnt_acc) curr_mb <= (cnt_first ? '0 : curr_mb) + CW'(ones);
  end

endmodule
