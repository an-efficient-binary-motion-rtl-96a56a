// bme_sr_buffer: search-window (SR) buffer.
//
// Holds the SR_H x SR_W binary reference window centred on the motion vector
// predictor (48 pixels wide for the -16..+15 search range). It is written
// one row per clock from frame memory and read one row per clock by the
// address generator; the read is combinational. A full row is never sent to
// the PE array: the pass selector cuts the BUS_W = 31-pixel slice a pass
// needs, columns 16*pass .. 16*pass+30, so two passes cover 32 horizontal
// offsets. Bit SR_W-1 of a row is its leftmost pixel. Rows beyond SR_H read
// as zero. The storage organisation (a register array) is this design's
// choice; the width and the two-pass slicing follow the architecture.
// The rightmost column (bit 0) is stored but never read: a -16..+15 search
// needs only 47 columns, so a lint note about that unused bit stands.
module bme_sr_buffer #(
  parameter int unsigned W     = bme_pkg::SR_W,
  parameter int unsigned H     = bme_pkg::SR_H,
  parameter int unsigned NP    = bme_pkg::N_PE,
  parameter int unsigned BAB_W = bme_pkg::BAB
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [$clog2(H)-1:0] wr_row,
  input  logic [W-1:0]         wr_data,
  input  logic [$clog2(H)-1:0] rd_row,
  input  logic                 pass,
  output logic [NP+BAB_W-2:0]  sr_bus
);
  localparam int unsigned BW = NP + BAB_W - 1;

  logic [W-1:0] mem [H];
  logic [W-1:0] rd_word;

  always_ff @(posedge clk) begin
    if (wr_en && (int'(wr_row) < H)) mem[wr_row] <= wr_data;
  end

  assign rd_word = (int'(rd_row) < H) ? mem[rd_row] : '0;
  assign sr_bus  = pass ? rd_word[W-1-NP -: BW] : rd_word[W-1 -: BW];

endmodule
