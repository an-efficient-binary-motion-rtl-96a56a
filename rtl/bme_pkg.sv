// bme_pkg: constants and types shared by the binary motion estimation engine.
//
// The engine searches a +/-16 (-16..+15) window around the shape motion
// vector predictor for the 16x16 binary alpha block (BAB) that best matches
// the current BAB. Sizes follow the architecture: 16 PEs, 16x16 BABs, a
// 48-pixel-wide search window covered in two horizontal passes of 16
// candidate columns and 32 vertical positions each.
//
// Counters are 9 bits wide rather than 8: a fully opaque BAB holds 256 ones.
package bme_pkg;

  localparam int unsigned BAB    = 16;           // BAB edge in pixels
  localparam int unsigned N_PE   = 16;           // processing elements
  localparam int unsigned SR_W   = 48;           // search window width
  localparam int unsigned SR_H   = 48;           // search window height
  localparam int unsigned N_POS  = 32;           // vertical positions per pass
  localparam int unsigned BUS_W  = N_PE + BAB - 1; // 31-bit dispatch bus
  localparam int unsigned CNT_W  = 9;            // counts 0..256

  // Operation broadcast to the PEs.
  typedef enum logic [2:0] {
    PE_NOP       = 3'd0,  // hold both registers
    PE_CNT_FIRST = 3'd1,  // count_reg <= ones(row)
    PE_CNT_ADD   = 3'd2,  // count_reg <= count_reg + ones(row)   (new row)
    PE_CNT_SUB   = 3'd3,  // count_reg <= count_reg - ones(row)   (expired row)
    PE_SAD_FIRST = 3'd4,  // sad_reg   <= ones(row ^ cur)         (if enabled)
    PE_SAD_ACC   = 3'd5   // sad_reg   <= sad_reg + ones(row ^ cur) (if enabled)
  } pe_op_t;

endpackage
