// bme_top: binary motion estimation engine for MPEG-4 shape coding.
//
// Finds, for one 16x16 binary alpha block (BAB), the shape motion vector in a
// -16..+15 search range with the class-skipping search: every candidate
// BAB is classified by its number of ones, and a SAD is computed only for
// candidates whose class matches (or overlaps) the class of the current BAB.
//
// Datapath: current-BAB buffer with CurrMB counter, 48x48 search-window
// buffer, hard-wired dispatch into 16 PEs (each counts the ones of, and
// computes the SAD of, one of 16 horizontally adjacent candidates), class
// match, compare-and-select (CAS), and the control/address generator.
//
// Use: write the current BAB (cur_wr_*) and the reference window (sr_wr_*,
// row 0 = displacement -16 relative to the predictor, bit 47 = leftmost
// pixel) while idle, set class_shift/overlap/full_search, pulse `start`.
// `done` pulses 175 + 16*slots cycles later, slots being the number of
// window rows that had at least one class match; mvd_x/mvd_y (-16..+15),
// mvs = mvp + mvd, best_sad and mv_found are then valid and held until the
// next start. mv_found is 0 when no candidate matched. n_slots and n_sp
// count SAD slots and SAD search positions of the last search.
//
// The block structure, the class-skipping procedure and the two-pass,
// 16-PE organisation follow the architecture; the port protocol, the
// result when nothing matches, the mvs adder and the two counters are this
// design's choices.
module bme_top
  import bme_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // current BAB load
  input  logic                      cur_wr_en,
  input  logic [$clog2(BAB)-1:0]    cur_wr_row,
  input  logic [BAB-1:0]            cur_wr_data,
  // search window load (from frame memory)
  input  logic                      sr_wr_en,
  input  logic [$clog2(SR_H)-1:0]   sr_wr_row,
  input  logic [SR_W-1:0]           sr_wr_data,
  // configuration
  input  logic [2:0]                class_shift,
  input  logic [7:0]                overlap,
  input  logic                      full_search,
  input  logic signed [7:0]         mvp_x,
  input  logic signed [7:0]         mvp_y,
  // control
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  // result
  output logic                      mv_found,
  output logic signed [5:0]         mvd_x,
  output logic signed [5:0]         mvd_y,
  output logic signed [7:0]         mvs_x,
  output logic signed [7:0]         mvs_y,
  output logic [CNT_W-1:0]          best_sad,
  output logic [CNT_W-1:0]          curr_mb,
  output logic [6:0]                n_slots,
  output logic [10:0]               n_sp
);
  logic [$clog2(SR_H)-1:0]  sr_row;
  logic                     pass;
  logic [$clog2(BAB)-1:0]   cur_row_addr;
  logic                     cur_acc, cur_first;
  pe_op_t                   pe_op;
  logic                     sad_start, cas_clear, cas_update;
  logic [4:0]               v_pos;
  logic [BUS_W-1:0]         sr_bus;
  logic [BAB-1:0]           cur_row;
  logic [CNT_W-1:0]         counts [N_PE];
  logic [CNT_W-1:0]         sads   [N_PE];
  logic [N_PE-1:0]          match, mask_q, pe_en;
  logic                     any_match;
  logic [4:0]               best_h, best_v;
  logic [4:0]               mask_ones;

  bme_cur_bab u_cur (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (cur_wr_en),
    .wr_row   (cur_wr_row),
    .wr_data  (cur_wr_data),
    .rd_row   (cur_row_addr),
    .cnt_acc  (cur_acc),
    .cnt_first(cur_first),
    .cur_row  (cur_row),
    .curr_mb  (curr_mb)
  );

  bme_sr_buffer u_sr (
    .clk    (clk),
    .wr_en  (sr_wr_en),
    .wr_row (sr_wr_row),
    .wr_data(sr_wr_data),
    .rd_row (sr_row),
    .pass   (pass),
    .sr_bus (sr_bus)
  );

  // The match mask is live in the first SAD cycle and held for the rest.
  assign pe_en = sad_start ? match : mask_q;

  bme_pe_array u_pea (
    .clk    (clk),
    .rst_n  (rst_n),
    .op     (pe_op),
    .pe_en  (pe_en),
    .sr_bus (sr_bus),
    .cur_row(cur_row),
    .counts (counts),
    .sads   (sads)
  );

  bme_class_match u_match (
    .curr_mb    (curr_mb),
    .counts     (counts),
    .class_shift(class_shift),
    .overlap    (overlap),
    .full_search(full_search),
    .match      (match),
    .any_match  (any_match)
  );

  bme_cas u_cas (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (cas_clear),
    .update  (cas_update),
    .mask    (mask_q),
    .sads    (sads),
    .h_base  ({pass, 4'b0000}),
    .v_pos   (v_pos),
    .best_sad(best_sad),
    .best_h  (best_h),
    .best_v  (best_v),
    .found   (mv_found)
  );

  bme_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .any_match (any_match),
    .busy      (busy),
    .done      (done),
    .sr_row    (sr_row),
    .pass      (pass),
    .cur_row   (cur_row_addr),
    .cur_acc   (cur_acc),
    .cur_first (cur_first),
    .pe_op     (pe_op),
    .sad_start (sad_start),
    .cas_clear (cas_clear),
    .cas_update(cas_update),
    .v_pos     (v_pos)
  );

  always_comb begin
    mask_ones = '0;
    for (int k = 0; k < N_PE; k++) mask_ones += 5'(match[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q  <= '0;
      n_slots <= '0;
      n_sp    <= '0;
    end else begin
      if (sad_start) begin
        mask_q  <= match;
        n_slots <= n_slots + 1'b1;
        n_sp    <= n_sp + 11'(mask_ones);
      end
      if (cas_clear) begin
        n_slots <= '0;
        n_sp    <= '0;
      end
    end
  end

  assign mvd_x = $signed({1'b0, best_h}) - 6'sd16;
  assign mvd_y = $signed({1'b0, best_v}) - 6'sd16;
  assign mvs_x = mvp_x + 8'(mvd_x);
  assign mvs_y = mvp_y + 8'(mvd_y);

  // The buffers must not change under a running search.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(sr_wr_en || cur_wr_en));

endmodule
