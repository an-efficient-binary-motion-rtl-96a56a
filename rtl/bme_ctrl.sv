// bme_ctrl: control and address generation for one BAB search.
//
// Sequence after `start` (ignored while busy):
//   CUR   16 cycles  count the ones of the current BAB into CurrMB
//   INIT  16 cycles  count rows 0..15 of the pass into every PE's count_reg
//   POS   1 cycle    class decision for vertical offset v. On a match this
//                    cycle is SAD row 0 of the matching PEs (SAD, 15 more
//                    cycles, then ADV); otherwise it does ADV's work at once.
//   ADV              after a SAD slot: tell the CAS the SADs are final. If
//                    v < 31 add the new bottom row v+16 (CNT_ADD) and go to
//                    SUB; at v = 31 end the pass (NOP).
//   SUB   1 cycle    subtract the expired top row v; v <- v+1; back to POS
//   DONE  1 cycle    `done` pulses, the CAS holds the motion vector
// Two passes (pass 0: horizontal offsets 0..15, pass 1: 16..31) each run
// INIT and 32 positions. Sliding from one position to the next costs 2
// cycles; a row with a class match costs 16 more, whatever the number of
// matching PEs. Latency from the cycle `start` is sampled to `done`:
//   16 + 2*(16 + 31*2 + 1) + 16*slots + 1 = 175 + 16*slots cycles.
// The procedure (count current BAB, count first window, slide with
// add/subtract, 16-cycle SAD on a match, two passes) follows the
// architecture; folding the class decision into the first cycle of the next
// action and the start/done handshake are this design's choices.
module bme_ctrl
  import bme_pkg::*;
#(
  parameter int unsigned BAB_W = bme_pkg::BAB,
  parameter int unsigned NPOS  = bme_pkg::N_POS,
  parameter int unsigned H     = bme_pkg::SR_H
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     any_match,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(H)-1:0]     sr_row,
  output logic                     pass,
  output logic [$clog2(BAB_W)-1:0] cur_row,
  output logic                     cur_acc,
  output logic                     cur_first,
  output pe_op_t                   pe_op,
  output logic                     sad_start,   // first SAD cycle: latch the match mask
  output logic                     cas_clear,
  output logic                     cas_update,
  output logic [$clog2(NPOS)-1:0]  v_pos
);
  typedef enum logic [2:0] {
    S_IDLE, S_CUR, S_INIT, S_POS, S_SAD, S_ADV, S_SUB, S_DONE
  } state_t;

  localparam int unsigned RW = $clog2(BAB_W);
  localparam int unsigned VW = $clog2(NPOS);
  localparam int unsigned AW = $clog2(H);

  state_t        state, state_n;
  logic [RW-1:0] r, r_n;
  logic [VW-1:0] v, v_n;
  logic          pass_n;

  assign v_pos = v;
  assign busy  = (state != S_IDLE);

  always_comb begin
    state_n    = state;
    r_n        = r;
    v_n        = v;
    pass_n     = pass;
    sr_row     = '0;
    cur_row    = r;
    cur_acc    = 1'b0;
    cur_first  = 1'b0;
    pe_op      = PE_NOP;
    sad_start  = 1'b0;
    cas_clear  = 1'b0;
    cas_update = 1'b0;
    done       = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (start) begin
          cas_clear = 1'b1;
          r_n       = '0;
          v_n       = '0;
          pass_n    = 1'b0;
          state_n   = S_CUR;
        end
      end
      S_CUR: begin
        cur_acc   = 1'b1;
        cur_first = (r == '0);
        r_n       = r + 1'b1;
        if (r == RW'(BAB_W - 1)) state_n = S_INIT;
      end
      S_INIT: begin
        sr_row = AW'(r);
        pe_op  = (r == '0) ? PE_CNT_FIRST : PE_CNT_ADD;
        r_n    = r + 1'b1;
        if (r == RW'(BAB_W - 1)) begin
          v_n     = '0;
          state_n = S_POS;
        end
      end
      S_SAD: begin
        sr_row  = AW'(v) + AW'(r);
        cur_row = r;
        pe_op   = PE_SAD_ACC;
        r_n     = r + 1'b1;
        if (r == RW'(BAB_W - 1)) state_n = S_ADV;
      end
      S_SUB: begin
        sr_row  = AW'(v);
        pe_op   = PE_CNT_SUB;
        v_n     = v + 1'b1;
        state_n = S_POS;
      end
      S_DONE: begin
        done    = 1'b1;
        state_n = S_IDLE;
      end
      default: ;  // S_POS and S_ADV below
    endcase

    if (state == S_POS && any_match) begin
      // SAD row 0 for the matching PEs.
      sr_row    = AW'(v);
      cur_row   = '0;
      pe_op     = PE_SAD_FIRST;
      sad_start = 1'b1;
      r_n       = RW'(1);
      state_n   = S_SAD;
    end else if (state == S_POS || state == S_ADV) begin
      cas_update = (state == S_ADV);
      if (v == VW'(NPOS - 1)) begin
        r_n = '0;
        if (pass == 1'b0) begin
          pass_n  = 1'b1;
          state_n = S_INIT;
        end else begin
          state_n = S_DONE;
        end
      end else begin
        sr_row  = AW'(v) + AW'(BAB_W);
        pe_op   = PE_CNT_ADD;
        state_n = S_SUB;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r     <= '0;
      v     <= '0;
      pass  <= 1'b0;
    end else begin
      state <= state_n;
      r     <= r_n;
      v     <= v_n;
      pass  <= pass_n;
    end
  end

  // CNT ops must never coincide with a SAD op (one shared accumulator).
  a_single_op: assert property (@(posedge clk) disable iff (!rst_n)
    sad_start |-> (pe_op == PE_SAD_FIRST));

endmodule
