// tb_bme_ctrl: runs the controller with a random class-match pattern per
// (pass, row) and compares every cycle of its output (PE op, window row,
// pass, current-BAB row, CurrMB count enable, CAS update, done) with an
// independently generated expected schedule. Also checks the latency
// 175 + 16*slots and that start is ignored while busy.
module tb_bme_ctrl
  import bme_pkg::*;
;
  typedef struct {
    pe_op_t op;
    int     row;      // window row, checked when op != NOP
    int     pass;
    int     crow;     // current-BAB row, checked when cur_acc or SAD op
    bit     cur_acc;
    bit     cas_update;
    bit     done;
  } exp_t;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       start, any_match;
  logic       busy, done, pass, cur_acc, cur_first, sad_start, cas_clear, cas_update;
  logic [5:0] sr_row;
  logic [3:0] cur_row;
  pe_op_t     pe_op;
  logic [4:0] v_pos;
  bit         mt [2][32];
  exp_t       q[$];

  bme_ctrl dut (.clk, .rst_n, .start, .any_match, .busy, .done, .sr_row, .pass,
                .cur_row, .cur_acc, .cur_first, .pe_op, .sad_start, .cas_clear,
                .cas_update, .v_pos);

  always #5 clk = ~clk;
  assign any_match = mt[pass][v_pos];

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t e(pe_op_t op, int row, int p, int crow, bit ca, bit cu, bit d);
    exp_t x;
    x.op = op; x.row = row; x.pass = p; x.crow = crow; x.cur_acc = ca; x.cas_update = cu; x.done = d;
    return x;
  endfunction

  task automatic build_schedule();
    q.delete();
    for (int r = 0; r < 16; r++) q.push_back(e(PE_NOP, 0, 0, r, 1, 0, 0));
    for (int p = 0; p < 2; p++) begin
      for (int r = 0; r < 16; r++) q.push_back(e(r == 0 ? PE_CNT_FIRST : PE_CNT_ADD, r, p, 0, 0, 0, 0));
      for (int v = 0; v < 32; v++) begin
        bit upd = 0;
        if (mt[p][v]) begin
          for (int r = 0; r < 16; r++) q.push_back(e(r == 0 ? PE_SAD_FIRST : PE_SAD_ACC, v + r, p, r, 0, 0, 0));
          upd = 1;
        end
        if (v < 31) begin
          q.push_back(e(PE_CNT_ADD, v + 16, p, 0, 0, upd, 0));
          q.push_back(e(PE_CNT_SUB, v, p, 0, 0, 0, 0));
        end else begin
          q.push_back(e(PE_NOP, 0, p, 0, 0, upd, 0));
        end
      end
    end
    q.push_back(e(PE_NOP, 0, 1, 0, 0, 0, 1));
  endtask

  initial begin
    int slots, lat, density;
    start = 0;
    for (int p = 0; p < 2; p++) for (int v = 0; v < 32; v++) mt[p][v] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      density = (t == 0) ? 0 : (t == 1) ? 100 : $urandom_range(0, 40);
      slots = 0;
      for (int p = 0; p < 2; p++) for (int v = 0; v < 32; v++) begin
        mt[p][v] = ($urandom_range(0, 99) < density);
        slots += int'(mt[p][v]);
      end
      build_schedule();
      @(negedge clk);
      start = 1;
      @(posedge clk); #1;
      checks++;
      if (!cas_clear && !busy) begin failures++; $display("FAIL start not taken"); end
      @(negedge clk);
      start = 1;  // ignored while busy
      lat = 0;
      while (q.size() > 0) begin
        exp_t x;
        x = q.pop_front();
        lat++;
        #1;
        checks++;
        if (pe_op != x.op || (x.op != PE_NOP && int'(sr_row) != x.row) ||
            int'(pass) != x.pass || cur_acc != x.cur_acc ||
            ((x.cur_acc || x.op == PE_SAD_FIRST || x.op == PE_SAD_ACC) && int'(cur_row) != x.crow) ||
            cas_update != x.cas_update || done != x.done ||
            sad_start != (x.op == PE_SAD_FIRST) || (x.cur_acc && cur_first != (x.crow == 0))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d cyc=%0d op=%s/%s row=%0d/%0d pass=%0d/%0d upd=%0d/%0d done=%0d/%0d",
            t, lat, pe_op.name(), x.op.name(), sr_row, x.row, pass, x.pass, cas_update, x.cas_update, done, x.done);
        end
        start = 0;
        @(negedge clk);
      end
      checks++;
      if (lat != 175 + 16 * slots) begin
        failures++; $display("FAIL latency %0d exp %0d", lat, 175 + 16 * slots);
      end
      #1;
      checks++;
      if (busy) begin failures++; $display("FAIL still busy after done"); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
