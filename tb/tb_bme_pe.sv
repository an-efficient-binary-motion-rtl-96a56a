// tb_bme_pe: random operation stream into one PE, compared each cycle with a
// reference model of count_reg and sad_reg (add/subtract of ones counts,
// XOR-based SAD, enable gating of SAD ops).
module tb_bme_pe
  import bme_pkg::*;
;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  pe_op_t      op;
  logic        en;
  logic [15:0] cand_row, cur_row;
  logic [8:0]  count, sad;
  int          m_count, m_sad;

  bme_pe dut (.clk, .rst_n, .op, .en, .cand_row, .cur_row, .count, .sad);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = PE_NOP; en = 0; cand_row = '0; cur_row = '0;
    m_count = 0; m_sad = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      op       = pe_op_t'($urandom_range(0, 5));
      en       = 1'($urandom());
      cand_row = 16'($urandom());
      cur_row  = 16'($urandom());
      if (t % 97 == 0) cand_row = 16'hFFFF;
      unique case (op)
        PE_CNT_FIRST: m_count = $countones(cand_row);
        PE_CNT_ADD:   m_count = (m_count + $countones(cand_row)) % 512;
        PE_CNT_SUB:   m_count = (m_count - $countones(cand_row) + 512) % 512;
        PE_SAD_FIRST: if (en) m_sad = $countones(cand_row ^ cur_row);
        PE_SAD_ACC:   if (en) m_sad = (m_sad + $countones(cand_row ^ cur_row)) % 512;
        default: ;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (int'(count) != m_count || int'(sad) != m_sad) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d op=%s count=%0d/%0d sad=%0d/%0d",
                                    t, op.name(), count, m_count, sad, m_sad);
      end
    end
    // a full 16-row count of an opaque block must reach 256
    @(negedge clk); op = PE_CNT_FIRST; cand_row = 16'hFFFF;
    for (int r = 1; r < 16; r++) begin @(negedge clk); op = PE_CNT_ADD; end
    @(negedge clk); op = PE_NOP;
    checks++;
    if (count != 9'd256) begin failures++; $display("FAIL opaque count=%0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
