// tb_bme_cur_bab: loads random current BABs (and an opaque one), reads the
// rows back, counts the BAB in 16 cycles and checks CurrMB against a count
// of the loaded pixels.
module tb_bme_cur_bab;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        wr_en, cnt_acc, cnt_first;
  logic [3:0]  wr_row, rd_row;
  logic [15:0] wr_data, cur_row;
  logic [8:0]  curr_mb;
  logic [15:0] bab [16];

  bme_cur_bab dut (.clk, .rst_n, .wr_en, .wr_row, .wr_data, .rd_row,
                   .cnt_acc, .cnt_first, .cur_row, .curr_mb);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    wr_en = 0; cnt_acc = 0; cnt_first = 0; wr_row = 0; rd_row = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      exp = 0;
      for (int r = 0; r < 16; r++) begin
        bab[r] = (t == 0) ? 16'hFFFF : 16'($urandom() & $urandom_range(0, 65535));
        exp += $countones(bab[r]);
        @(negedge clk);
        wr_en = 1; wr_row = 4'(r); wr_data = bab[r];
      end
      @(negedge clk);
      wr_en = 0;
      for (int r = 0; r < 16; r++) begin
        rd_row = 4'(r); cnt_acc = 1; cnt_first = (r == 0);
        #1;
        checks++;
        if (cur_row !== bab[r]) failures++;
        @(negedge clk);
      end
      cnt_acc = 0;
      // hold when cnt_acc is low
      rd_row = 4'd3;
      @(negedge clk);
      checks++;
      if (int'(curr_mb) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d curr_mb=%0d exp=%0d", t, curr_mb, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
