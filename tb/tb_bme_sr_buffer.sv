// tb_bme_sr_buffer: fills the 48x48 window with random rows, then reads
// every row in both passes and checks the 31-pixel slice (pass 0 columns
// 0..30, pass 1 columns 16..46) and that rows beyond 47 read as zero.
module tb_bme_sr_buffer;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic        wr_en;
  logic [5:0]  wr_row, rd_row;
  logic [47:0] wr_data;
  logic        pass;
  logic [30:0] sr_bus;
  logic [47:0] img [48];

  bme_sr_buffer dut (.clk, .wr_en, .wr_row, .wr_data, .rd_row, .pass, .sr_bus);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [30:0] exp;
    wr_en = 0; wr_row = 0; wr_data = 0; rd_row = 0; pass = 0;
    for (int r = 0; r < 48; r++) begin
      img[r] = {16'($urandom()), 32'($urandom())};
      @(negedge clk);
      wr_en = 1; wr_row = 6'(r); wr_data = img[r];
    end
    @(negedge clk);
    wr_en = 1; wr_row = 6'd50; wr_data = '1;  // out of range: ignored
    @(negedge clk);
    wr_en = 0;
    for (int p = 0; p < 2; p++) begin
      for (int r = 0; r < 64; r++) begin
        rd_row = 6'(r); pass = 1'(p);
        #1;
        exp = '0;
        if (r < 48)
          for (int c = 0; c < 31; c++) exp[30-c] = img[r][47-(16*p+c)];
        checks++;
        if (sr_bus !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL pass=%0d row=%0d bus=%h exp=%h", p, r, sr_bus, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
