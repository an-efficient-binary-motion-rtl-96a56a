// tb_bme_pe_array: drives the PE array as the controller does over a random
// 48x48 window: per pass, count the first 16 rows, then slide down with
// add-new-row / subtract-expired-row, checking all 16 candidate counts at
// every position against a direct count; at random positions run a 16-row
// SAD with a random PE enable mask and check the SADs of enabled PEs and
// that disabled PEs keep their old SAD.
module tb_bme_pe_array
  import bme_pkg::*;
;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  pe_op_t      op;
  logic [15:0] pe_en;
  logic [30:0] sr_bus;
  logic [15:0] cur_row;
  logic [8:0]  counts [16];
  logic [8:0]  sads   [16];

  bit          win [48][48];   // [row][col]
  bit          cur [16][16];
  int          m_sad [16];

  bme_pe_array dut (.clk, .rst_n, .op, .pe_en, .sr_bus, .cur_row, .counts, .sads);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [30:0] slice(input int row, input int p);
    logic [30:0] b;
    for (int c = 0; c < 31; c++) b[30-c] = win[row][16*p+c];
    return b;
  endfunction

  function automatic logic [15:0] cur_bits(input int row);
    logic [15:0] b;
    for (int c = 0; c < 16; c++) b[15-c] = cur[row][c];
    return b;
  endfunction

  function automatic int ref_count(input int v, input int h);
    int n = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) n += int'(win[v+r][h+c]);
    return n;
  endfunction

  function automatic int ref_sad(input int v, input int h);
    int n = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) n += int'(win[v+r][h+c] ^ cur[r][c]);
    return n;
  endfunction

  task automatic step(input pe_op_t o, input int row, input int p, input int crow);
    @(negedge clk);
    op = o; sr_bus = slice(row, p); cur_row = cur_bits(crow);
  endtask

  task automatic check_counts(input int v, input int p);
    @(negedge clk);
    op = PE_NOP;
    #1;
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (int'(counts[k]) != ref_count(v, 16*p+k)) begin
        failures++;
        if (failures < 10) $display("FAIL count p=%0d v=%0d k=%0d got %0d exp %0d",
                                    p, v, k, counts[k], ref_count(v, 16*p+k));
      end
    end
  endtask

  initial begin
    op = PE_NOP; pe_en = '0; sr_bus = '0; cur_row = '0;
    for (int r = 0; r < 48; r++) for (int c = 0; c < 48; c++)
      win[r][c] = ((r - 24) * (r - 24) + (c - 20) * (c - 20) < 150) ^ ($urandom_range(0, 9) == 0);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur[r][c] = win[r+14][c+12];
    for (int k = 0; k < 16; k++) m_sad[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      for (int r = 0; r < 16; r++) step(r == 0 ? PE_CNT_FIRST : PE_CNT_ADD, r, p, 0);
      check_counts(0, p);
      for (int v = 0; v < 32; v++) begin
        if ($urandom_range(0, 3) == 0) begin
          logic [15:0] en;
          en = 16'($urandom());
          for (int r = 0; r < 16; r++) begin
            step(r == 0 ? PE_SAD_FIRST : PE_SAD_ACC, v + r, p, r);
            pe_en = en;
          end
          for (int k = 0; k < 16; k++) if (en[k]) m_sad[k] = ref_sad(v, 16*p+k);
          @(negedge clk);
          op = PE_NOP; pe_en = '0;
          #1;
          for (int k = 0; k < 16; k++) begin
            checks++;
            if (int'(sads[k]) != m_sad[k]) begin
              failures++;
              if (failures < 10) $display("FAIL sad p=%0d v=%0d k=%0d got %0d exp %0d",
                                          p, v, k, sads[k], m_sad[k]);
            end
          end
        end
        if (v < 31) begin
          step(PE_CNT_ADD, v + 16, p, 0);
          step(PE_CNT_SUB, v, p, 0);
          check_counts(v + 1, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
