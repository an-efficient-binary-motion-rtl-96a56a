// tb_bme_cas: random SAD slots with random masks; after each update the
// kept best SAD and offset must equal a reference that keeps the first
// strict minimum in arrival order (lowest PE index within a slot).
module tb_bme_cas;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        clear, update;
  logic [15:0] mask;
  logic [8:0]  sads [16];
  logic [4:0]  h_base, v_pos;
  logic [8:0]  best_sad;
  logic [4:0]  best_h, best_v;
  logic        found;

  bme_cas dut (.clk, .rst_n, .clear, .update, .mask, .sads, .h_base, .v_pos,
               .best_sad, .best_h, .best_v, .found);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_sad, m_h, m_v;
    bit m_found;
    clear = 0; update = 0; mask = 0; h_base = 0; v_pos = 0;
    for (int k = 0; k < 16; k++) sads[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      @(negedge clk);
      clear = 1; update = 0;
      m_found = 0; m_sad = 0; m_h = 0; m_v = 0;
      @(negedge clk);
      clear = 0;
      for (int slot = 0; slot < 30; slot++) begin
        update = 1;
        mask   = 16'($urandom()) & 16'($urandom());
        if (slot % 7 == 3) mask = 16'h0000;
        h_base = 5'($urandom_range(0, 1) * 16);
        v_pos  = 5'($urandom_range(0, 31));
        for (int k = 0; k < 16; k++) sads[k] = 9'($urandom_range(0, 40));
        for (int k = 0; k < 16; k++)
          if (mask[k] && (!m_found || int'(sads[k]) < m_sad)) begin
            m_found = 1; m_sad = sads[k]; m_h = h_base + k; m_v = v_pos;
          end
        @(negedge clk);
        update = 0;
        // non-update cycle with other data: must be ignored
        mask = '1;
        for (int k = 0; k < 16; k++) sads[k] = 9'd0;
        #1;
        checks++;
        if (found !== m_found || (m_found && (int'(best_sad) != m_sad ||
            int'(best_h) != m_h || int'(best_v) != m_v))) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d slot=%0d got %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d",
            s, slot, found, best_sad, best_h, best_v, m_found, m_sad, m_h, m_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
