// tb_bme_class_match: random current/candidate counts and configurations,
// plus the class boundaries of the 16-class table (1..16 -> class 1,
// 17..32 -> class 2), checked against a reference classification.
module tb_bme_class_match;
  int checks = 0, failures = 0;
  logic [8:0]  curr_mb;
  logic [8:0]  counts [16];
  logic [2:0]  class_shift;
  logic [7:0]  overlap;
  logic        full_search;
  logic [15:0] match;
  logic        any_match;

  bme_class_match dut (.curr_mb, .counts, .class_shift, .overlap, .full_search,
                       .match, .any_match);

  function automatic int cls(input int c, input int s);
    return (c + (1 << s) - 1) / (1 << s);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [15:0] exp;
    int d;
    #1;
    for (int k = 0; k < 16; k++) begin
      d = cls(int'(counts[k]), int'(class_shift)) - cls(int'(curr_mb), int'(class_shift));
      if (d < 0) d = -d;
      exp[k] = full_search || (d <= int'(overlap));
    end
    checks++;
    if (match !== exp || any_match !== (|exp)) begin
      failures++;
      if (failures < 10) $display("FAIL cur=%0d s=%0d ov=%0d fs=%0d match=%h exp=%h",
                                  curr_mb, class_shift, overlap, full_search, match, exp);
    end
  endtask

  initial begin
    // Table I boundaries with 16 ones per class, no overlap
    class_shift = 3'd4; overlap = 0; full_search = 0; curr_mb = 9'd20;  // class 2
    for (int k = 0; k < 16; k++) counts[k] = 9'(k + 10);                 // 10..25
    check();
    if (match !== 16'b1111_1111_1000_0000) begin
      failures++; $display("FAIL table I boundary match=%b", match);
    end
    for (int t = 0; t < 4000; t++) begin
      curr_mb     = 9'($urandom_range(0, 256));
      class_shift = 3'($urandom_range(0, 4));
      overlap     = 8'($urandom_range(0, 8));
      full_search = ($urandom_range(0, 19) == 0);
      for (int k = 0; k < 16; k++) begin
        int c;
        c = int'(curr_mb) + $urandom_range(0, 40) - 20;
        if (c < 0) c = 0;
        if (c > 256) c = 256;
        counts[k] = 9'(c);
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
