// tb_bme_adder_tree: exhaustive check of the 16-bit ones-counting tree
// against a bit-by-bit count, plus one random check of an 8-bit instance.
module tb_bme_adder_tree;
  int checks = 0, failures = 0;
  logic [15:0] bits;
  logic [4:0]  sum;
  logic [7:0]  bits8;
  logic [3:0]  sum8;

  bme_adder_tree #(.W(16)) dut  (.bits(bits),  .sum(sum));
  bme_adder_tree #(.W(8))  dut8 (.bits(bits8), .sum(sum8));

  function automatic int ref_ones(input logic [15:0] b);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(b[i]);
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      bits  = 16'(v);
      bits8 = 8'(v);
      #1;
      checks++;
      if (int'(sum) != ref_ones(bits)) begin
        failures++;
        if (failures < 10) $display("FAIL bits=%h sum=%0d exp=%0d", bits, sum, ref_ones(bits));
      end
      checks++;
      if (int'(sum8) != ref_ones({8'h00, bits8})) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
