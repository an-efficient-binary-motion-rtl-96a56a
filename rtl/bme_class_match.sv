// bme_class_match: classification and class-match comparison.
//
// A BAB is classified by its number of ones c. With 2**class_shift ones per
// class the class is ceil(c / 2**class_shift): for class_shift = 4 class 1
// holds 1..16 ones, class 2 17..32, and so on; class_shift = 0 gives one
// class per count. A candidate matches the current BAB when the two classes
// differ by at most `overlap` (0 = same class only). In full-search mode
// every candidate matches. Combinational; the uniform class width and the
// way overlap is applied are this design's reading of the classification.
module bme_class_match #(
  parameter int unsigned NP = bme_pkg::N_PE,
  parameter int unsigned CW = bme_pkg::CNT_W
) (
  input  logic [CW-1:0] curr_mb,
  input  logic [CW-1:0] counts [NP],
  input  logic [2:0]    class_shift,
  input  logic [7:0]    overlap,
  input  logic          full_search,
  output logic [NP-1:0] match,
  output logic          any_match
);
  function automatic logic [CW-1:0] class_of(input logic [CW-1:0] c,
                                             input logic [2:0] s);
    logic [CW:0] rounded;
    rounded = {1'b0, c} + ((CW+1)'(1) << s) - (CW+1)'(1);
    return CW'(rounded >> s);
  endfunction

  logic [CW-1:0] cur_class;
  logic [CW-1:0] cand_class [NP];
  logic [CW-1:0] diff [NP];

  always_comb begin
    cur_class = class_of(curr_mb, class_shift);
    for (int k = 0; k < NP; k++) begin
      cand_class[k] = class_of(counts[k], class_shift);
      diff[k] = (cand_class[k] > cur_class) ? cand_class[k] - cur_class
                                            : cur_class - cand_class[k];
      match[k] = full_search || ({1'b0, diff[k]} <= (CW+1)'(overlap));
    end
  end

  assign any_match = |match;

endmodule
