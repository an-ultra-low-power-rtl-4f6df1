// svm_decision: decision function and threshold of the SVM.
//
// Sums the NUM_SV weighted kernel terms with fp_adder_tree and compares the
// result with zero: flag = 1 (motion artefact) when the sum is greater than
// 0, 0 otherwise. There is no bias term; the document drops it because it
// cost resources without improving accuracy. Both the decision value and
// the flag are registered on en, once per base period. Treating NaN as
// "no artefact" is this design's choice.
module svm_decision
  import fp32_pkg::*;
#(
  parameter int unsigned NUM_SV = 55
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [31:0] k [NUM_SV],
  output logic [31:0] sum,
  output logic        flag
);

  logic [31:0] total;
  logic        gt_zero;

  fp_adder_tree #(.N(NUM_SV)) u_tree (.din(k), .sum(total));

  // relational operator: total > 0
  assign gt_zero = !total[31] && !is_zero(fp32_t'(total)) && !is_nan(fp32_t'(total));

  always_ff @(posedge clk) begin
    if (rst) begin
      sum  <= FP_ZERO;
      flag <= 1'b0;
    end else if (en) begin
      sum  <= total;
      flag <= gt_zero;
    end
  end

endmodule
