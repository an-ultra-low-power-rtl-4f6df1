// svm_kernel_unit: the shared arithmetic of one support-vector channel.
//
//   y = alpha * exp(-GAMMA * sum_f (x[f] - sv[f])^2)
//
// i.e. one weighted Gaussian RBF kernel term of the SVM decision function.
// Per feature a subtractor and a squarer form (x - sv)^2; the squares are
// summed in a chain of adders, scaled by -GAMMA (one multiplier by the
// negated constant), passed through fp_exp and multiplied by the
// coefficient. The chain subtract -> square -> exponential -> multiply is the
// document's; the feature sum and the explicit -GAMMA gain are written out
// here from the kernel formula (GAMMA = 1 by default, as trained).
//
// Purely combinational; in the detector it is time-shared by all support
// vectors, one per fast clock cycle.
module svm_kernel_unit
  import fp32_pkg::*;
#(
  parameter int unsigned NUM_FEAT = 2,
  parameter logic [31:0] GAMMA    = GAMMA_DEFAULT
) (
  input  logic [31:0] x     [NUM_FEAT],
  input  logic [31:0] sv    [NUM_FEAT],
  input  logic [31:0] alpha,
  output logic [31:0] y
);

  localparam logic [31:0] NEG_GAMMA = {~GAMMA[31], GAMMA[30:0]};

  logic [31:0] diff [NUM_FEAT];
  logic [31:0] sq   [NUM_FEAT];
  logic [31:0] acc  [NUM_FEAT];
  logic [31:0] arg, kern;

  for (genvar f = 0; f < NUM_FEAT; f++) begin : g_feat
    fp_addsub u_sub (.a(x[f]), .b(sv[f]), .sub(1'b1), .y(diff[f]));
    fp_mul    u_sq  (.a(diff[f]), .b(diff[f]), .y(sq[f]));
    if (f == 0) begin : g_first
      assign acc[0] = sq[0];
    end else begin : g_add
      fp_addsub u_acc (.a(acc[f-1]), .b(sq[f]), .sub(1'b0), .y(acc[f]));
    end
  end

  fp_mul u_gamma (.a(acc[NUM_FEAT-1]), .b(NEG_GAMMA), .y(arg));
  fp_exp u_exp   (.a(arg), .y(kern));
  fp_mul u_alpha (.a(kern), .b(alpha), .y(y));

endmodule
