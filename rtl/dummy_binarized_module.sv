// dummy_binarized_module: the worked example of a binarized neuron.
//
// Three 1-bit inputs, weights 1, 0, 1 (w0, w1, w2), threshold 2, shift 0 and
// the sign activation.  Each product is XNOR(x_i, w_i) (1 when input and weight
// agree), the sum is the popcount of the three products, and
//     out = (popcount >= 2),
// i.e. the output is 1 when at least two inputs agree with their weights.
// Combinational: the output follows the inputs in the same cycle.
// The example lists both ReLU and the sign test as its activation; this module
// uses the sign test, the one whose types fit a 1-bit output.
module dummy_binarized_module
  import c4ml_pkg::*;
(
  input  logic [2:0] in_i,
  output logic       out_o
);

  neuron #(
    .QUANT  (QUANT_BINARIZED),
    .ACT    (ACT_SIGN),
    .N      (3),
    .IN_W   (1),
    .W_W    (1),
    .WEIGHTS(3'b101),  // w2 = 1, w1 = 0, w0 = 1
    .THRESH (2),
    .SHIFT  (0)
  ) u_neuron (
    .in_i (in_i),
    .out_o(out_o)
  );

endmodule
