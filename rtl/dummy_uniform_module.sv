// dummy_uniform_module: the worked example of a uniformly quantized neuron.
//
// Three 4-bit signed inputs x0..x2, constant weights 1, -2, 3, threshold -1,
// shift 1 and ReLU, so
//     out = max(0, 2*(x0 - 2*x1 + 3*x2) + 1).
// The pre-activation (9 bits) lies in -46..44, so the doubled value never
// wraps and the output (10 bits, unsigned) lies in 0..89.
// Combinational: the output follows the inputs in the same cycle.
// The weights, threshold, shift and activation are the example's; the output
// width is the one the neuron module derives (the example leaves it inferred).
module dummy_uniform_module
  import c4ml_pkg::*;
(
  input  logic [2:0][3:0] in_i,
  output logic [9:0]      out_o
);

  neuron #(
    .QUANT  (QUANT_UNIFORM),
    .ACT    (ACT_RELU),
    .N      (3),
    .IN_W   (4),
    .W_W    (3),
    .WEIGHTS({3'b011, 3'b110, 3'b001}),  // w2 = 3, w1 = -2, w0 = 1
    .THRESH (-1),
    .SHIFT  (1)
  ) u_neuron (
    .in_i (in_i),
    .out_o(out_o)
  );

endmodule
