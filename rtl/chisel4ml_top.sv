// chisel4ml_top: the example circuits of the design, side by side.
//
// Two independent groups of hardware share one clock and reset:
//   * stream filters: a three-point moving sum (moving_average3) and three FIR
//     filters built by the same generator (fir_filter) with the coefficient
//     sets 1,1,1 (moving sum, full precision), 0,1 (one-cycle delay) and
//     1,2,3,2,1 (triangular response).  All three FIRs see the same input
//     stream fir_in.
//   * quantized neurons: the uniform example (three 4-bit signed inputs,
//     weights 1,-2,3, threshold -1, shift 1, ReLU) and the binarized example
//     (three 1-bit inputs, weights 1,0,1, threshold 2, sign activation).
// The neurons are combinational and have no clock.  The filters sample their
// inputs at each rising edge and answer in the same cycle (tap 0 is the
// current input).  rst is synchronous and active high.
// Which examples are shown follows the source; placing them in one top and
// sharing the FIR input is this design's choice.
module chisel4ml_top #(
  parameter int unsigned BIT_WIDTH = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  // moving average
  input  logic [BIT_WIDTH-1:0]   ma_in,
  output logic [BIT_WIDTH-1:0]   ma_out,
  // FIR filters
  input  logic [BIT_WIDTH-1:0]   fir_in,
  output logic [BIT_WIDTH+2:0]   fir_avg_out,    // coefficients 1,1,1
  output logic [BIT_WIDTH+1:0]   fir_delay_out,  // coefficients 0,1
  output logic [BIT_WIDTH+4:0]   fir_tri_out,    // coefficients 1,2,3,2,1
  // uniform-quantized neuron
  input  logic [2:0][3:0]        uq_in,
  output logic [9:0]             uq_out,
  // binarized neuron
  input  logic [2:0]             bnn_in,
  output logic                   bnn_out
);

  moving_average3 #(.BIT_WIDTH(BIT_WIDTH)) u_ma (
    .clk, .rst, .in_i(ma_in), .out_o(ma_out)
  );

  fir_filter #(
    .BIT_WIDTH(BIT_WIDTH), .N(3), .COEF_W(1), .COEFFS({1'b1, 1'b1, 1'b1})
  ) u_fir_avg (
    .clk, .rst, .in_i(fir_in), .out_o(fir_avg_out)
  );

  fir_filter #(
    .BIT_WIDTH(BIT_WIDTH), .N(2), .COEF_W(1), .COEFFS({1'b1, 1'b0})  // c1 = 1, c0 = 0
  ) u_fir_delay (
    .clk, .rst, .in_i(fir_in), .out_o(fir_delay_out)
  );

  fir_filter #(
    .BIT_WIDTH(BIT_WIDTH), .N(5), .COEF_W(2),
    .COEFFS({2'd1, 2'd2, 2'd3, 2'd2, 2'd1})
  ) u_fir_tri (
    .clk, .rst, .in_i(fir_in), .out_o(fir_tri_out)
  );

  dummy_uniform_module u_uq (
    .in_i(uq_in), .out_o(uq_out)
  );

  dummy_binarized_module u_bnn (
    .in_i(bnn_in), .out_o(bnn_out)
  );

endmodule
