// neuron: one artificial neuron, y = f(shift(sum_i x_i * w_i), thresh), generic in
// its quantization scheme.
//
// The weights, the threshold and the shift are fixed when the module is
// elaborated, so the multipliers are multiplications by constants and the
// whole neuron is combinational: the output follows the input in the same
// cycle, with no clock.  The threshold plays the role of a negated bias.
//
// Datapath, in order:
//   1. product per input, chosen by QUANT (see c4ml_pkg): x*w, w ? x : -x, or XNOR(x, w)
//   2. sum of the products: signed sum, or popcount for the binarized scheme
//   3. left shift of the sum by |SHIFT|, keeping the sum's own width (the low bits)
//   4. activation, chosen by ACT:
//        ACT_RELU  out = act - THRESH if that is above zero, else 0 (unsigned, OUT_W bits)
//        ACT_SIGN  out = (act >= THRESH), 1 bit
// The multiply, sum and activation functions, the shift and the parameter set
// follow the generator this module is written from.  Choices of this design:
// one common weight width W_W, widths sized so nothing overflows (c4ml_pkg),
// and the sign test comparing the popcount as an unsigned number.
//
// Interface: in_i[i] is input i (IN_W bits; bit 0 only for QUANT_BINARIZED);
// WEIGHTS[i] is weight i (W_W bits, signed for QUANT_UNIFORM, bit 0 only for
// the two binary schemes).  Defaults: the three-input uniform example neuron,
// weights 1, -2, 3, threshold -1, shift 1, ReLU.
module neuron
  import c4ml_pkg::*;
#(
  parameter quant_e      QUANT = QUANT_UNIFORM,
  parameter act_e        ACT   = ACT_RELU,
  parameter int unsigned N     = 3,
  parameter int unsigned IN_W  = 4,
  parameter int unsigned W_W   = 3,
  parameter logic [N-1:0][W_W-1:0] WEIGHTS = {3'b011, 3'b110, 3'b001},  // w2=3, w1=-2, w0=1
  parameter int          THRESH = -1,
  parameter int          SHIFT  = 1,
  parameter int unsigned OUT_W  = out_width(QUANT, ACT, N, IN_W, W_W)
) (
  input  logic [N-1:0][IN_W-1:0] in_i,
  output logic [OUT_W-1:0]       out_o
);

  localparam int unsigned PROD_W = prod_width(QUANT, IN_W, W_W);
  localparam int unsigned PACT_W = pact_width(QUANT, N, IN_W, W_W);
  // Activation arithmetic: two bits above the pre-activation hold a signed
  // difference of two PACT_W-bit values (or an unsigned popcount) exactly.
  localparam int unsigned ACT_W  = PACT_W + 2;
  localparam int unsigned SH     = (SHIFT < 0) ? -SHIFT : SHIFT;

  // The threshold must lie within one bit of the pre-activation's range, so
  // that act - THRESH fits ACT_W bits and the ReLU result fits OUT_W bits.
  if (THRESH < -(2 ** PACT_W) || THRESH >= 2 ** PACT_W) begin : g_thresh_range
    $error("neuron: THRESH %0d outside -2**%0d .. 2**%0d-1", THRESH, PACT_W, PACT_W);
  end

  logic signed [PACT_W-1:0] p_act;   // pre-activation (sum of products)
  logic signed [PACT_W-1:0] s_act;   // shifted pre-activation
  logic signed [ACT_W-1:0]  act_x;   // s_act extended for the activation
  logic signed [ACT_W-1:0]  thr_x;   // threshold at the same width
  logic signed [ACT_W-1:0]  diff;    // act - thresh

  // 1 + 2: products and their sum.
  always_comb begin
    logic signed [PROD_W-1:0] prod;
    p_act = '0;
    for (int i = 0; i < N; i++) begin
      case (QUANT)
        QUANT_UNIFORM: begin
          prod = PROD_W'($signed(in_i[i])) * PROD_W'($signed(WEIGHTS[i]));
          p_act = p_act + PACT_W'(prod);
        end
        QUANT_BINARY_WEIGHT: begin
          prod = WEIGHTS[i][0] ? PROD_W'($signed(in_i[i])) : -PROD_W'($signed(in_i[i]));
          p_act = p_act + PACT_W'(prod);
        end
        default: begin
          // XNOR product, popcount sum (unsigned).
          p_act = p_act + PACT_W'({1'b0, ~(in_i[i][0] ^ WEIGHTS[i][0])});
        end
      endcase
    end
  end

  // 3: shift left, keep the low PACT_W bits.
  assign s_act = PACT_W'(p_act << SH);

  // 4: activation.
  always_comb begin
    if (QUANT == QUANT_BINARIZED) act_x = ACT_W'($unsigned(s_act));  // zero-extend popcount
    else                          act_x = ACT_W'(s_act);             // sign-extend
    thr_x = ACT_W'(THRESH);
    diff  = act_x - thr_x;
    if (ACT == ACT_SIGN) out_o = OUT_W'(act_x >= thr_x);
    else                 out_o = (diff > 0) ? OUT_W'($unsigned(diff)) : '0;
  end

endmodule
