// c4ml_pkg: types and width rules shared by the quantized-neuron modules.
//
// A neuron is built from three choices made at elaboration time: how an input
// is multiplied by a weight (the quantization scheme), how the products are
// summed, and which activation function is applied.  The schemes are:
//   QUANT_UNIFORM        signed input times signed weight, summed by an adder tree
//   QUANT_BINARY_WEIGHT  signed input, 1-bit weight: +x for weight 1, -x for weight 0
//   QUANT_BINARIZED      1-bit input and weight: XNOR as the product, popcount as the sum
// The activations are ReLU of (act - thresh) and the sign test act >= thresh.
//
// The width functions size every intermediate so that no bit is lost for any
// input: a product is as wide as its two operands together, and an adder tree
// over N products grows by clog2(N) bits.  These rules are this design's own
// sizing; the generator it follows infers widths the same way.
package c4ml_pkg;

  typedef enum logic [1:0] {
    QUANT_UNIFORM       = 2'd0,
    QUANT_BINARY_WEIGHT = 2'd1,
    QUANT_BINARIZED     = 2'd2
  } quant_e;

  typedef enum logic {
    ACT_RELU = 1'b0,
    ACT_SIGN = 1'b1
  } act_e;

  // Width of one product.
  function automatic int unsigned prod_width(quant_e q, int unsigned in_w, int unsigned w_w);
    case (q)
      QUANT_UNIFORM:       return in_w + w_w;
      QUANT_BINARY_WEIGHT: return in_w + 1;
      default:             return 1;
    endcase
  endfunction

  // Width of the pre-activation (sum of N products).  Signed for the first two
  // schemes, an unsigned popcount for the binarized one.
  function automatic int unsigned pact_width(quant_e q, int unsigned n, int unsigned in_w,
                                             int unsigned w_w);
    if (q == QUANT_BINARIZED) return $clog2(n + 1);
    return prod_width(q, in_w, w_w) + $clog2(n);
  endfunction

  // Width of the neuron output: one bit for the sign test, one bit more than the
  // pre-activation for ReLU so that act - thresh cannot wrap.
  function automatic int unsigned out_width(quant_e q, act_e a, int unsigned n,
                                            int unsigned in_w, int unsigned w_w);
    if (a == ACT_SIGN) return 1;
    return pact_width(q, n, in_w, w_w) + 1;
  endfunction

endpackage
