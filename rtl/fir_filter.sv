// fir_filter: FIR filter generated from a list of unsigned coefficients.
//
//     out[t] = sum_{i=0}^{N-1} COEFFS[i] * in[t-i]
//
// A tapped delay line holds the last N-1 input samples; tap 0 is the current
// input itself, so a filter of N coefficients has N-1 registers and the output
// responds to a new sample in the same cycle.  With COEFFS = 1,1,1 it is the
// three-point moving sum, with 0,1 a one-cycle delay, with 1,2,3,2,1 a
// triangular impulse response.  All products are summed at full precision:
// OUT_W = BIT_WIDTH + COEF_W + clog2(N) bits never overflow.
//
// Interface: in_i is sampled at every rising clk edge; out_o is combinational
// from in_i and the delay line.  rst (synchronous, active high) clears the
// delay line.  COEFFS[i] multiplies the sample i cycles old.
// The generator structure (delay line, one product per tap, sum) follows the
// source; the reset, the output width and tap 0 being unregistered (so that the
// 1,1,1 filter equals the moving sum and 0,1 is a one-cycle delay) are this
// design's choices.
module fir_filter #(
  parameter int unsigned BIT_WIDTH = 8,
  parameter int unsigned N         = 3,
  parameter int unsigned COEF_W    = 1,
  parameter logic [N-1:0][COEF_W-1:0] COEFFS = {N{COEF_W'(1)}},
  parameter int unsigned OUT_W     = BIT_WIDTH + COEF_W + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [BIT_WIDTH-1:0] in_i,
  output logic [OUT_W-1:0]     out_o
);

  // taps[i] is the input delayed by i cycles.
  logic [N-1:0][BIT_WIDTH-1:0] taps;

  assign taps[0] = in_i;

  if (N > 1) begin : g_line
    logic [N-2:0][BIT_WIDTH-1:0] dly;  // dly[i] = input delayed by i+1 cycles

    always_ff @(posedge clk) begin
      if (rst) dly <= '0;
      else begin
        dly[0] <= in_i;
        for (int i = 1; i < N - 1; i++) dly[i] <= dly[i-1];
      end
    end

    assign taps[N-1:1] = dly;
  end

  always_comb begin
    out_o = '0;
    for (int i = 0; i < N; i++)
      out_o = out_o + OUT_W'(taps[i]) * OUT_W'(COEFFS[i]);
  end

endmodule
