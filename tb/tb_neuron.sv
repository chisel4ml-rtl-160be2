// tb_neuron: self-checking test of the generic neuron in five configurations.
//
// Each configuration gets random (or exhaustive) input vectors, and its output
// is compared with a reference computed here in plain integer arithmetic:
// products, sum, shift truncated to the pre-activation width, then ReLU or the
// sign test.  Configurations:
//   uq_relu   uniform, ReLU, the module defaults (weights 1,-2,3, thresh -1, shift 1)
//   uq_sign   uniform, sign, 4 inputs of 3 bits, 4-bit weights, shift 2 (wraps)
//   bw_relu   binary weight, ReLU, 4 inputs of 4 bits, thresh -3
//   bnn_sign  binarized, sign, 5 inputs, thresh 3
//   bnn_relu  binarized, ReLU, 5 inputs, thresh 1, shift 1 (wraps)
// The neuron is combinational: outputs are checked 1 ns after the inputs change.
module tb_neuron;
  import c4ml_pkg::*;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int s, e;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- devices under test ----------------
  logic [2:0][3:0] uq_in;   logic [9:0] uq_out;
  neuron u_uq_relu (.in_i(uq_in), .out_o(uq_out));

  localparam logic [3:0][3:0] UQS_W = {4'd5, 4'b1001, 4'd2, 4'b1111};  // w3=5 w2=-7 w1=2 w0=-1
  logic [3:0][2:0] uqs_in;  logic uqs_out;
  neuron #(.QUANT(QUANT_UNIFORM), .ACT(ACT_SIGN), .N(4), .IN_W(3), .W_W(4),
           .WEIGHTS(UQS_W), .THRESH(3), .SHIFT(2))
    u_uq_sign (.in_i(uqs_in), .out_o(uqs_out));

  localparam logic [3:0] BW_W = 4'b1010;
  logic [3:0][3:0] bw_in;   logic [7:0] bw_out;  // PACT_W = 5+2 = 7, out 8
  neuron #(.QUANT(QUANT_BINARY_WEIGHT), .ACT(ACT_RELU), .N(4), .IN_W(4), .W_W(1),
           .WEIGHTS(BW_W), .THRESH(-3), .SHIFT(0))
    u_bw_relu (.in_i(bw_in), .out_o(bw_out));

  localparam logic [4:0] BNN_W = 5'b10110;
  logic [4:0] bnn_in;  logic bnns_out;  logic [3:0] bnnr_out;  // PACT_W = 3, out 4
  neuron #(.QUANT(QUANT_BINARIZED), .ACT(ACT_SIGN), .N(5), .IN_W(1), .W_W(1),
           .WEIGHTS(BNN_W), .THRESH(3), .SHIFT(0))
    u_bnn_sign (.in_i(bnn_in), .out_o(bnns_out));
  neuron #(.QUANT(QUANT_BINARIZED), .ACT(ACT_RELU), .N(5), .IN_W(1), .W_W(1),
           .WEIGHTS(BNN_W), .THRESH(1), .SHIFT(1))
    u_bnn_relu (.in_i(bnn_in), .out_o(bnnr_out));

  // ---------------- reference helpers ----------------
  function automatic int sext(int v, int w);  // low w bits of v, as signed
    int m = v & ((1 << w) - 1);
    return (m >= (1 << (w - 1))) ? m - (1 << w) : m;
  endfunction

  function automatic int relu(int a, int t);
    return (a - t > 0) ? a - t : 0;
  endfunction

  task automatic check(string name, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", name, got, exp);
    end
  endtask

  int relu_zero = 0, relu_pos = 0, sign_one = 0, sign_zero = 0;

  initial begin
    // uq_relu: exhaustive over 3 x 4-bit signed inputs.
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++)
        for (int c = -8; c < 8; c++) begin
          @(negedge clk);
          uq_in = {4'(c), 4'(b), 4'(a)};
          #1;
          s = a * 1 + b * (-2) + c * 3;
          e = relu(sext(s << 1, 9), -1);
          if (e == 0) relu_zero++; else relu_pos++;
          check("uq_relu", int'(uq_out), e);
        end

    // uq_sign: random inputs.
    for (int k = 0; k < 2000; k++) begin
      automatic int x[4];
      @(negedge clk);
      for (int i = 0; i < 4; i++) x[i] = sext($urandom, 3);
      uqs_in = {3'(x[3]), 3'(x[2]), 3'(x[1]), 3'(x[0])};
      #1;
      s = x[0] * (-1) + x[1] * 2 + x[2] * (-7) + x[3] * 5;
      e = (sext(s << 2, 9) >= 3) ? 1 : 0;
      if (e != 0) sign_one++; else sign_zero++;
      check("uq_sign", int'(uqs_out), e);
    end

    // bw_relu: random inputs; weight bit 1 adds x, 0 subtracts it.
    for (int k = 0; k < 2000; k++) begin
      automatic int x[4];
      @(negedge clk);
      for (int i = 0; i < 4; i++) x[i] = sext($urandom, 4);
      bw_in = {4'(x[3]), 4'(x[2]), 4'(x[1]), 4'(x[0])};
      #1;
      s = 0;
      for (int i = 0; i < 4; i++) s += BW_W[i] ? x[i] : -x[i];
      e = relu(s, -3);
      check("bw_relu", int'(bw_out), e);
    end

    // binarized: exhaustive over 5 bits.
    for (int v = 0; v < 32; v++) begin
      automatic int pc;
      @(negedge clk);
      bnn_in = 5'(v);
      #1;
      pc = 0;
      for (int i = 0; i < 5; i++) pc += (v[i] == BNN_W[i]) ? 1 : 0;
      check("bnn_sign", int'(bnns_out), (pc >= 3) ? 1 : 0);
      check("bnn_relu", int'(bnnr_out), relu((pc << 1) & 7, 1));
    end

    // every activation branch must have been taken
    checks++; if (relu_zero == 0 || relu_pos == 0) failures++;
    checks++; if (sign_zero == 0 || sign_one == 0) failures++;
    $display("relu clipped %0d passed %0d, sign 0:%0d 1:%0d", relu_zero, relu_pos, sign_zero, sign_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
