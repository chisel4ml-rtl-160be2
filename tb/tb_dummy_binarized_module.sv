// tb_dummy_binarized_module: exhaustive check of the binarized example neuron.
//
// For each of the 8 input vectors the expected output is worked out here: count
// the inputs equal to their weight (weights w0=1, w1=0, w2=1) and compare the
// count with the threshold 2.  Each vector is applied several times, in a
// shuffled order, to catch any dependence on the previous input.
module tb_dummy_binarized_module;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int agree, e, ones = 0, zeros = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] in_i;
  logic       out_o;

  dummy_binarized_module dut (.in_i(in_i), .out_o(out_o));

  localparam logic [2:0] W = 3'b101;

  initial begin
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      in_i = (k < 8) ? 3'(k) : 3'($urandom);
      #1;
      agree = 0;
      for (int i = 0; i < 3; i++) if (in_i[i] == W[i]) agree++;
      e = (agree >= 2) ? 1 : 0;
      if (e == 1) ones++; else zeros++;
      checks++;
      if (int'(out_o) != e) begin
        failures++;
        $display("FAIL in=%b: got %0d expected %0d", in_i, out_o, e);
      end
    end
    checks++; if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
