// tb_dummy_uniform_module: exhaustive check of the uniform example neuron.
//
// All 4096 input vectors are applied; the expected output
// max(0, 2*(x0 - 2*x1 + 3*x2) + 1) is computed here with integers.  The test
// also counts how often ReLU clipped and how often it passed a value, and
// checks the largest output, 89, is reached.
module tb_dummy_uniform_module;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int e, clipped = 0, passed = 0, maxv = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0][3:0] in_i;
  logic [9:0]      out_o;

  dummy_uniform_module dut (.in_i(in_i), .out_o(out_o));

  initial begin : stimulus
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++)
        for (int c = -8; c < 8; c++) begin
          @(negedge clk);
          in_i = {4'(c), 4'(b), 4'(a)};
          #1;
          e = 2 * (a - 2 * b + 3 * c) + 1;
          if (e < 0) e = 0;
          if (e == 0) clipped++; else passed++;
          if (int'(out_o) > maxv) maxv = int'(out_o);
          checks++;
          if (int'(out_o) != e) begin
            failures++;
            if (failures < 10) $display("FAIL x=(%0d,%0d,%0d): got %0d expected %0d", a, b, c, out_o, e);
          end
        end
    checks++; if (clipped == 0 || passed == 0) failures++;
    checks++; if (maxv != 89) begin failures++; $display("FAIL max output %0d, expected 89", maxv); end
    $display("ReLU clipped %0d, passed %0d, max %0d", clipped, passed, maxv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
