// tb_moving_average3: self-checking test of the three-point moving sum.
//
// A random sample stream (with runs of large values to force wrap-around) is
// driven after reset.  A reference keeps its own history of the last two
// samples and expects (x[t] + x[t-1] + x[t-2]) mod 256 in the same cycle as
// x[t]; this also checks the latency: zero cycles for the newest sample and
// exactly one and two register stages for the older ones.
module tb_moving_average3;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int h1 = 0, h2 = 0, e, wraps = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rst;
  logic [7:0] in_i, out_o;

  moving_average3 #(.BIT_WIDTH(8)) dut (.clk, .rst, .in_i, .out_o);

  initial begin
    rst = 1; in_i = 8'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 1000; k++) begin
      in_i = ((k / 50) % 2 == 1) ? 8'(200 + $urandom_range(0, 55)) : 8'($urandom_range(0, 80));
      #1;
      e = (int'(in_i) + h1 + h2) % 256;
      if (int'(in_i) + h1 + h2 > 255) wraps++;
      checks++;
      if (int'(out_o) != e) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d: got %0d expected %0d", k, out_o, e);
      end
      @(posedge clk);
      h2 = h1; h1 = int'(in_i);
      @(negedge clk);
    end
    // reset clears the history: after reset the output equals the input
    rst = 1; @(negedge clk); rst = 0; in_i = 8'd17; #1;
    checks++; if (out_o != 8'd17) begin failures++; $display("FAIL after reset: %0d", out_o); end
    checks++; if (wraps == 0) failures++;
    $display("wrap-arounds %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
