// tb_fir_filter: self-checking test of the FIR generator in four configurations.
//
//   avg    coefficients 1,1,1      (the default parameters)
//   delay  coefficients 0,1        (one-cycle delay)
//   tri    coefficients 1,2,3,2,1  (triangular impulse response)
//   one    a single coefficient 3  (no delay line at all)
// A random stream is driven into all four; a reference history of past samples
// gives the expected sum of coefficient times sample for each, in the same
// cycle as the newest sample.  An impulse after reset checks that each filter's
// impulse response is its coefficient list, one coefficient per cycle.
module tb_fir_filter;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst;
  logic [7:0]  in_i;
  logic [10:0] avg_out;
  logic [9:0]  dly_out;
  logic [12:0] tri_out;
  logic [9:0]  one_out;

  fir_filter dut_avg (.clk, .rst, .in_i, .out_o(avg_out));
  fir_filter #(.BIT_WIDTH(8), .N(2), .COEF_W(1), .COEFFS({1'b1, 1'b0}))
    dut_dly (.clk, .rst, .in_i, .out_o(dly_out));
  fir_filter #(.BIT_WIDTH(8), .N(5), .COEF_W(2), .COEFFS({2'd1, 2'd2, 2'd3, 2'd2, 2'd1}))
    dut_tri (.clk, .rst, .in_i, .out_o(tri_out));
  fir_filter #(.BIT_WIDTH(8), .N(1), .COEF_W(2), .COEFFS(2'd3))
    dut_one (.clk, .rst, .in_i, .out_o(one_out));

  int hist[5];  // hist[i] = sample i cycles old
  int c_avg[3] = '{1, 1, 1};
  int c_dly[2] = '{0, 1};
  int c_tri[5] = '{1, 2, 3, 2, 1};

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", name, got, exp);
    end
  endtask

  task automatic step_and_check(logic [7:0] x);
    automatic int ea, ed, et;
    in_i = x;
    hist[0] = int'(x);
    #1;
    ea = 0; ed = 0; et = 0;
    for (int i = 0; i < 3; i++) ea += c_avg[i] * hist[i];
    for (int i = 0; i < 2; i++) ed += c_dly[i] * hist[i];
    for (int i = 0; i < 5; i++) et += c_tri[i] * hist[i];
    check("avg", int'(avg_out), ea);
    check("delay", int'(dly_out), ed);
    check("tri", int'(tri_out), et);
    check("one", int'(one_out), 3 * hist[0]);
    @(posedge clk);
    for (int i = 4; i > 0; i--) hist[i] = hist[i-1];
    @(negedge clk);
  endtask

  initial begin
    rst = 1; in_i = '1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (hist[i]) hist[i] = 0;
    // impulse of height 1: outputs must trace the coefficient lists
    step_and_check(8'd1);
    for (int k = 0; k < 6; k++) step_and_check(8'd0);
    // random stream, including full-scale samples
    for (int k = 0; k < 1000; k++) step_and_check((k % 10 == 0) ? 8'hff : 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
