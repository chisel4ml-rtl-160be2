// tb_chisel4ml_top: end-to-end test of the whole design at its default sizes.
//
// Every cycle it drives new random inputs into all six circuits at once and
// checks every output against references computed here:
//   ma_out        (x[t] + x[t-1] + x[t-2]) mod 256
//   fir_avg_out   x[t] + x[t-1] + x[t-2]             (full precision)
//   fir_delay_out x[t-1]
//   fir_tri_out   x[t] + 2x[t-1] + 3x[t-2] + 2x[t-3] + x[t-4]
//   uq_out        max(0, 2*(x0 - 2*x1 + 3*x2) + 1)
//   bnn_out       (number of inputs equal to weights 1,0,1) >= 2
// It counts how often each mechanism of the design happened and fails if one
// never did: moving-sum wrap-around, FIR sum above 255 (the growth the wider
// output exists for), ReLU clipping and passing, both sign results, and a
// reset in mid-stream clearing the delay lines.
module tb_chisel4ml_top;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic            rst;
  logic [7:0]      ma_in, ma_out, fir_in;
  logic [10:0]     fir_avg_out;
  logic [9:0]      fir_delay_out;
  logic [12:0]     fir_tri_out;
  logic [2:0][3:0] uq_in;
  logic [9:0]      uq_out;
  logic [2:0]      bnn_in;
  logic            bnn_out;

  chisel4ml_top dut (.*);

  int mh[3];  // moving-average input history, mh[i] = i cycles old
  int fh[5];  // FIR input history

  // mechanism counters
  int n_ma_wrap = 0, n_fir_grow = 0, n_relu_clip = 0, n_relu_pass = 0;
  int n_sign0 = 0, n_sign1 = 0, n_reset = 0;

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0t: got %0d expected %0d", name, $time, got, exp);
    end
  endtask

  function automatic int sext4(logic [3:0] v);
    return int'($signed(v));
  endfunction

  task automatic cycle(logic do_reset);
    automatic int e, s, agree;
    ma_in  = 8'($urandom);
    fir_in = ((($urandom % 4) == 0)) ? 8'($urandom_range(200, 255)) : 8'($urandom);
    uq_in  = 12'($urandom);
    bnn_in = 3'($urandom);
    mh[0] = int'(ma_in);
    fh[0] = int'(fir_in);
    #1;
    s = mh[0] + mh[1] + mh[2];
    if (s > 255) n_ma_wrap++;
    check("ma_out", int'(ma_out), s % 256);
    s = fh[0] + fh[1] + fh[2];
    if (s > 255) n_fir_grow++;
    check("fir_avg_out", int'(fir_avg_out), s);
    check("fir_delay_out", int'(fir_delay_out), fh[1]);
    check("fir_tri_out", int'(fir_tri_out), fh[0] + 2*fh[1] + 3*fh[2] + 2*fh[3] + fh[4]);
    e = 2 * (sext4(uq_in[0]) - 2 * sext4(uq_in[1]) + 3 * sext4(uq_in[2])) + 1;
    if (e <= 0) begin e = 0; n_relu_clip++; end else n_relu_pass++;
    check("uq_out", int'(uq_out), e);
    agree = int'(bnn_in[0] == 1'b1) + int'(bnn_in[1] == 1'b0) + int'(bnn_in[2] == 1'b1);
    e = (agree >= 2) ? 1 : 0;
    if (e == 1) n_sign1++; else n_sign0++;
    check("bnn_out", int'(bnn_out), e);
    rst = do_reset;
    @(posedge clk);
    if (do_reset) begin
      foreach (mh[i]) mh[i] = 0;
      foreach (fh[i]) fh[i] = 0;
      n_reset++;
    end else begin
      for (int i = 2; i > 0; i--) mh[i] = mh[i-1];
      for (int i = 4; i > 0; i--) fh[i] = fh[i-1];
    end
    @(negedge clk);
    rst = 0;
  endtask

  initial begin
    rst = 1; ma_in = '0; fir_in = '0; uq_in = '0; bnn_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (mh[i]) mh[i] = 0;
    foreach (fh[i]) fh[i] = 0;
    for (int k = 0; k < 3000; k++) cycle(k == 1500);

    $display("mechanisms: ma_wrap=%0d fir_growth=%0d relu_clip=%0d relu_pass=%0d sign0=%0d sign1=%0d reset=%0d",
             n_ma_wrap, n_fir_grow, n_relu_clip, n_relu_pass, n_sign0, n_sign1, n_reset);
    checks++; if (n_ma_wrap   == 0) begin failures++; $display("FAIL no moving-sum wrap"); end
    checks++; if (n_fir_grow  == 0) begin failures++; $display("FAIL no FIR growth"); end
    checks++; if (n_relu_clip == 0) begin failures++; $display("FAIL no ReLU clip"); end
    checks++; if (n_relu_pass == 0) begin failures++; $display("FAIL no ReLU pass"); end
    checks++; if (n_sign0     == 0) begin failures++; $display("FAIL no sign 0"); end
    checks++; if (n_sign1     == 0) begin failures++; $display("FAIL no sign 1"); end
    checks++; if (n_reset     == 0) begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
