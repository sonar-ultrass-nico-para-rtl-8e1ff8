// tb_lpf_decimator: runs lpf_decimator at its default lengths (80 and 53)
// with an input strobe every 4 clocks and an output strobe on every 20th
// input strobe (the 160 kHz -> 8 kHz ratio, compressed in time). The input
// goes through four phases: random words, a DC level, a 2 kHz tone (which
// the first average's null at 2 kHz must remove) and a 1 kHz tone. A direct
// (non-recursive) software model sums the last 80 inputs and then the last
// 53 first-stage results, truncating each division towards zero; every
// output must match it exactly. The test also checks that a DC input comes
// out unchanged and that the 2 kHz tone is suppressed.
module tb_lpf_decimator;
  import sonar_pkg::*;
  localparam int K1 = 80, K2 = 53, DEC = 20, STEPS = 4000, GAP = 4;
  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   in_en = 1'b0, out_en = 1'b0;
  q2_14_t x = '0, y;
  logic   out_valid;
  int     xin [STEPS + 1];
  int     s3  [STEPS + 1];
  int     checks = 0, failures = 0;
  int     nout = 0;
  int     max2k = 0;

  lpf_decimator dut (.clk(clk), .rst(rst), .in_en(in_en), .x(x), .out_en(out_en),
                     .y(y), .out_valid(out_valid));

  always #5 clk = ~clk;

  function automatic int sample(int t);
    real ph;
    if (t < 1000) return $urandom_range(0, 65535) - 32768;
    if (t < 2000) return 9000;
    ph = 2.0 * 3.14159265358979 * real'(t) / 80.0;   // 2 kHz at 160 kHz
    if (t < 3000) return int'($rtoi(12000.0 * $sin(ph) + 20000.5)) - 20000;
    ph = 2.0 * 3.14159265358979 * real'(t) / 160.0;  // 1 kHz
    return int'($rtoi(12000.0 * $sin(ph) + 20000.5)) - 20000;
  endfunction

  function automatic int s3_at(int t);
    return (t >= 1) ? s3[t] : 0;
  endfunction

  initial begin
    int sum, expected;
    xin[0] = 0; s3[0] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 1; t <= STEPS; t++) begin
      // first moving average result of step t: mean of inputs t-80 .. t-1
      sum = 0;
      for (int j = t - K1; j <= t - 1; j++) if (j >= 1) sum += xin[j];
      s3[t] = sum / K1;
      xin[t] = sample(t);
      x = q2_14_t'(xin[t]);
      in_en = 1'b1;
      out_en = (t % DEC == 0);
      // y takes the second average as it stood before this step (step t-1)
      sum = 0;
      for (int k = t - 1 - 54; k <= t - 1 - 2; k++) sum += s3_at(k);
      expected = sum / K2;
      @(posedge clk); #1;
      if (out_en) begin
        nout++;
        checks++;
        if (out_valid !== 1'b1) begin failures++; $display("FAIL: no out_valid at step %0d", t); end
        checks++;
        if (int'(y) != expected) begin
          failures++; $display("FAIL: step %0d y=%0d expected %0d", t, y, expected);
        end
        if (t > 1000 + K1 + K2 + 4 && t < 2000) begin
          checks++;
          if (int'(y) != 9000) begin failures++; $display("FAIL: DC gain, y=%0d", y); end
        end
        if (t > 2000 + K1 + K2 + 4 && t < 3000) begin
          if (int'(y) > max2k) max2k = int'(y);
          if (-int'(y) > max2k) max2k = -int'(y);
        end
      end
      @(negedge clk);
      in_en = 1'b0;
      out_en = 1'b0;
      repeat (GAP - 1) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid !== 1'b0) begin failures++; $display("FAIL: stray out_valid"); end
        @(negedge clk);
      end
    end
    checks++;
    if (max2k > 200) begin failures++; $display("FAIL: 2 kHz tone leaks with amplitude %0d", max2k); end
    checks++;
    if (nout != STEPS / DEC) begin failures++; $display("FAIL: %0d outputs", nout); end
    $display("2 kHz residue %0d of 12000", max2k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (STEPS * GAP + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
