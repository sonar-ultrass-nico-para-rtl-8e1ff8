// tb_local_osc: steps local_osc with random gaps between enables and checks
// that the output follows round(cos(pi/2 * n)) in Q2.14, i.e. +1, 0, -1, 0,
// advancing once per enable and holding between enables.
module tb_local_osc;
  import sonar_pkg::*;
  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   en = 1'b0;
  q2_14_t lo;
  int     n = 0;
  int     checks = 0, failures = 0;

  local_osc dut (.clk(clk), .rst(rst), .en(en), .lo(lo));

  always #5 clk = ~clk;

  function automatic int expected_lo(int k);
    real c;
    c = $cos(3.14159265358979 / 2.0 * real'(k));
    return (c > 0.5) ? 16384 : ((c < -0.5) ? -16384 : 0);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      checks++;
      if (int'(lo) != expected_lo(n)) begin
        failures++; $display("FAIL: step %0d lo=%0d expected %0d", n, lo, expected_lo(n));
      end
      en = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (en) n++;
      @(negedge clk);
    end
    checks++;
    if (n < 200) begin failures++; $display("FAIL: only %0d steps", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
