// tb_phase_shift_90: feeds the 1, 0, -1, 0 oscillator sequence (and then
// random words) into phase_shift_90 and checks that the output is the input
// of the previous enable, so the oscillator comes out as 0, 1, 0, -1
// (sin(pi/2 * n)), a quarter period late.
module tb_phase_shift_90;
  import sonar_pkg::*;
  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   en = 1'b0;
  q2_14_t d = '0, q;
  q2_14_t prev = '0;
  int     checks = 0, failures = 0;
  int     n = 0;

  phase_shift_90 dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 1) == 1);
      if (i < 1000) begin
        unique case (n % 4)
          0: d = Q_ONE;
          2: d = Q_MINUS1;
          default: d = Q_ZERO;
        endcase
      end else begin
        d = q2_14_t'($urandom);
      end
      @(posedge clk); #1;
      if (en) begin
        checks++;
        if (q !== d) begin failures++; $display("FAIL: q=%0d expected %0d", q, d); end
        // on the oscillator part, q must equal sin(pi/2 * n)
        if (i < 1000) begin
          checks++;
          if (int'(prev) != ((n % 4 == 1) ? 16384 : (n % 4 == 3) ? -16384 : 0) && n > 0) begin
            failures++; $display("FAIL: delayed oscillator %0d at step %0d", prev, n);
          end
        end
        prev = q;
        n++;
      end else begin
        checks++;
        if (q !== prev && i > 0) begin failures++; $display("FAIL: q changed without enable"); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
