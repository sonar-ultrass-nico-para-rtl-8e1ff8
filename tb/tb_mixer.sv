// tb_mixer: multiplies random Q2.14 signal words by the oscillator values
// +1, 0, -1 (the mixer's operating case) and by random words, and checks the
// registered output against floor(a * b / 2^14) taken modulo 2^16, and that
// a times +-1.0 reproduces a or -a exactly.
module tb_mixer;
  import sonar_pkg::*;
  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   en = 1'b0;
  q2_14_t a = '0, b = '0, p;
  q2_14_t expected = '0;
  int     checks = 0, failures = 0;

  mixer dut (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    longint prod;
    int sel;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      a  = q2_14_t'($urandom_range(0, 65535));
      sel = $urandom_range(0, 3);
      case (sel)
        0: b = Q_ONE;
        1: b = Q_MINUS1;
        2: b = Q_ZERO;
        default: b = q2_14_t'($urandom_range(0, 65535));
      endcase
      if (en) begin
        prod = longint'(a) * longint'(b);
        expected = q2_14_t'(prod >>> FRAC_W);
      end
      @(posedge clk); #1;
      checks++;
      if (p !== expected) begin
        failures++; $display("FAIL: %0d * %0d gave %0d expected %0d", a, b, p, expected);
      end
      if (en && b == Q_ONE && a != -32768) begin
        checks++; if (p !== a) begin failures++; $display("FAIL: a * 1.0"); end
      end
      if (en && b == Q_MINUS1 && a != -32768) begin
        checks++; if (p !== -a) begin failures++; $display("FAIL: a * -1.0"); end
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
