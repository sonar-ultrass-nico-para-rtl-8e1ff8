// tb_clk_divider: checks clk_divider for N = 2 (the default, 100 -> 50 MHz),
// N = 5 and N = 8: the number of low and high cycles in each period
// (floor(N/2) low, the rest high), the number of periods, and that the rise
// strobe marks exactly the cycles in which the output has just gone high.
module tb_clk_divider;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [2:0] o, r;
  logic [2:0] p = '0;
  int   hi [3] = '{0, 0, 0};
  int   lo [3] = '{0, 0, 0};
  int   rises [3] = '{0, 0, 0};
  int   nval [3] = '{2, 5, 8};
  int   checks = 0, failures = 0;

  clk_divider            d2 (.clk_in(clk), .rst(rst), .clk_out(o[0]), .rise(r[0]));
  clk_divider #(.N(5))   d5 (.clk_in(clk), .rst(rst), .clk_out(o[1]), .rise(r[1]));
  clk_divider #(.N(8))   d8 (.clk_in(clk), .rst(rst), .clk_out(o[2]), .rise(r[2]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(negedge clk) if (!rst) begin
    for (int k = 0; k < 3; k++) begin
      check(r[k] == (o[k] & ~p[k]), $sformatf("N=%0d rise strobe", nval[k]));
      if (o[k] & ~p[k]) begin
        if (rises[k] > 0) begin
          check(lo[k] == nval[k] / 2, $sformatf("N=%0d low phase length %0d", nval[k], lo[k]));
          check(hi[k] == nval[k] - nval[k] / 2, $sformatf("N=%0d high phase length %0d", nval[k], hi[k]));
        end
        rises[k]++;
        hi[k] = 0;
        lo[k] = 0;
      end
      if (o[k]) hi[k]++;
      else      lo[k]++;
      p[k] = o[k];
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (400) @(posedge clk);
    @(negedge clk);
    check(rises[0] >= 199 && rises[0] <= 201, "N=2 period count");
    check(rises[1] >= 79 && rises[1] <= 81, "N=5 period count");
    check(rises[2] >= 49 && rises[2] <= 51, "N=8 period count");
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
