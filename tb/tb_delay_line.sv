// tb_delay_line: pushes random 23-bit words through delay_line at the two
// lengths the low-pass filter uses (80 and 53) and a short one (4), with
// random gaps between enables, and checks each output against a queue model:
// the word enabled DEPTH enables earlier (zero before that many enables).
module tb_delay_line;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        en = 1'b0;
  logic [22:0] d = '0;
  logic [22:0] q4, q53, q80;
  logic [22:0] hist [$];
  int          checks = 0, failures = 0;

  delay_line            u4  (.clk(clk), .rst(rst), .en(en), .d(d), .q(q4));
  delay_line #(.DEPTH(53)) u53 (.clk(clk), .rst(rst), .en(en), .d(d), .q(q53));
  delay_line #(.DEPTH(80)) u80 (.clk(clk), .rst(rst), .en(en), .d(d), .q(q80));

  always #5 clk = ~clk;

  function automatic logic [22:0] past(int k);
    // value enabled k enables ago (k = 1 is the latest)
    return (hist.size() >= k) ? hist[hist.size() - k] : 23'd0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 2) != 0);
      d  = 23'($urandom);
      @(posedge clk); #1;
      if (en) hist.push_back(d);
      checks += 3;
      if (q4 !== past(4))   begin failures++; $display("FAIL: depth 4 at %0d", i); end
      if (q53 !== past(53)) begin failures++; $display("FAIL: depth 53 at %0d", i); end
      if (q80 !== past(80)) begin failures++; $display("FAIL: depth 80 at %0d", i); end
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
