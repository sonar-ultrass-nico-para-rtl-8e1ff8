// tb_sdm_quantizer: drives random comparator levels and random sampling
// strobes into sdm_quantizer and checks that the output holds the level seen
// at the last strobe and changes nowhere else.
module tb_sdm_quantizer;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic sample_en = 1'b0, cmp_in = 1'b0, bit_out;
  logic expected = 1'b0;
  int   checks = 0, failures = 0;

  sdm_quantizer dut (.clk(clk), .rst(rst), .sample_en(sample_en), .cmp_in(cmp_in), .bit_out(bit_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    checks++; if (bit_out !== 1'b0) begin failures++; $display("FAIL: reset value"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sample_en = ($urandom_range(0, 2) == 0);
      cmp_in    = $urandom_range(0, 1) == 1;
      if (sample_en) expected = cmp_in;
      @(posedge clk); #1;
      checks++;
      if (bit_out !== expected) begin
        failures++;
        $display("FAIL: step %0d bit_out=%0b expected=%0b", i, bit_out, expected);
      end
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
