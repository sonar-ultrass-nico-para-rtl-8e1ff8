// tb_trigger_gen: checks the three rate strobes of trigger_gen at their
// default ratios (2, 625, 12500 system clocks): exact periods, one-cycle
// width, the first strobe after reset, and that each 8 kHz strobe coincides
// with a 160 kHz strobe.
module tb_trigger_gen;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic stb_sdm, stb_bb, stb_out;
  int   checks = 0, failures = 0;
  longint cyc = 0;
  longint last_sdm = -1, last_bb = -1, last_out = -1;
  int   n_sdm = 0, n_bb = 0, n_out = 0;

  localparam int DS = 2, DB = 625, DO = 12500;

  trigger_gen dut (.clk(clk), .rst(rst), .stb_sdm(stb_sdm), .stb_bb(stb_bb), .stb_out(stb_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at cycle %0d", what, cyc);
    end
  endtask

  // cycle index 0 is the first cycle after reset is released
  always @(negedge clk) if (!rst) begin
    if (stb_sdm) begin
      if (last_sdm < 0) check(cyc == DS - 1, "first 50 MHz strobe");
      else              check(cyc - last_sdm == DS, "50 MHz period");
      last_sdm = cyc; n_sdm++;
    end
    if (stb_bb) begin
      if (last_bb < 0) check(cyc == DB - 1, "first 160 kHz strobe");
      else             check(cyc - last_bb == DB, "160 kHz period");
      last_bb = cyc; n_bb++;
    end
    if (stb_out) begin
      if (last_out < 0) check(cyc == DO - 1, "first 8 kHz strobe");
      else              check(cyc - last_out == DO, "8 kHz period");
      check(stb_bb == 1'b1, "8 kHz strobe aligned with 160 kHz strobe");
      last_out = cyc; n_out++;
    end
    cyc++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3 * DO + 10) @(posedge clk);
    @(negedge clk);
    check(n_out == 3, "number of 8 kHz strobes");
    check(n_bb == 3 * DO / DB, "number of 160 kHz strobes");
    check(n_sdm >= 3 * DO / DS, "number of 50 MHz strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
