// tb_sdm_adc: drives random comparator levels into the stand-alone ADC
// digital interface (divide-by-2 sampling, 36-bit capture). A software
// model samples the comparator level whenever the divided clock rises and
// shifts each sample into a 36-bit word; the test checks the output bit, the
// sampling rate (one new sample every 2 system clocks) and every captured
// word at its trigger.
module tb_sdm_adc;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic cmp_in = 1'b0;
  logic bit_out;
  logic [35:0] cap_word;
  logic cap_trig;
  logic [35:0] model = '0;
  logic prev_div = 1'b0;
  int   nsamp = 0, ntrig = 0, nbitchk = 0;
  int   checks = 0, failures = 0;
  logic exp_bit = 1'b0;
  int   pending = 0;
  logic pending_bit;

  sdm_adc dut (.clk(clk), .rst(rst), .cmp_in(cmp_in), .bit_out(bit_out),
               .cap_word(cap_word), .cap_trig(cap_trig));

  always #5 clk = ~clk;

  // Reference: the divided clock is rebuilt from the cycle count (it goes
  // high on every odd cycle after reset); the sampled level appears at the
  // output two clocks after the edge is seen.
  longint cyc = 0;
  logic [35:0] sampled = '0;
  int nsampled = 0;
  logic hist [$];

  always @(negedge clk) if (!rst) begin
    cmp_in = ($urandom_range(0, 1) == 1);
    hist.push_back(cmp_in);
  end

  int ones_in_window = 0;

  always @(posedge clk) if (!rst) begin
    #1;
    cyc++;
    // the divided clock register goes high at cyc = 2, 4, 6, ... ; the rise
    // strobe is seen at the same edge and the flip-flop samples one edge later
    if (cyc >= 3 && cyc % 2 == 1) begin
      // sample taken at this edge from the level driven in the previous half cycle
      exp_bit = hist[hist.size() - 1];
      nsampled++;
      sampled = {sampled[34:0], exp_bit};
      checks++;
      if (bit_out !== exp_bit) begin
        failures++; $display("FAIL: bit_out=%0b expected %0b at cycle %0d", bit_out, exp_bit, cyc);
      end
    end
    if (cap_trig) begin
      ntrig++;
      checks++;
      if (cap_word !== sampled) begin
        failures++; $display("FAIL: captured %h expected %h", cap_word, sampled);
      end
      checks++;
      if (nsampled % 36 != 0) begin
        failures++; $display("FAIL: trigger after %0d samples", nsampled);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #2 rst = 1'b0;
    repeat (2000) @(posedge clk);
    #2;
    checks++;
    if (ntrig != nsampled / 36 && ntrig != nsampled / 36 - 1) begin
      failures++; $display("FAIL: %0d triggers for %0d samples", ntrig, nsampled);
    end
    checks++;
    if (nsampled < 995) begin failures++; $display("FAIL: only %0d samples", nsampled); end
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
