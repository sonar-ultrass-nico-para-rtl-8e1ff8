// tb_workload_sdm_rates: the stand-alone sigma-delta ADC at the five
// sampling rates compared when the converter was designed: 10, 12.5, 20, 25
// and 50 MHz, i.e. clock division by 10, 8, 5, 4 and 2. Each rate has its own
// ADC instance and its own copy of the behavioural analog loop, all fed the
// same 40 kHz, 1 V-amplitude tone.
//
// For each rate the output bits (as +-1) are averaged over 625 clocks, the
// CIC length used later in the receive channel, and a 40 kHz sine plus offset
// is fitted to 20 whole periods of that average. Expected, from the loop
// itself: the fitted amplitude is 2 * 1.0 V / 2.49 V = 0.80 times the
// average's gain at 40 kHz (0.90), about 0.72, and the offset is
// 2 * 1.25 / 2.49 - 1 = 0.003. The ratio of sine power to the residual
// (noise and distortion within the averaged band) is printed for each rate
// and must exceed 20 dB; it must also improve at every step up in rate.
module tb_workload_sdm_rates;
  localparam int  NR = 5;
  localparam int  WIN = 625;
  localparam int  PERIOD = 2500;           // 40 kHz at 100 MHz
  localparam int  NCYC = 20 * PERIOD;
  localparam real PI = 3.14159265358979;
  localparam int  DIVS [NR] = '{10, 8, 5, 4, 2};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [NR-1:0] cmp, bits, trig;
  logic [35:0]   words [NR];
  real           vin [NR];
  int            checks = 0, failures = 0;

  for (genvar g = 0; g < NR; g++) begin : g_rate
    sdm_analog_model ana (.clk(clk), .freq_hz(40000), .amp_mv(1000), .fb(bits[g]),
                          .cmp(cmp[g]), .vin_now(vin[g]));
    sdm_adc #(.DIV_N(DIVS[g])) adc (.clk(clk), .rst(rst), .cmp_in(cmp[g]), .bit_out(bits[g]),
                                    .cap_word(words[g]), .cap_trig(trig[g]));
  end

  always #5 clk = ~clk;

  // running 625-clock averages and the fit sums
  int  ring [NR][WIN];
  int  runsum [NR];
  real sa [NR], sb [NR], sc [NR], sq [NR];
  int  ptr = 0;
  longint t = 0;
  bit  acc_on = 1'b0;

  initial begin
    for (int r = 0; r < NR; r++) begin
      runsum[r] = 0; sa[r] = 0.0; sb[r] = 0.0; sc[r] = 0.0; sq[r] = 0.0;
      for (int k = 0; k < WIN; k++) ring[r][k] = 0;
    end
  end

  always @(posedge clk) if (!rst) begin
    real y, ph;
    #1;
    t++;
    ph = 2.0 * PI * real'(t % PERIOD) / real'(PERIOD);
    for (int r = 0; r < NR; r++) begin
      int v;
      v = bits[r] ? 1 : -1;
      runsum[r] += v - ring[r][ptr];
      ring[r][ptr] = v;
      if (acc_on) begin
        y = real'(runsum[r]) / real'(WIN);
        sa[r] += y * $cos(ph);
        sb[r] += y * $sin(ph);
        sc[r] += y;
        sq[r] += y * y;
      end
    end
    ptr = (ptr + 1) % WIN;
  end

  initial begin
    real a, b, c, amp, ms, res, sinad, prev_sinad;
    prev_sinad = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // settle the analog loop, then align the fit to whole tone periods
    repeat (10 * PERIOD) @(posedge clk);
    while (t % PERIOD != 0) @(posedge clk);
    #2 acc_on = 1'b1;
    repeat (NCYC) @(posedge clk);
    #2 acc_on = 1'b0;
    for (int r = 0; r < NR; r++) begin
      a = 2.0 * sa[r] / real'(NCYC);
      b = 2.0 * sb[r] / real'(NCYC);
      c = sc[r] / real'(NCYC);
      amp = $sqrt(a * a + b * b);
      ms  = sq[r] / real'(NCYC);
      res = ms - c * c - amp * amp / 2.0;
      if (res < 1.0e-12) res = 1.0e-12;
      sinad = 10.0 * $log10(amp * amp / 2.0 / res);
      $display("fs = %5.1f MHz: amplitude %f, offset %f, sine/residual %5.1f dB",
               100.0 / real'(DIVS[r]), amp, c, sinad);
      checks++;
      if (!(amp > 0.68 && amp < 0.76)) begin failures++; $display("FAIL: amplitude at divide-by-%0d", DIVS[r]); end
      checks++;
      if (!(c > -0.03 && c < 0.03)) begin failures++; $display("FAIL: offset at divide-by-%0d", DIVS[r]); end
      checks++;
      if (!(sinad > 20.0)) begin failures++; $display("FAIL: noise at divide-by-%0d", DIVS[r]); end
      checks++;
      if (!(sinad > prev_sinad)) begin failures++; $display("FAIL: no gain from rate at divide-by-%0d", DIVS[r]); end
      prev_sinad = sinad;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
