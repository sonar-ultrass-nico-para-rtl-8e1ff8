// tb_workload_sdm_fin: the stand-alone sigma-delta ADC at its 50 MHz
// sampling rate with input tones of 20, 40, 50 and 63 kHz (1 V amplitude
// about 1.25 V), analysed the way the bench measurements were: only the
// 36-bit capture words are used. Each word is unpacked, oldest bit first
// (bit 35), back into the bitstream.
//
// Each rate has its own ADC and analog-loop instance. Once the loops have
// settled, 50 000 rebuilt samples (1 ms, a whole number of periods for every
// tone) are passed through a 400-sample average, whose first null is at
// 125 kHz, the width of the band the measurements were analysed in. A sine at the input
// frequency plus an offset is fitted to the result. The fitted amplitude must
// be 2 * 1.0 / 2.49 = 0.80 times the average's gain at that frequency
// (0.96 at 20 kHz down to 0.63 at 63 kHz), within 0.04. The sine-to-residual
// power in that band must exceed 20 dB. The offset is left unchecked here.
module tb_workload_sdm_fin;
  localparam int  NF = 4;
  localparam int  WIN = 400;
  localparam int  NS = 50000;
  localparam int  SETTLE = 20000;        // rebuilt samples skipped first
  localparam real PI = 3.14159265358979;
  localparam real FS = 50.0e6;
  localparam int  FREQ [NF] = '{20000, 40000, 50000, 63000};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [NF-1:0] cmp, bits, trig;
  logic [35:0]   words [NF];
  real           vin [NF];
  int            checks = 0, failures = 0;

  for (genvar g = 0; g < NF; g++) begin : g_tone
    sdm_analog_model ana (.clk(clk), .freq_hz(FREQ[g]), .amp_mv(1000), .fb(bits[g]),
                          .cmp(cmp[g]), .vin_now(vin[g]));
    sdm_adc adc (.clk(clk), .rst(rst), .cmp_in(cmp[g]), .bit_out(bits[g]),
                 .cap_word(words[g]), .cap_trig(trig[g]));
  end

  always #5 clk = ~clk;

  int  ring [NF][WIN];
  int  ptr [NF];
  int  runsum [NF];
  int  nsamp [NF];
  int  nfit [NF];
  real sa [NF], sb [NF], sc [NF], sq [NF];

  initial begin
    for (int r = 0; r < NF; r++) begin
      ptr[r] = 0; runsum[r] = 0; nsamp[r] = 0; nfit[r] = 0;
      sa[r] = 0.0; sb[r] = 0.0; sc[r] = 0.0; sq[r] = 0.0;
      for (int k = 0; k < WIN; k++) ring[r][k] = 0;
    end
  end

  // one rebuilt sample of tone r
  task automatic take(int r, logic b);
    int  v;
    real y, ph;
    v = b ? 1 : -1;
    runsum[r] += v - ring[r][ptr[r]];
    ring[r][ptr[r]] = v;
    ptr[r] = (ptr[r] + 1) % WIN;
    nsamp[r]++;
    if (nsamp[r] > SETTLE && nfit[r] < NS) begin
      y  = real'(runsum[r]) / real'(WIN);
      ph = 2.0 * PI * real'(FREQ[r]) * real'(nfit[r]) / FS;
      sa[r] += y * $cos(ph);
      sb[r] += y * $sin(ph);
      sc[r] += y;
      sq[r] += y * y;
      nfit[r]++;
    end
  endtask

  always @(posedge clk) begin
    for (int r = 0; r < NF; r++)
      if (trig[r])
        for (int k = 35; k >= 0; k--) take(r, words[r][k]);
  end

  function automatic bit all_done();
    for (int r = 0; r < NF; r++) if (nfit[r] < NS) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    real a, b, c, amp, res, sinad, x, want;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    while (!all_done()) @(posedge clk);
    for (int r = 0; r < NF; r++) begin
      a = 2.0 * sa[r] / real'(NS);
      b = 2.0 * sb[r] / real'(NS);
      c = sc[r] / real'(NS);
      amp = $sqrt(a * a + b * b);
      res = sq[r] / real'(NS) - c * c - amp * amp / 2.0;
      if (res < 1.0e-12) res = 1.0e-12;
      sinad = 10.0 * $log10(amp * amp / 2.0 / res);
      x = PI * real'(FREQ[r]) / FS;
      want = 2.0 / (3.3 * 680.0 / 900.0) * $sin(x * WIN) / (WIN * $sin(x));
      $display("fin = %0d Hz: amplitude %f (want %f), offset %f, sine/residual %5.1f dB",
               FREQ[r], amp, want, c, sinad);
      checks++;
      if (amp - want > 0.04 || want - amp > 0.04) begin
        failures++; $display("FAIL: amplitude at %0d Hz", FREQ[r]);
      end
      checks++;
      if (!(sinad > 20.0)) begin failures++; $display("FAIL: noise at %0d Hz", FREQ[r]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (NS + SETTLE)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
