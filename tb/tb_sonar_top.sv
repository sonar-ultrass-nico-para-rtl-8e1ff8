// tb_sonar_top: end-to-end test of the whole receiver top at its default
// sizes. Two copies of the behavioural analog loop close the sigma-delta
// modulators of the receive channel (rx_*) and of the stand-alone ADC
// (adc_*).
//
// The receive channel gets a 41 kHz tone and then, after a reset, a 39 kHz
// tone (1 V amplitude, 0.80 of full scale). Expected from the signal chain:
// I + jQ of magnitude about 0.80 * 0.95 / 2 * 0.53 = 0.20 turning by -45
// degrees per 8 kHz output for 41 kHz and +45 degrees for 39 kHz (the Q
// oscillator is sin(pi/2 n)); outputs every 12500 clocks.
//
// The ADC gets a 40 kHz tone. Every 36-bit capture word must equal the last
// 36 output bits, taken one per divided-clock period, and the density of
// ones over whole 40 kHz periods must match the mean input, 1.25 V over the
// 2.49 V feedback level, about 0.50.
//
// Mechanisms counted, each of which must occur: modulator samples, CIC
// outputs, I/Q outputs, clockwise and anticlockwise rotation of I + jQ,
// capture triggers.
module tb_sonar_top;
  import sonar_pkg::*;
  localparam real PI = 3.14159265358979;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        rx_cmp, rx_bit, adc_cmp, adc_bit;
  q2_14_t      rx_cic, rx_i, rx_q;
  logic        rx_cic_valid, rx_iq_valid;
  logic [35:0] cap_word;
  logic        cap_trig;
  int          rx_freq = 41000, adc_freq = 40000, amp_mv = 1000;
  real         rx_vin, adc_vin;
  int          checks = 0, failures = 0;

  // mechanism counters
  int n_sdm_toggles = 0, n_cic = 0, n_iq = 0, n_cw = 0, n_ccw = 0, n_cap = 0;

  sdm_analog_model ana_rx  (.clk(clk), .freq_hz(rx_freq), .amp_mv(amp_mv), .fb(rx_bit),
                            .cmp(rx_cmp), .vin_now(rx_vin));
  sdm_analog_model ana_adc (.clk(clk), .freq_hz(adc_freq), .amp_mv(amp_mv), .fb(adc_bit),
                            .cmp(adc_cmp), .vin_now(adc_vin));

  sonar_top dut (
    .clk(clk), .rst(rst),
    .rx_cmp_in(rx_cmp), .rx_sdm_bit(rx_bit), .rx_cic_out(rx_cic), .rx_cic_valid(rx_cic_valid),
    .rx_i(rx_i), .rx_q(rx_q), .rx_iq_valid(rx_iq_valid),
    .adc_cmp_in(adc_cmp), .adc_bit(adc_bit), .adc_cap_word(cap_word), .adc_cap_trig(cap_trig)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- stand-alone ADC: rebuild the sampled bit sequence and check captures
  logic [35:0] adc_hist = '0;
  int          adc_nbits = 0, adc_ones = 0;
  longint      cyc = 0, last_iq = -1;
  logic        prev_rx_bit = 1'b0;

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst) begin
      adc_hist = '0; adc_nbits = 0; adc_ones = 0; last_iq = -1;
    end else begin
      // the divided clock has period 2, so the ADC output holds one sample
      // for two cycles; take one copy of each (odd cycles after reset)
      if (cyc % 2 == 0) begin
        adc_hist = {adc_hist[34:0], adc_bit};
        adc_nbits++;
        if (adc_bit) adc_ones++;
      end
      if (cap_trig) begin
        n_cap++;
        check(cap_word === adc_hist, $sformatf("capture word %h, expected %h", cap_word, adc_hist));
      end
      if (rx_bit != prev_rx_bit) n_sdm_toggles++;
      prev_rx_bit = rx_bit;
      if (rx_cic_valid) n_cic++;
      if (rx_iq_valid) begin
        n_iq++;
        if (last_iq >= 0) check(cyc - last_iq == DIV_OUT, "I/Q output period");
        last_iq = cyc;
      end
    end
  end

  function automatic real q2r(q2_14_t v);
    return real'(v) / 16384.0;
  endfunction

  task automatic run_tone(input int f, input real step_deg);
    real ii [$], qq [$];
    real mag, ang, mean_step;
    int  ones0, bits0;
    rx_freq = f;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (130000) @(posedge clk);
    ones0 = adc_ones; bits0 = adc_nbits;
    while (ii.size() < 8) begin
      @(posedge clk); #2;
      if (rx_iq_valid) begin
        ii.push_back(q2r(rx_i));
        qq.push_back(q2r(rx_q));
      end
    end
    mean_step = 0.0;
    for (int n = 0; n < ii.size(); n++) begin
      mag = $sqrt(ii[n] ** 2 + qq[n] ** 2);
      check(mag > 0.14 && mag < 0.27, $sformatf("|I+jQ| = %f at %0d Hz", mag, f));
      if (n > 0) begin
        ang = $atan2(ii[n-1] * qq[n] - qq[n-1] * ii[n], ii[n-1] * ii[n] + qq[n-1] * qq[n]) * 180.0 / PI;
        if (ang < -10.0) n_cw++;
        if (ang > 10.0) n_ccw++;
        mean_step += ang / real'(ii.size() - 1);
      end
    end
    $display("rx %0d Hz: phase step %f deg per output; ADC density %f", f, mean_step,
             real'(adc_ones - ones0) / real'(adc_nbits - bits0));
    check(mean_step > step_deg - 8.0 && mean_step < step_deg + 8.0,
          $sformatf("phase step %f at %0d Hz", mean_step, f));
    check(real'(adc_ones - ones0) / real'(adc_nbits - bits0) > 0.47 &&
          real'(adc_ones - ones0) / real'(adc_nbits - bits0) < 0.53, "ADC ones density");
  endtask

  initial begin
    run_tone(41000, -45.0);
    run_tone(39000, 45.0);
    $display("mechanisms: sdm toggles %0d, CIC outputs %0d, I/Q outputs %0d, clockwise %0d, anticlockwise %0d, captures %0d",
             n_sdm_toggles, n_cic, n_iq, n_cw, n_ccw, n_cap);
    check(n_sdm_toggles > 0, "modulator never toggled");
    check(n_cic > 0, "no CIC output");
    check(n_iq > 0, "no I/Q output");
    check(n_cw > 0, "no clockwise rotation");
    check(n_ccw > 0, "no anticlockwise rotation");
    check(n_cap > 0, "no capture trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
