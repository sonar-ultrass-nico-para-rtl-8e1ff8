// tb_downconverter: closes the sigma-delta loop of one receive channel with
// the behavioural analog model and feeds it 1 V-amplitude tones (0.80 of
// full scale) at 40, 41 and 39 kHz, all blocks at their default rates.
//
// Expected values are worked out from the signal chain, not from the RTL:
//  * the CIC output is the tone sampled four times per 40 kHz period,
//    amplitude 0.80 times the CIC gain at 40 kHz (0.95), so its amplitude
//    (sqrt(2) times its rms) lies in 0.62 .. 0.90, and at 40 kHz x[n] = -x[n-2] to within noise;
//  * mixing with 1,0,-1,0 halves the amplitude, so |I + jQ| is about
//    0.80 * 0.95 / 2 = 0.38 at 40 kHz; at +-1 kHz the two averages pass
//    0.637 * 0.829 = 0.53 of it, about 0.20;
//  * the Q oscillator is sin(pi/2 n), so a tone above 40 kHz turns I + jQ
//    by -360 * 1 kHz / 8 kHz = -45 degrees per output sample, one below by
//    +45 degrees, and a 40 kHz tone does not turn it;
//  * a 42 kHz tone lands at -2 kHz, on the first null of the 80-sample
//    average, so |I + jQ| must stay below 0.03 (under a tenth of the 40 kHz
//    magnitude);
//  * CIC outputs come every 625 clocks and I/Q outputs every 12500.
module tb_downconverter;
  import sonar_pkg::*;
  localparam real PI = 3.14159265358979;
  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   cmp, sdm_bit;
  q2_14_t cic_out, i_out, q_out;
  logic   cic_valid, iq_valid;
  int     freq_hz = 40000;
  int     amp_mv = 1000;
  real    vin_now;
  int     checks = 0, failures = 0;
  longint cyc = 0, last_cic = -1, last_iq = -1;

  sdm_analog_model ana (.clk(clk), .freq_hz(freq_hz), .amp_mv(amp_mv), .fb(sdm_bit),
                        .cmp(cmp), .vin_now(vin_now));

  downconverter dut (.clk(clk), .rst(rst), .cmp_in(cmp), .sdm_bit(sdm_bit),
                     .cic_out(cic_out), .cic_valid(cic_valid),
                     .i_out(i_out), .q_out(q_out), .iq_valid(iq_valid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (f = %0d Hz)", what, freq_hz); end
  endtask

  // output cadence
  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      last_cic = -1; last_iq = -1;
    end else begin
      if (cic_valid) begin
        if (last_cic >= 0) check(cyc - last_cic == DIV_BB, "CIC output period");
        last_cic = cyc;
      end
      if (iq_valid) begin
        if (last_iq >= 0) check(cyc - last_iq == DIV_OUT, "I/Q output period");
        last_iq = cyc;
      end
    end
  end

  function automatic real q2r(q2_14_t v);
    return real'(v) / 16384.0;
  endfunction

  task automatic run_tone(input int f, input real mag_lo, input real mag_hi,
                          input real step_deg);
    real cic_peak, cic_sym, cic_x [$];
    real ii [$], qq [$];
    real mag, ang, sum_step, mean_step;
    int  nstep;
    freq_hz = f;
    rst = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // let the loop and both filters settle (about 1.3 ms)
    repeat (130000) @(posedge clk);
    cic_peak = 0.0;
    cic_sym  = 0.0;
    while (ii.size() < 12) begin
      @(posedge clk); #1;
      if (cic_valid) begin
        cic_x.push_back(q2r(cic_out));
        cic_peak += q2r(cic_out) ** 2;
      end
      if (iq_valid) begin
        ii.push_back(q2r(i_out));
        qq.push_back(q2r(q_out));
      end
    end
    cic_peak = $sqrt(2.0 * cic_peak / real'(cic_x.size()));
    for (int n = 2; n < cic_x.size(); n++) cic_sym += (cic_x[n] + cic_x[n-2]) ** 2;
    cic_sym = $sqrt(cic_sym / real'(cic_x.size() - 2));
    check(cic_peak > 0.62 && cic_peak < 0.90, $sformatf("CIC amplitude %f", cic_peak));
    if (f == 40000) check(cic_sym < 0.1, $sformatf("CIC x[n] + x[n-2] rms %f", cic_sym));
    sum_step = 0.0;
    nstep = 0;
    for (int n = 0; n < ii.size(); n++) begin
      mag = $sqrt(ii[n] ** 2 + qq[n] ** 2);
      check(mag > mag_lo && mag < mag_hi, $sformatf("|I+jQ| = %f", mag));
      if (n > 0) begin
        ang = $atan2(ii[n-1] * qq[n] - qq[n-1] * ii[n], ii[n-1] * ii[n] + qq[n-1] * qq[n]);
        sum_step += ang * 180.0 / PI;
        nstep++;
      end
    end
    mean_step = sum_step / real'(nstep);
    $display("f = %0d Hz: CIC amplitude %f, |I+jQ| %f, phase step %f deg per output",
             f, cic_peak, $sqrt(ii[0] ** 2 + qq[0] ** 2), mean_step);
    if (mag_lo > 0.0) check(mean_step > step_deg - 8.0 && mean_step < step_deg + 8.0,
          $sformatf("phase step %f deg, expected %f", mean_step, step_deg));
  endtask

  initial begin
    run_tone(40000, 0.30, 0.46, 0.0);
    run_tone(41000, 0.14, 0.27, -45.0);
    run_tone(39000, 0.14, 0.27, 45.0);
    run_tone(42000, 0.0, 0.03, -90.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
