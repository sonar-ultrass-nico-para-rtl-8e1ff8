// tb_workload_cic_m63: the CIC decimator behind the sigma-delta modulator,
// with the designed decimation factor M = 625 and with one about ten times
// lower, M = 63, as in the evaluation of the filter. The input is a 40 kHz
// sine from 0 to 2.5 V (1.25 V amplitude about 1.25 V) through the
// behavioural analog loop; one modulator bitstream feeds both filters.
//
// Output rates: 160 kHz (four samples per 40 kHz period) for M = 625 and
// 1.587 MHz for M = 63. Over 63 tone periods both give a whole number of
// outputs (252 and 2500). A 40 kHz sine plus offset is fitted to each
// output and checked:
//   - amplitude: full scale is the 2.49 V feedback level, so the input is
//     1.25 / 1.245 = 1.00 of full scale, times the filter's gain at 40 kHz
//     (0.90 for M = 625, 1.00 for M = 63); tolerance 0.06;
//   - offset: 1.25 V is 2 * 1.25 / 2.49 - 1 = 0.004 of full scale; |c| < 0.03;
//   - the M = 63 output is a sine with visible noise: sine-to-residual power
//     above 10 dB but below that of M = 625, whose narrower band passes less
//     of the modulator's shaped noise.
module tb_workload_cic_m63;
  import sonar_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  PERIOD = 2500;                 // 40 kHz at 100 MHz
  localparam int  NCYC = 63 * PERIOD;
  localparam int  M_LOW = 63;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   cmp, sdm_bit;
  logic   stb_sdm, stb_bb, stb_out, stb_sdm_b, stb_bb_b, stb_out_b;
  q2_14_t y_hi, y_lo;
  logic   v_hi, v_lo;
  real    vin;
  int     checks = 0, failures = 0;

  sdm_analog_model ana (.clk(clk), .freq_hz(40000), .amp_mv(1250), .fb(sdm_bit),
                        .cmp(cmp), .vin_now(vin));

  trigger_gen u_trig (.clk(clk), .rst(rst), .stb_sdm(stb_sdm), .stb_bb(stb_bb),
                      .stb_out(stb_out));
  trigger_gen #(.DIV_BB(M_LOW), .DIV_OUT(20 * M_LOW)) u_trig_b (
    .clk(clk), .rst(rst), .stb_sdm(stb_sdm_b), .stb_bb(stb_bb_b), .stb_out(stb_out_b));

  sdm_quantizer u_q (.clk(clk), .rst(rst), .sample_en(stb_sdm), .cmp_in(cmp),
                     .bit_out(sdm_bit));

  cic_decimator u_hi (.clk(clk), .rst(rst), .bit_in(sdm_bit), .out_en(stb_bb),
                      .y(y_hi), .out_valid(v_hi));
  cic_decimator #(.M(M_LOW)) u_lo (.clk(clk), .rst(rst), .bit_in(sdm_bit), .out_en(stb_bb_b),
                                   .y(y_lo), .out_valid(v_lo));

  always #5 clk = ~clk;

  // clocks since time zero: the analog model's input phase is t / PERIOD
  longint t = 0;
  bit     acc_on = 1'b0;
  real    s [2][5];   // per filter: sum cos, sum sin, sum y, sum y^2, count

  initial for (int i = 0; i < 2; i++) for (int j = 0; j < 5; j++) s[i][j] = 0.0;

  task automatic acc(int i, q2_14_t y);
    real v, ph;
    v  = real'(y) / 16384.0;
    ph = 2.0 * PI * real'(t % PERIOD) / real'(PERIOD);
    s[i][0] += v * $cos(ph);
    s[i][1] += v * $sin(ph);
    s[i][2] += v;
    s[i][3] += v * v;
    s[i][4] += 1.0;
  endtask

  always @(posedge clk) begin
    t++;
    if (acc_on && v_hi) acc(0, y_hi);
    if (acc_on && v_lo) acc(1, y_lo);
  end

  real sinad [2];

  task automatic report(int i, string name, real want_amp);
    real a, b, c, amp, res;
    a = 2.0 * s[i][0] / s[i][4];
    b = 2.0 * s[i][1] / s[i][4];
    c = s[i][2] / s[i][4];
    amp = $sqrt(a * a + b * b);
    res = s[i][3] / s[i][4] - c * c - amp * amp / 2.0;
    if (res < 1.0e-12) res = 1.0e-12;
    sinad[i] = 10.0 * $log10(amp * amp / 2.0 / res);
    $display("%s: %0d outputs, amplitude %f (want %f), offset %f, sine/residual %5.1f dB",
             name, $rtoi(s[i][4]), amp, want_amp, c, sinad[i]);
    checks++;
    if (amp - want_amp > 0.06 || want_amp - amp > 0.06) begin
      failures++; $display("FAIL: %s amplitude", name);
    end
    checks++;
    if (!(c > -0.03 && c < 0.03)) begin failures++; $display("FAIL: %s offset", name); end
  endtask

  function automatic real cic_gain(int m);
    real x;
    x = PI * 40000.0 / 100.0e6;
    return $sin(x * m) / (m * $sin(x));
  endfunction

  initial begin
    real fs_amp;
    fs_amp = 1.25 / (3.3 * 680.0 / 900.0 / 2.0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // let the loop and both filters settle, then start on a whole period
    repeat (10 * PERIOD) @(posedge clk);
    while (t % PERIOD != 0) @(posedge clk);
    acc_on = 1'b1;
    repeat (NCYC) @(posedge clk);
    acc_on = 1'b0;
    report(0, "M = 625", fs_amp * cic_gain(625));
    report(1, "M =  63", fs_amp * cic_gain(M_LOW));
    checks++;
    if ($rtoi(s[0][4]) != NCYC / 625 || $rtoi(s[1][4]) != NCYC / M_LOW) begin
      failures++; $display("FAIL: output counts");
    end
    checks++;
    if (!(sinad[1] > 10.0 && sinad[1] < sinad[0])) begin
      failures++; $display("FAIL: M = 63 noise not between the limits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
