// tb_workload_lpf_tones: the low-pass filter and decimator of one baseband
// branch fed the four-part test signal used to evaluate it: a constant plus
// sines at 1 kHz, 2 kHz and 2.5 kHz, each part 0.25 in Q2.14, sampled at the
// 160 kHz baseband rate. in_en runs every second clock and out_en on every
// 20th in_en, so the output is the 8 kHz stream of the receive channel.
//
// After the filter has filled, 64 outputs (8 ms) are taken; every part then
// falls on a whole DFT bin (0, 8, 16 and 20). The measured amplitude of each
// part is compared with 0.25 times the gain of the two cascaded moving
// averages, |sin(pi f K / fs) / (K sin(pi f / fs))| for K = 80 and K = 53:
// 1 at DC, 0.528 at 1 kHz, 0 at 2 kHz and 0.036 at 2.5 kHz. Tolerance is
// 0.002, well above the truncation error of the two divisions. It also checks
// the ordering: 2 kHz removed, 2.5 kHz attenuated most of what remains.
module tb_workload_lpf_tones;
  import sonar_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FS = 160000.0;
  localparam int  NOUT = 64;
  localparam int  SETTLE = 20;      // outputs discarded while the filter fills

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   in_en = 1'b0, out_en = 1'b0;
  q2_14_t x = '0;
  q2_14_t y;
  logic   out_valid;
  int     checks = 0, failures = 0;

  lpf_decimator dut (.clk(clk), .rst(rst), .in_en(in_en), .x(x), .out_en(out_en),
                     .y(y), .out_valid(out_valid));

  always #5 clk = ~clk;

  function automatic real gain(real f);
    real g1, g2;
    if (f == 0.0) return 1.0;
    g1 = $sin(PI * f * LPF_K1 / FS) / (LPF_K1 * $sin(PI * f / FS));
    g2 = $sin(PI * f * LPF_K2 / FS) / (LPF_K2 * $sin(PI * f / FS));
    return (g1 * g2 < 0.0) ? -g1 * g2 : g1 * g2;
  endfunction

  real ys [NOUT];
  int  nout = 0;
  int  nseen = 0;

  always @(posedge clk) if (out_valid) begin
    if (nseen >= SETTLE && nout < NOUT) begin
      ys[nout] = real'(y) / 16384.0;
      nout++;
    end
    nseen++;
  end

  task automatic check_part(string name, real f, int bin);
    real re, im, amp, want;
    re = 0.0; im = 0.0;
    for (int k = 0; k < NOUT; k++) begin
      re += ys[k] * $cos(2.0 * PI * bin * k / NOUT);
      im += ys[k] * $sin(2.0 * PI * bin * k / NOUT);
    end
    amp = (bin == 0) ? re / NOUT : 2.0 * $sqrt(re * re + im * im) / NOUT;
    want = 0.25 * gain(f);
    $display("%-7s measured %f expected %f (gain %f)", name, amp, want, gain(f));
    checks++;
    if (amp - want > 0.002 || want - amp > 0.002) begin
      failures++;
      $display("FAIL: %s amplitude", name);
    end
  endtask

  initial begin
    int n;
    real v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    n = 0;
    while (nout < NOUT) begin
      v = 0.25 * (1.0 + $sin(2.0 * PI * 1000.0 * n / FS) + $sin(2.0 * PI * 2000.0 * n / FS)
                      + $sin(2.0 * PI * 2500.0 * n / FS));
      @(negedge clk);
      x      = q2_14_t'($rtoi(v * 16384.0 + ((v < 0.0) ? -0.5 : 0.5)));
      in_en  = 1'b1;
      out_en = (n % 20 == 19);
      @(negedge clk);
      in_en  = 1'b0;
      out_en = 1'b0;
      n++;
    end
    check_part("DC",      0.0,    0);
    check_part("1 kHz",   1000.0, 8);
    check_part("2 kHz",   2000.0, 16);
    check_part("2.5 kHz", 2500.0, 20);
    checks++;
    if (!(gain(2500.0) < gain(1000.0) && gain(2000.0) < 1.0e-3)) begin
      failures++;
      $display("FAIL: attenuation order");
    end
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
