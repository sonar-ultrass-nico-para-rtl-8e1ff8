// sonar_pkg: number formats and rate constants shared by the ultrasonic
// receive channel.
//
// Every sample between the CIC filter and the I/Q outputs is a 16-bit two's
// complement fixed-point word in Q2.14 (sign and one integer bit, 14 fraction
// bits), so +1.0 is 16'h4000 and -1.0 is 16'hC000. The CIC filter works in a
// 25-bit word (Q12.14) and the low-pass filter in a 23-bit word (Q9.14); both
// widths are the ones needed so that a sum over the filter window fits before
// it is divided back down to Q2.14.
//
// The rates follow the receive channel: a 100 MHz system clock, 50 MHz
// sigma-delta sampling, 160 kHz baseband rate (four samples per period of the
// 40 kHz carrier) and an 8 kHz I/Q output rate.
package sonar_pkg;

  localparam int unsigned SAMPLE_W = 16;   // Q2.14
  localparam int unsigned FRAC_W   = 14;
  localparam int unsigned CIC_W    = 25;   // Q12.14 inside the CIC filter
  localparam int unsigned LPF_W    = 23;   // Q9.14 inside the low-pass filter

  typedef logic signed [SAMPLE_W-1:0] q2_14_t;
  typedef logic signed [CIC_W-1:0]    cic_word_t;
  typedef logic signed [LPF_W-1:0]    lpf_word_t;

  localparam q2_14_t Q_ONE     = 16'sh4000;  // +1.0
  localparam q2_14_t Q_MINUS1  = -16'sh4000; // -1.0
  localparam q2_14_t Q_ZERO    = '0;

  // Clock division ratios from the 100 MHz system clock.
  localparam int unsigned DIV_SDM  = 2;      // 50 MHz sigma-delta sampling
  localparam int unsigned DIV_BB   = 625;    // 160 kHz baseband rate
  localparam int unsigned DIV_OUT  = 12500;  // 8 kHz I/Q output rate

  // Moving-average lengths of the low-pass filter (at 160 kHz).
  localparam int unsigned LPF_K1   = 80;     // first null at 2 kHz
  localparam int unsigned LPF_K2   = 53;     // first null near 3 kHz

endpackage
