// downconverter: one receive channel of the sonar, from the sigma-delta
// comparator to baseband In-phase and Quadrature samples.
//
// An echo arrives as a narrow band around the 40 kHz carrier. The channel
// digitises it with a first-order sigma-delta modulator whose only analog
// parts are two RC integrators and an LVDS input buffer used as comparator;
// this module holds the modulator's sampling flip-flop, clocked at 50 MHz.
// A one-stage CIC filter averages the bitstream over 625 system clocks and
// delivers Q2.14 samples at 160 kHz, four per carrier period. There the
// local oscillator is just the sequence 1, 0, -1, 0, and its one-sample
// delay is the 90 degree copy. Two mixers multiply the CIC output by the
// oscillator (I branch) and by its delayed copy (Q branch); each product
// passes a two-stage moving-average low-pass filter (80 and 53 samples) and
// is decimated by 20, giving I and Q at 8 kHz. A tone at 40 kHz + df appears
// at baseband as a phasor I + jQ turning at df; its amplitude and phase are
// what a beamformer would compare across channels.
//
// All rates come from one trigger generator on the 100 MHz clock, so every
// block runs on the same clock with one-cycle enables.
//
// Block structure, rates, formats and filter lengths follow the receive
// channel. Sign of the rotation: the Q branch oscillator is sin(pi/2 n), so a
// tone above 40 kHz gives I + jQ turning clockwise (negative frequency).
// The synchronous reset, the output valid strobe and the monitoring outputs
// are this implementation's additions.
//
// Interface: clk (100 MHz), rst (synchronous, active high), cmp_in (output
// of the differential input buffer); sdm_bit (the modulator output, to the
// output buffer of the feedback loop), cic_out / cic_valid (160 kHz
// monitoring), i_out, q_out (Q2.14) and iq_valid (one-cycle pulse at 8 kHz).
module downconverter #(
  parameter int unsigned DIV_SDM = sonar_pkg::DIV_SDM,
  parameter int unsigned DIV_BB  = sonar_pkg::DIV_BB,
  parameter int unsigned DIV_OUT = sonar_pkg::DIV_OUT,
  parameter int unsigned K1      = sonar_pkg::LPF_K1,
  parameter int unsigned K2      = sonar_pkg::LPF_K2
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   cmp_in,
  output logic   sdm_bit,
  output sonar_pkg::q2_14_t cic_out,
  output logic   cic_valid,
  output sonar_pkg::q2_14_t i_out,
  output sonar_pkg::q2_14_t q_out,
  output logic   iq_valid
);

  logic   stb_sdm, stb_bb, stb_out;
  sonar_pkg::q2_14_t lo_i, lo_q;
  sonar_pkg::q2_14_t mix_i, mix_q;
  logic   q_valid_unused;

  trigger_gen #(.DIV_SDM(DIV_SDM), .DIV_BB(DIV_BB), .DIV_OUT(DIV_OUT)) u_trig (
    .clk(clk), .rst(rst), .stb_sdm(stb_sdm), .stb_bb(stb_bb), .stb_out(stb_out)
  );

  sdm_quantizer u_quant (
    .clk(clk), .rst(rst), .sample_en(stb_sdm), .cmp_in(cmp_in), .bit_out(sdm_bit)
  );

  cic_decimator #(.M(DIV_BB)) u_cic (
    .clk(clk), .rst(rst), .bit_in(sdm_bit), .out_en(stb_bb),
    .y(cic_out), .out_valid(cic_valid)
  );

  local_osc u_osc (
    .clk(clk), .rst(rst), .en(stb_bb), .lo(lo_i)
  );

  phase_shift_90 u_shift (
    .clk(clk), .rst(rst), .en(stb_bb), .d(lo_i), .q(lo_q)
  );

  mixer u_mix_i (
    .clk(clk), .rst(rst), .en(stb_bb), .a(cic_out), .b(lo_i), .p(mix_i)
  );

  mixer u_mix_q (
    .clk(clk), .rst(rst), .en(stb_bb), .a(cic_out), .b(lo_q), .p(mix_q)
  );

  lpf_decimator #(.K1(K1), .K2(K2)) u_lpf_i (
    .clk(clk), .rst(rst), .in_en(stb_bb), .x(mix_i), .out_en(stb_out),
    .y(i_out), .out_valid(iq_valid)
  );

  lpf_decimator #(.K1(K1), .K2(K2)) u_lpf_q (
    .clk(clk), .rst(rst), .in_en(stb_bb), .x(mix_q), .out_en(stb_out),
    .y(q_out), .out_valid(q_valid_unused)
  );

  initial assert (DIV_OUT % DIV_BB == 0)
    else $error("downconverter: output rate must divide the baseband rate");

endmodule
