// sonar_top: FPGA top of the ultrasonic sonar receiver.
//
// Two independent builds stand side by side, each with its own pins:
//  * rx_*  : one receive channel (downconverter). The comparator input comes
//            from the LVDS differential input buffer, whose inputs are the
//            two RC integrators of the sigma-delta loop; rx_sdm_bit goes to
//            the output buffer that drives the feedback integrator. The
//            channel delivers 8 kHz baseband I/Q samples and, for
//            monitoring, the 160 kHz CIC output.
//  * adc_* : the stand-alone sigma-delta ADC used to characterise the
//            converter, with its clock divider and the 36-bit capture shift
//            register that packs the bitstream for recording.
// The differential input buffers, output buffers, integrators, preamplifier
// and transducer are analog or device primitives and sit outside this module.
//
// Interface: clk (100 MHz system clock), rst (synchronous, active high);
// the rest as listed. All outputs are registered.
module sonar_top
  import sonar_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // receive channel
  input  logic        rx_cmp_in,
  output logic        rx_sdm_bit,
  output q2_14_t      rx_cic_out,
  output logic        rx_cic_valid,
  output q2_14_t      rx_i,
  output q2_14_t      rx_q,
  output logic        rx_iq_valid,
  // stand-alone ADC
  input  logic        adc_cmp_in,
  output logic        adc_bit,
  output logic [35:0] adc_cap_word,
  output logic        adc_cap_trig
);

  downconverter u_rx (
    .clk      (clk),
    .rst      (rst),
    .cmp_in   (rx_cmp_in),
    .sdm_bit  (rx_sdm_bit),
    .cic_out  (rx_cic_out),
    .cic_valid(rx_cic_valid),
    .i_out    (rx_i),
    .q_out    (rx_q),
    .iq_valid (rx_iq_valid)
  );

  sdm_adc #(.CAP_N(36)) u_adc (
    .clk     (clk),
    .rst     (rst),
    .cmp_in  (adc_cmp_in),
    .bit_out (adc_bit),
    .cap_word(adc_cap_word),
    .cap_trig(adc_cap_trig)
  );

endmodule
