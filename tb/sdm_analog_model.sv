// sdm_analog_model: behavioural model (not synthesizable) of the analog half
// of the first-order sigma-delta modulator, for simulation only.
//
// The modelled circuit: the input, a sine centred on 1.25 V, passes an RC
// integrator (R1 = 10 kOhm, C1 = 330 pF, tau = 3.3 us) to the positive pin of
// an LVDS differential input buffer. The modulator output leaves the FPGA
// through an output buffer whose 220 Ohm output resistance and a 680 Ohm
// resistor to ground bring its high level from 3.3 V down to about 2.5 V;
// that level passes a second, identical RC integrator to the negative pin.
// The buffer output (cmp) is high when the positive pin is above the
// negative one. Both integrators are stepped with forward Euler once per
// system clock (10 ns), which is small against tau.
//
// Interface: clk (100 MHz, the time step), freq_hz and amp_mv (tone
// frequency and amplitude; the phase is continuous when they change),
// fb (modulator output bit driving the feedback integrator); cmp
// (comparator output) and vin_now (the input voltage, for reference).
module sdm_analog_model #(
  parameter real TAU_S   = 10.0e3 * 330.0e-12,
  parameter real DT_S    = 10.0e-9,
  parameter real V_HIGH  = 3.3 * 680.0 / (680.0 + 220.0),
  parameter real V_MID   = 1.25
) (
  input  logic clk,
  input  int   freq_hz,
  input  int   amp_mv,
  input  logic fb,
  output logic cmp,
  output real  vin_now
);

  real phase = 0.0;
  real vp    = V_MID;
  real vm    = V_MID;
  real vin;
  real vfb;

  initial cmp = 1'b0;

  always @(posedge clk) begin
    phase = phase + 2.0 * 3.14159265358979 * real'(freq_hz) * DT_S;
    if (phase > 2.0 * 3.14159265358979) phase = phase - 2.0 * 3.14159265358979;
    vin = V_MID + real'(amp_mv) * 1.0e-3 * $sin(phase);
    vfb = fb ? V_HIGH : 0.0;
    vp = vp + (vin - vp) * DT_S / TAU_S;
    vm = vm + (vfb - vm) * DT_S / TAU_S;
    // the buffer output changes a little after the clock edge
    cmp <= #1 (vp > vm);
    vin_now = vin;
  end

endmodule
