// dac_lpf: BEHAVIOURAL MODEL (not synthesizable) of the 5-bit current DAC,
// the frequency-detector current sources and the RC loop filter.
//
// The DAC sinks or sources I_dac = (coarse_phase - 15.5) * I_STEP into the
// control node; the node sits on a series R-C to ground. freq_up and
// freq_down switch a current I_FD directly onto the capacitor. With the
// capacitor voltage vc:
//   C * dvc/dt = I_dac + I_fd,   vcntl = vc + R * I_dac
// The digital inputs change only on rising edges of the core clock, so the
// model integrates exactly, once per clock, over the interval just ended.
// R, C and I_STEP are the published loop values (200 ohm, 1.5 nF, 1.2 uA,
// giving f0 = 0.6 MHz and Q = 0.85 with KOSC = 30 Grad/s/V). I_FD is not
// given and is this model's choice; so is the sign convention that freq_up
// raises vcntl (the same direction as a high coarse phase, which is what a
// run of overflows comes from). vc starts at VC_INIT volts.
module dac_lpf #(
  parameter real R       = 200.0,
  parameter real C       = 1.5e-9,
  parameter real I_STEP  = 1.2e-6,
  parameter real I_FD    = 200.0e-6,
  parameter real VC_INIT = 0.0
) (
  input  logic       clk,
  input  logic [4:0] coarse_phase,
  input  logic       freq_up,
  input  logic       freq_down,
  output real        vcntl
);

  real vc = VC_INIT;
  real t_last = 0.0;
  real i_dac, i_fd, dt;

  initial vcntl = VC_INIT;

  always @(posedge clk) begin
    // currents that flowed during the clock period that just ended
    dt    = ($realtime - t_last) * 1.0e-9;
    t_last = $realtime;
    i_dac = (real'(coarse_phase) - 15.5) * I_STEP;
    i_fd  = freq_up ? I_FD : (freq_down ? -I_FD : 0.0);
    vc    = vc + (i_dac + i_fd) * dt / C;
    vcntl = vc + R * i_dac;
  end

endmodule
