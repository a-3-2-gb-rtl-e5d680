// vco_samplers: BEHAVIOURAL MODEL (not synthesizable) of the 20-phase ring
// VCO with its 20 integrated samplers.
//
// The real part is a 10-stage differential ring oscillator whose 20 output
// phases each clock one sampler on the received signal, so that one VCO
// period yields 20 samples, 5 per UI at the nominal rate (800 MHz VCO,
// 3.2 Gb/s data). This model reproduces that at the signal level: the VCO
// frequency is F_CENTER_HZ + KOSC * vcntl / (2*pi), limited to F_MIN_HZ ..
// F_MAX_HZ (the published 1.9 to 3.5 Gb/s operating range, whose low end is
// set by the VCO's tuning range); the 20 sampling instants
// are spread evenly over each period; and the 20 samples of a period are
// presented together on `samples` (bit 19 = earliest) half a period later,
// on the falling edge of the core clock `clk`, so that they are stable at
// its next rising edge. clk is phase 0 of the VCO; its rising edge opens a
// sampling window.
//
// Times are in ns (time unit 1 ns; a precision of 1 ps or finer is
// assumed). Every event is scheduled on an absolute time kept in a real
// variable, so the rounding of single delays does not accumulate into a
// frequency error. KOSC = 30 Grad/s/V is the published measured VCO gain;
// F_CENTER_HZ, the linear tuning law with hard limits and the absence of
// VCO noise are this model's own simplifications.
module vco_samplers
  import cdr_pkg::*;
#(
  parameter real F_CENTER_HZ = 800.0e6,  // free-running frequency at vcntl = 0
  parameter real KOSC        = 30.0e9,   // rad/s per volt
  parameter real F_MIN_HZ    = 475.0e6,  // tuning range: 1.9 Gb/s / 4 ...
  parameter real F_MAX_HZ    = 875.0e6   // ... to 3.5 Gb/s / 4
) (
  input  real     vcntl,     // VCO control voltage from the loop filter
  input  logic    rx,        // received serial signal
  output logic    clk,       // core clock (phase 0)
  output window_t samples    // the 20 samples of the previous period
);

  localparam real PI = 3.14159265358979;

  window_t sbuf = '0;
  window_t full = '0;
  real     t_next = 1.0;
  real     period_ns;
  real     f_hz;

  initial begin
    clk     = 1'b0;
    samples = '0;
  end

  // one VCO period per pass: the frequency is taken from vcntl at the start
  // of the period, then the 20 sampling instants follow at equal spacing
  always begin
    f_hz = F_CENTER_HZ + KOSC * vcntl / (2.0 * PI);
    if (f_hz < F_MIN_HZ) f_hz = F_MIN_HZ;
    if (f_hz > F_MAX_HZ) f_hz = F_MAX_HZ;
    period_ns = 1.0e9 / f_hz;
    for (int k = 0; k < NSAMP; k++) begin
      #(t_next - $realtime);
      if (k == 0) begin
        clk  = 1'b1;
        full = sbuf;            // the window that has just been completed
      end
      if (k == NSAMP / 2) begin
        clk     = 1'b0;
        samples = full;
      end
      sbuf[NSAMP-1-k] = rx;
      t_next = t_next + period_ns / NSAMP;
    end
  end

endmodule
