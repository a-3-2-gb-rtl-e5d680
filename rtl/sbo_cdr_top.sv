// sbo_cdr_top: the complete semi-blind oversampling CDR, closed loop, for
// simulation.
//
// The loop is a phase-tracking CDR whose phase detector and sampler are a
// 5x blind-oversampling CDR:
//   rx -> vco_samplers (20 samples / VCO period) -> sbo_cdr_core
//      -> coarse phase (FIFO write pointer), freq_up, freq_down
//      -> dac_lpf -> vcntl -> vco_samplers
// The core recovers the data whatever the phase between data and VCO, as
// long as it stays within the 32-bit elastic FIFO; the coarse phase steers
// the VCO so that, at low jitter frequencies, the data may move 32 UI
// peak-to-peak instead of 1 UI. On start-up at a wrong frequency the FIFO
// wraps repeatedly and the frequency detector pulls the VCO in.
//
// vco_samplers and dac_lpf are behavioural models of analog circuits (real
// numbers, delays), so this module is for simulation only. F_CENTER_HZ sets
// the VCO's free-running frequency: the published chip tunes from 1.9 to
// 3.5 Gb/s, and the model starts from F_CENTER_HZ at zero control voltage; sbo_cdr_core is
// the synthesizable part. Ports: rx is the serial input; data_out carries 4
// recovered bits per rclk cycle (bit 3 earliest); rclk is the core clock,
// rclk_out the recovered-clock output, gated by its scan-chain enable. The
// structure follows the published block diagram; the gating of rclk_out by
// an AND and the status outputs are this design's own.
module sbo_cdr_top
  import cdr_pkg::*;
#(
  parameter real F_CENTER_HZ = 800.0e6  // VCO free-running frequency (3.2 Gb/s / 4)
) (
  input  logic            rx,
  input  logic            rst_n,

  output logic            rclk,
  output logic            rclk_out,
  output logic [BITS_PER_WIN-1:0] data_out,
  output logic [CP_W-1:0] coarse_phase,
  output logic            freq_up,
  output logic            freq_down,
  output phase_oh_t       fine_phase,
  output phase_oh_t       sampling_phase,
  output logic            fifo_overflow,
  output logic            fifo_underflow,
  output logic            data_size_3,
  output logic            data_size_5,

  input  logic            bert_clear,
  output logic [31:0]     bert_err_cnt,
  output logic            bert_locked,

  input  logic            scan_clk,
  input  logic            scan_rst_n,
  input  logic            scan_in,
  input  logic            scan_capture,
  input  logic            scan_shift,
  input  logic            scan_update,
  output logic            scan_out
);

  real       vcntl;
  window_t   samples;
  logic      rclk_out_en;

  vco_samplers #(.F_CENTER_HZ(F_CENTER_HZ)) u_vco (
    .vcntl   (vcntl),
    .rx      (rx),
    .clk     (rclk),
    .samples (samples)
  );

  sbo_cdr_core u_core (
    .clk            (rclk),
    .rst_n          (rst_n),
    .samples        (samples),
    .data_out       (data_out),
    .coarse_phase   (coarse_phase),
    .freq_up        (freq_up),
    .freq_down      (freq_down),
    .fine_phase     (fine_phase),
    .sampling_phase (sampling_phase),
    .fifo_overflow  (fifo_overflow),
    .fifo_underflow (fifo_underflow),
    .data_size_3    (data_size_3),
    .data_size_5    (data_size_5),
    .bert_clear     (bert_clear),
    .bert_err_cnt   (bert_err_cnt),
    .bert_locked    (bert_locked),
    .scan_clk       (scan_clk),
    .scan_rst_n     (scan_rst_n),
    .scan_in        (scan_in),
    .scan_capture   (scan_capture),
    .scan_shift     (scan_shift),
    .scan_update    (scan_update),
    .scan_out       (scan_out),
    .rclk_out_en    (rclk_out_en)
  );

  dac_lpf u_lpf (
    .clk          (rclk),
    .coarse_phase (coarse_phase),
    .freq_up      (freq_up),
    .freq_down    (freq_down),
    .vcntl        (vcntl)
  );

  assign rclk_out = rclk & rclk_out_en;

endmodule
