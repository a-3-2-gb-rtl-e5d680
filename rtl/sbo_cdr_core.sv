// sbo_cdr_core: digital core of a 3.2 Gb/s semi-blind oversampling clock and
// data recovery (CDR) circuit.
//
// A 5x blind-oversampling CDR is placed inside a conventional phase-tracking
// loop. The oversampler recovers the data from the 20 samples of each
// 800 MHz clock period (4 UI at 3.2 Gb/s) and stores it in a 32-bit elastic
// FIFO; the FIFO's write pointer, the whole-UI (coarse) phase between the
// data and the local clock, drives the loop filter DAC that steers the VCO.
// The data may therefore wander up to the FIFO size (32 UI) away from the
// local clock without errors, and the loop only has to keep it inside that
// range instead of inside +-1/2 UI.
//
// Data path, one 20-sample window per clock (bit 19 of a window earliest):
//   samples -> voting_retiming (2 clk) -> fine_phase_detector (2 clk)
//           -> downsampler (comb) -> elastic_fifo -> data_out (4 bits/clk)
// plus the BERT on data_out and the scan chain that configures the core
// and reads the BERT counter. The VCO with its 20 samplers and the DAC with
// the RC loop filter are analog and sit outside this module: samples come
// in from the samplers, coarse_phase / freq_up / freq_down go out to the
// DAC and loop filter, and clk is the core clock taken from the VCO.
//
// The block partition and the widths of the connections (20 samples, 3-5
// downsampled bits, 4 data bits, 5-bit coarse phase) follow the published
// design. The scan-chain configuration synchroniser and the status outputs
// are this design's own.
module sbo_cdr_core
  import cdr_pkg::*;
(
  input  logic            clk,          // core clock, one VCO phase
  input  logic            rst_n,
  input  window_t         samples,      // 20 samplers, bit 19 earliest

  output logic [BITS_PER_WIN-1:0] data_out,     // recovered data, bit 3 earliest
  output logic [CP_W-1:0] coarse_phase, // to the 5-bit loop-filter DAC
  output logic            freq_up,      // to the frequency-detect current sources
  output logic            freq_down,
  output phase_oh_t       fine_phase,   // status: current fine phase
  output phase_oh_t       sampling_phase, // status: current sampling phase
  output logic            fifo_overflow,
  output logic            fifo_underflow,
  output logic            data_size_3,
  output logic            data_size_5,

  input  logic            bert_clear,
  output logic [31:0]     bert_err_cnt, // readable without scan clocking
  output logic            bert_locked,

  input  logic            scan_clk,
  input  logic            scan_rst_n,
  input  logic            scan_in,
  input  logic            scan_capture,
  input  logic            scan_shift,
  input  logic            scan_update,
  output logic            scan_out,
  output logic            rclk_out_en   // enable of the recovered-clock output pad
);

  logic [1:0] cfg;
  logic [1:0] vote_sync_q;
  window_t    retimed, aligned;
  logic [BITS_PER_WIN:0] demux_data;
  logic       bert_valid_q;

  // configuration from the scan clock domain: quasi-static, synchronised
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vote_sync_q <= 2'b11;
    else        vote_sync_q <= {vote_sync_q[0], cfg[0]};
  end
  assign rclk_out_en = cfg[1];

  voting_retiming u_vote (
    .clk         (clk),
    .rst_n       (rst_n),
    .vote_en     (vote_sync_q[1]),
    .samples_in  (samples),
    .samples_out (retimed)
  );

  fine_phase_detector u_fpd (
    .clk         (clk),
    .rst_n       (rst_n),
    .samples_in  (retimed),
    .fine_phase  (fine_phase),
    .samples_out (aligned)
  );

  downsampler u_ds (
    .clk            (clk),
    .rst_n          (rst_n),
    .samples        (aligned),
    .fine_phase     (fine_phase),
    .demux_data     (demux_data),
    .data_size_3    (data_size_3),
    .data_size_5    (data_size_5),
    .sampling_phase (sampling_phase)
  );

  elastic_fifo u_fifo (
    .clk          (clk),
    .rst_n        (rst_n),
    .demux_data   (demux_data),
    .data_size_3  (data_size_3),
    .data_size_5  (data_size_5),
    .data_out     (data_out),
    .coarse_phase (coarse_phase),
    .overflow     (fifo_overflow),
    .underflow    (fifo_underflow),
    .freq_up      (freq_up),
    .freq_down    (freq_down)
  );

  // data_out is valid from the first clock after reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bert_valid_q <= 1'b0;
    else        bert_valid_q <= 1'b1;
  end

  bert #(.NB(BITS_PER_WIN), .ERR_W(32)) u_bert (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (bert_clear),
    .data_valid (bert_valid_q),
    .data_in    (data_out),
    .err_cnt    (bert_err_cnt),
    .locked     (bert_locked)
  );

  scan_chain #(.CFG_W(2), .ERR_W(32)) u_scan (
    .scan_clk   (scan_clk),
    .scan_rst_n (scan_rst_n),
    .scan_in    (scan_in),
    .capture    (scan_capture),
    .shift      (scan_shift),
    .update     (scan_update),
    .scan_out   (scan_out),
    .err_cnt    (bert_err_cnt),
    .cfg        (cfg)
  );

endmodule
