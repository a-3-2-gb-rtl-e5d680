// downsampler: picks the data bits out of one 20-sample window.
//
// The sampling phase is the fine phase (average transition position) plus
// two samples, modulo 5: the sample nearest the eye centre, 2.5 samples
// after the transition. Four 5-to-1 multiplexers take the sample at that
// phase in each of the four UI of the window. The first sample of the window
// is prepended to these four bits, giving the 5-bit demux_data.
//
// When the sampling phase wraps across the window boundary from one window
// to the next, one bit is either seen twice or not at all. The data-size
// detector compares current and previous sampling phase:
//   current - previous >= 3  -> data_size_5 (the bit straddling the boundary
//                               was missed: use all 5 bits)
//   previous - current >= 3  -> data_size_3 (the first picked bit repeats
//                               the previous window's last: drop the
//                               prepended and the first picked bit)
// otherwise 4 bits are used. This is the 25-entry mapping of the published
// design (6 entries differ from 4); its insides are this design's own.
//
// Interface: samples and fine_phase belong to the same window and arrive on
// the same clock; demux_data, data_size_3 and data_size_5 are combinational
// outputs for that window. demux_data[4] is the prepended bit and
// demux_data[3..0] the picked bits, earliest first. The only register holds
// the previous sampling phase (reset: fine phase 0, sampling phase 2).
// Six output bits are plain wires from inputs, by design: sampling_phase is
// fine_phase rotated by two positions, and demux_data[4] is the window's
// first sample.
module downsampler
  import cdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  window_t   samples,
  input  phase_oh_t fine_phase,
  output logic [BITS_PER_WIN:0] demux_data,
  output logic      data_size_3,
  output logic      data_size_5,
  output phase_oh_t sampling_phase
);

  phase_oh_t        prev_sp_q;
  logic [0:NSAMP-1] x;               // x[n] = x_n, earliest first
  logic [2:0]       cur_i, prev_i;

  // sampling phase = fine phase rotated up by two positions
  assign sampling_phase = {fine_phase[2:0], fine_phase[4:3]};

  always_comb begin
    x = samples;
    demux_data[BITS_PER_WIN] = x[0];
    for (int b = 0; b < BITS_PER_WIN; b++) begin
      demux_data[BITS_PER_WIN-1-b] = 1'b0;
      for (int n = 0; n < OSR; n++)
        demux_data[BITS_PER_WIN-1-b] = demux_data[BITS_PER_WIN-1-b]
                                       | (sampling_phase[n] & x[OSR*b + n]);
    end
  end

  // data-size detector
  always_comb begin
    cur_i       = oh2idx(sampling_phase);
    prev_i      = oh2idx(prev_sp_q);
    data_size_5 = (cur_i >= prev_i + 3'd3);
    data_size_3 = (prev_i >= cur_i + 3'd3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev_sp_q <= phase_oh_t'(4);
    else        prev_sp_q <= sampling_phase;
  end

endmodule
