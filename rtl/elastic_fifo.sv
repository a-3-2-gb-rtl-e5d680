// elastic_fifo: 8x4-bit elastic FIFO that turns 3, 4 or 5 recovered bits per
// clock into exactly 4, and measures the coarse (whole-UI) phase.
//
// Storage is a ring of 32 bits read one 4-bit row per clock; the read row
// advances every cycle. The write pointer is kept relative to the read
// position: the incoming bits are written at ring address 4*row + wp + 2, and
// since the reader consumes 4 bits per cycle the pointer only moves by the
// difference, -1 (data_size_3), +1 (data_size_5) or 0. The write pointer is
// therefore the number of UI the data leads the local clock, modulo 32, and
// is brought out directly as the 5-bit coarse phase for the loop filter DAC.
// A wrap from 31 to 0 is an overflow and from 0 to 31 an underflow; both go
// to the frequency detector.
//
// Interface: demux_data[4] is the prepended bit, [3..0] the picked bits,
// earliest first; with data_size_3 only [2..0] are written, with
// data_size_5 all five, otherwise [3..0]. data_out is registered, bit 3
// earliest, and holds the row read at the clock edge; bits written at a
// clock edge are read about (wp + 2) / 4 clocks later. A 4-bit read row and
// writes of up to 5 bits leave 28 of the 32 pointer values error-free: with
// the write offset of 2 (WR_LEAD) these are wp = 2..29, centred on the
// DAC's zero-current point of 15.5. Outside them the reader gets stale bits
// or the writer overwrites unread ones.
//
// The 8x4 organisation, the +-1 pointer adder, the write pointer as coarse
// phase and the repeated-wrap frequency detector follow the published design.
// The ring addressing relative to the read row, the write offset and the
// reset pointer of 16
// (half full, where the DAC output is near zero) are this design's own.
module elastic_fifo
  import cdr_pkg::*;
#(
  parameter int unsigned DEPTH_BITS = FIFO_BITS,      // 32
  parameter int unsigned WP_RESET   = FIFO_BITS / 2,  // 16
  parameter int unsigned WR_LEAD    = 2               // write offset ahead of the pointer
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [BITS_PER_WIN:0]  demux_data,
  input  logic                   data_size_3,
  input  logic                   data_size_5,
  output logic [BITS_PER_WIN-1:0] data_out,
  output logic [$clog2(DEPTH_BITS)-1:0] coarse_phase,
  output logic                   overflow,
  output logic                   underflow,
  output logic                   freq_up,
  output logic                   freq_down
);

  localparam int unsigned AW   = $clog2(DEPTH_BITS);
  localparam int unsigned ROWS = DEPTH_BITS / BITS_PER_WIN;
  localparam int unsigned RW   = $clog2(ROWS);

  logic [DEPTH_BITS-1:0] mem_q;      // mem_q[a] is ring bit a
  logic [RW-1:0]         row_q;
  logic [AW-1:0]         wp_q;
  logic [AW-1:0]         base;
  logic [2:0]            n_wr;
  logic [BITS_PER_WIN:0] wr_bits;    // bits to write, earliest at the top
  logic                  inc, dec;

  assign inc = data_size_5 & ~data_size_3;
  assign dec = data_size_3 & ~data_size_5;

  always_comb begin
    base = AW'({row_q, 2'b00}) + wp_q + AW'(WR_LEAD);
    if (inc) begin
      n_wr    = 3'd5;
      wr_bits = demux_data;
    end else if (dec) begin
      n_wr    = 3'd3;
      wr_bits = {demux_data[2:0], 2'b00};
    end else begin
      n_wr    = 3'd4;
      wr_bits = {demux_data[3:0], 1'b0};
    end
    overflow  = inc && (wp_q == '1);
    underflow = dec && (wp_q == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q    <= '0;
      row_q    <= '0;
      wp_q     <= AW'(WP_RESET);
      data_out <= '0;
    end else begin
      for (int j = 0; j <= BITS_PER_WIN; j++)
        if (3'(j) < n_wr) mem_q[AW'(base + AW'(j))] <= wr_bits[BITS_PER_WIN-j];
      for (int j = 0; j < BITS_PER_WIN; j++)
        data_out[BITS_PER_WIN-1-j] <= mem_q[AW'({row_q, 2'b00}) + AW'(j)];
      row_q <= row_q + 1'b1;
      wp_q  <= wp_q + AW'(inc) - AW'(dec);
    end
  end

  assign coarse_phase = wp_q;

  freq_detector u_fd (
    .clk       (clk),
    .rst_n     (rst_n),
    .overflow  (overflow),
    .underflow (underflow),
    .freq_up   (freq_up),
    .freq_down (freq_down)
  );

  a_size: assert property (@(posedge clk) disable iff (!rst_n) !(data_size_3 && data_size_5));

endmodule
