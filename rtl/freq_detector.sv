// freq_detector: start-up frequency detector of the elastic FIFO.
//
// While the local clock runs at a different frequency from the data, the
// FIFO write pointer ramps steadily and wraps again and again. Two or more
// overflows in a row, with no underflow between them, produce a freq_up
// pulse for each overflow from the second on; two or more underflows in a
// row likewise produce freq_down pulses. A single wrap, as large jitter may
// cause, produces nothing. The rule follows the published design; the
// one-cycle pulse width and the registered outputs are this design's choice.
module freq_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic overflow,    // write pointer wrapped upwards this cycle
  input  logic underflow,   // write pointer wrapped downwards this cycle
  output logic freq_up,
  output logic freq_down
);

  typedef enum logic [1:0] {EV_NONE, EV_OVF, EV_UDF} event_e;
  event_e last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= EV_NONE;
      freq_up   <= 1'b0;
      freq_down <= 1'b0;
    end else begin
      freq_up   <= overflow  && (last_q == EV_OVF);
      freq_down <= underflow && (last_q == EV_UDF);
      if (overflow)       last_q <= EV_OVF;
      else if (underflow) last_q <= EV_UDF;
    end
  end

endmodule
