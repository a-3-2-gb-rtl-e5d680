// cdr_pkg: constants and types shared by the semi-blind oversampling CDR.
//
// The CDR oversamples a serial stream 5x with a 20-phase clock, so every
// core clock cycle delivers one window of 20 samples that spans 4 unit
// intervals (UI). Sample vectors are MSB-first in time: bit 19 of a window
// is its earliest sample (x_0 in the fine-phase equations) and bit 0 its
// latest (x_19). Phases within a UI (0..4, in fifths of a UI) travel one-hot
// in 5-bit vectors, bit n set for phase n. These conventions are this
// design's own; the window size, oversampling ratio, FIFO size and pointer
// width follow the published design.
package cdr_pkg;

  localparam int unsigned OSR        = 5;                 // samples per UI
  localparam int unsigned BITS_PER_WIN = 4;               // UI per window
  localparam int unsigned NSAMP      = OSR * BITS_PER_WIN; // 20 samples per window
  localparam int unsigned FIFO_BITS  = 32;                // elastic FIFO size in bits
  localparam int unsigned CP_W       = $clog2(FIFO_BITS); // coarse-phase width, 5
  localparam int unsigned TCNT_W     = 3;                 // transition count 0..4

  typedef logic [OSR-1:0]    phase_oh_t;   // one-hot fine / sampling phase
  typedef logic [TCNT_W-1:0] tcount_t;     // transitions seen on one fine phase
  typedef logic [NSAMP-1:0]  window_t;     // 20 samples, bit 19 earliest

  // Index of the set bit of a one-hot phase (0 if none is set).
  function automatic logic [2:0] oh2idx(input phase_oh_t oh);
    logic [2:0] idx;
    idx = '0;
    for (int i = 0; i < OSR; i++)
      if (oh[i]) idx = 3'(i);
    return idx;
  endfunction

  // One-hot vector for a phase index 0..4.
  function automatic phase_oh_t idx2oh(input logic [2:0] idx);
    phase_oh_t oh;
    oh = '0;
    for (int i = 0; i < OSR; i++)
      if (idx == 3'(i)) oh[i] = 1'b1;
    return oh;
  endfunction

endpackage
