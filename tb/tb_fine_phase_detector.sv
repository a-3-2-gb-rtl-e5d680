// tb_fine_phase_detector: self-checking test of the pipelined fine-phase
// detector.
//
// A random bit stream, 5 samples per bit, is cut into 20-sample windows
// while its phase (in samples) wanders by +-1 between windows, and now and
// then a long run of equal bits leaves windows without any transition.
// For every window the test finds independently on which fine phases its
// transitions fall. Where they all fall on one phase, the detector must
// report that phase; where there are none, it must keep the phase of the
// window before. Results are compared two clocks after the window entered,
// together with the delayed copy of the window.
module tb_fine_phase_detector;
  import cdr_pkg::*;

  localparam int NW = 3000;
  localparam int NBITS = NW * 4 + 64;

  logic      clk = 1'b0, rst_n = 1'b0;
  window_t   samples_in = '0, samples_out;
  phase_oh_t fine_phase;
  int checks = 0, failures = 0, holds = 0, moves = 0;

  fine_phase_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic    bits [NBITS];
  int      phi  [NW];
  window_t win  [NW];
  int      expect_ph [NW];   // -1: skip, else expected phase index

  function automatic logic sample(int w, int n);
    int s;
    s = 20*w + n - phi[w] + 20;      // +20 keeps the index positive
    return bits[s / 5];
  endfunction

  initial begin
    int last_ph;
    // data: random, with a long constant run every 200 bits
    for (int i = 0; i < NBITS; i++)
      bits[i] = ((i % 200) >= 150) ? 1'b1 : 1'($urandom);
    phi[0] = 0;
    for (int w = 1; w < NW; w++) begin
      int r;
      r = int'($urandom % 8);
      phi[w] = phi[w-1] + ((r == 0) ? 1 : (r == 1) ? -1 : 0);
      if (phi[w] > 14) phi[w] = 14;
      if (phi[w] < -14) phi[w] = -14;
    end
    last_ph = 0;
    for (int w = 0; w < NW; w++) begin
      logic prev, cur;
      int   mask;
      mask = 0;
      prev = (w == 0) ? 1'b0 : sample(w-1, 19);
      for (int n = 0; n < 20; n++) begin
        cur = sample(w, n);
        win[w][19-n] = cur;
        if (cur != prev) mask |= 1 << (n % 5);
        prev = cur;
      end
      if (mask == 0) expect_ph[w] = last_ph;
      else if ($countones(mask) == 1) begin
        for (int q = 0; q < 5; q++) if (mask == (1 << q)) expect_ph[w] = q;
      end else expect_ph[w] = -1;
      if (expect_ph[w] >= 0) last_ph = expect_ph[w];
      else last_ph = -1;
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NW + 2; c++) begin
      @(negedge clk);
      if (c >= 2 && expect_ph[c-2] >= 0) begin
        checks++;
        if (fine_phase !== idx2oh(3'(expect_ph[c-2])) || samples_out !== win[c-2]) begin
          failures++;
          if (failures < 10)
            $display("window %0d: fine phase %b expected %0d", c-2, fine_phase, expect_ph[c-2]);
        end
        if (c >= 3 && win[c-2] == {20{win[c-3][0]}}) holds++;
        if (c >= 3 && expect_ph[c-3] >= 0 && expect_ph[c-2] != expect_ph[c-3]) moves++;
      end
      if (c < NW) samples_in = win[c];
    end
    $display("windows held without transitions: %0d, phase moves: %0d", holds, moves);
    checks++;
    if (holds == 0 || moves == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
