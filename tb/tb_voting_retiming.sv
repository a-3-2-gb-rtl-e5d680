// tb_voting_retiming: self-checking test of the 2/3 majority voter and
// retiming register.
//
// A stream of windows (random, plus the "00010111" example) is driven one
// per clock. The expected output is computed from the flat sample stream:
// with voting each sample becomes the majority of itself and its two
// neighbours in time, across window boundaries; without voting the window
// passes unchanged. Every output window is compared two clocks after its
// input, which also checks the two-cycle latency.
module tb_voting_retiming;
  import cdr_pkg::*;

  localparam int NW = 400;

  logic    clk = 1'b0, rst_n = 1'b0, vote_en = 1'b1;
  window_t samples_in = '0, samples_out;
  window_t win [NW];
  logic    mode [NW];            // vote_en in force when window i is voted
  int      checks = 0, failures = 0;

  voting_retiming dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sample_at(int w, int n); // n may be -1 or 20
    if (n < 0)      return (w == 0) ? 1'b0 : win[w-1][0];
    if (n >= NSAMP) return (w == NW-1) ? 1'b0 : win[w+1][NSAMP-1];
    return win[w][NSAMP-1-n];
  endfunction

  function automatic window_t expected(int w);
    window_t e;
    for (int n = 0; n < NSAMP; n++) begin
      int s;
      s = int'(sample_at(w, n-1)) + int'(sample_at(w, n)) + int'(sample_at(w, n+1));
      e[NSAMP-1-n] = mode[w] ? (s >= 2) : sample_at(w, n);
    end
    return e;
  endfunction

  initial begin
    for (int i = 0; i < NW; i++) begin
      win[i]  = window_t'($urandom);
      mode[i] = (i < NW/2);
    end
    // "00010111" inside a quiet window, expected to become "00001111"
    win[5]  = 20'b0000_0000_0001_0111_1111;
    win[6]  = 20'hFFFFF;
    win[4]  = 20'h00000;
    win[300] = 20'b0000_0000_0001_0111_1111;
    win[301] = 20'hFFFFF;
    win[299] = 20'h00000;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NW + 2; c++) begin
      @(negedge clk);
      // output now holds window c-2
      if (c >= 2) begin
        checks++;
        if (samples_out !== expected(c-2)) begin
          failures++;
          $display("window %0d: got %b expected %b", c-2, samples_out, expected(c-2));
        end
        if (c-2 == 5) begin
          checks++;
          if (samples_out !== 20'b0000_0000_0000_1111_1111) begin
            failures++;
            $display("voting example wrong: %b", samples_out);
          end
        end
        if (c-2 == 300) begin
          checks++;
          if (samples_out !== 20'b0000_0000_0001_0111_1111) begin
            failures++;
            $display("pass-through example wrong: %b", samples_out);
          end
        end
      end
      if (c < NW) samples_in = win[c];
      // vote_en is sampled at the edge that votes window c-1
      vote_en = (c >= 1 && c-1 < NW) ? mode[c-1] : 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
