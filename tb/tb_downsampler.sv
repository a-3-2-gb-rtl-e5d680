// tb_downsampler: self-checking test of the downsampler and its data-size
// detector.
//
// Part 1 steps through all 25 pairs of previous and current sampling phase
// and compares data_size_3 / data_size_5 with the 5x5 data-size table
// (5 bits where the phase jumps up by 3 or 4, 3 bits where it jumps down by
// 3 or 4, else 4), and checks that each picked bit is the sample at the
// sampling phase of its UI and that the prepended bit is the first sample.
// Part 2 feeds a random bit stream, 5 samples per bit, whose phase wanders
// by +-1 sample between windows across many window boundaries, with the
// ideal fine phase. The bits kept (3, 4 or 5 per window) are concatenated and
// must reproduce the transmitted stream exactly, with no bit lost or doubled.
module tb_downsampler;
  import cdr_pkg::*;

  localparam int NW = 4000;
  localparam int NBITS = NW * 4 + 64;

  logic      clk = 1'b0, rst_n = 1'b0;
  window_t   samples = '0;
  phase_oh_t fine_phase = phase_oh_t'(1), sampling_phase;
  logic [BITS_PER_WIN:0] demux_data;
  logic      data_size_3, data_size_5;
  int checks = 0, failures = 0, n3 = 0, n5 = 0;

  downsampler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // table rows: current sampling phase 0..4, columns: previous 0..4
  int size_tab [5][5] = '{'{4, 4, 4, 3, 3},
                          '{4, 4, 4, 4, 3},
                          '{4, 4, 4, 4, 4},
                          '{5, 4, 4, 4, 4},
                          '{5, 5, 4, 4, 4}};

  logic bits [NBITS];
  int   phi  [NW];

  initial begin
    int rec [$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // part 1
    for (int pv = 0; pv < 5; pv++)
      for (int cu = 0; cu < 5; cu++) begin
        int n;
        fine_phase = idx2oh(3'((pv + 3) % 5));   // sampling phase pv
        samples = window_t'($urandom);
        @(negedge clk);
        fine_phase = idx2oh(3'((cu + 3) % 5));   // sampling phase cu
        samples = window_t'($urandom);
        #1;
        n = data_size_5 ? 5 : data_size_3 ? 3 : 4;
        checks++;
        if (n != size_tab[cu][pv] || sampling_phase !== idx2oh(3'(cu))) begin
          failures++;
          $display("prev %0d cur %0d: size %0d expected %0d", pv, cu, n, size_tab[cu][pv]);
        end
        for (int b = 0; b < 4; b++) begin
          checks++;
          if (demux_data[3-b] !== samples[19 - (5*b + cu)]) begin
            failures++;
            $display("sp %0d bit %0d wrong", cu, b);
          end
        end
        checks++;
        if (demux_data[4] !== samples[19]) begin
          failures++;
          $display("prepended bit wrong");
        end
        @(negedge clk);
      end

    // part 2: fine phase 0 on the clock before, so the previous sampling phase is 2
    for (int i = 0; i < NBITS; i++) bits[i] = 1'($urandom);
    phi[0] = 0;
    for (int w = 1; w < NW; w++) begin
      int r;
      r = int'($urandom % 6);
      phi[w] = phi[w-1] + ((r == 0) ? 1 : (r == 1) ? -1 : 0);
      if (phi[w] > 18) phi[w] = 18;
      if (phi[w] < -18) phi[w] = -18;
    end
    fine_phase = idx2oh(3'd0);
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      int n;
      for (int k = 0; k < 20; k++)
        samples[19-k] = bits[(20*w + k - phi[w] + 40) / 5];
      fine_phase = idx2oh(3'(((phi[w] % 5) + 5) % 5));
      #1;
      if (data_size_3) begin
        n3++;
        for (int b = 2; b >= 0; b--) rec.push_back(int'(demux_data[b]));
      end else if (data_size_5) begin
        n5++;
        for (int b = 4; b >= 0; b--) rec.push_back(int'(demux_data[b]));
      end else
        for (int b = 3; b >= 0; b--) rec.push_back(int'(demux_data[b]));
      @(negedge clk);
    end
    // the first kept bit is the one under sample 2 of window 0
    for (int j = 0; j < rec.size(); j++) begin
      checks++;
      if (rec[j] != int'(bits[(2 + 40) / 5 + j])) begin
        failures++;
        if (failures < 10) $display("recovered bit %0d wrong", j);
      end
    end
    $display("3-bit windows %0d, 5-bit windows %0d, bits %0d", n3, n5, rec.size());
    checks++;
    if (n3 == 0 || n5 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
