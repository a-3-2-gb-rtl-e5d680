// tb_elastic_fifo: self-checking test of the elastic FIFO, its coarse-phase
// output and the frequency detector.
//
// Part 1 writes random 3-, 4- and 5-bit groups while keeping the write
// pointer between 2 and 29, and compares every 4-bit output word and every
// coarse-phase value with a bit-queue model that starts with 18 (reset
// pointer 16 plus the write offset of 2) bits, takes 4 bits out and the new bits in on each clock.
// Part 2 forces a steady frequency error: 5-bit groups on every clock make
// the write pointer wrap upwards again and again (overflow), then 3-bit
// groups make it wrap downwards (underflow), then the two alternate. The
// test checks the pointer on every clock and that freq_up / freq_down pulse
// on the clock after the second and later wraps in one direction, and never
// after a wrap that follows one in the other direction.
module tb_elastic_fifo;
  import cdr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BITS_PER_WIN:0] demux_data = '0;
  logic data_size_3 = 1'b0, data_size_5 = 1'b0;
  logic [BITS_PER_WIN-1:0] data_out;
  logic [CP_W-1:0] coarse_phase;
  logic overflow, underflow, freq_up, freq_down;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_udf = 0, n_up = 0, n_dn = 0;

  elastic_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q [$];
  int wp_model;
  int last_ev;          // 0 none, 1 overflow, 2 underflow

  task automatic cycle(int n, bit check_data);
    int expw [4];
    int ev;
    demux_data  = 5'($urandom);
    data_size_3 = (n == 3);
    data_size_5 = (n == 5);
    for (int j = 0; j < 4; j++) expw[j] = (q.size() > j) ? q[j] : 0;
    ev = 0;
    if (n == 5 && wp_model % 32 == 31) ev = 1;
    if (n == 3 && wp_model % 32 == 0)  ev = 2;
    #1;
    checks++;
    if ((ev == 1) != overflow || (ev == 2) != underflow) begin
      failures++;
      $display("wrap flags wrong at wp %0d", wp_model);
    end
    @(negedge clk);
    // model update
    for (int j = 0; j < 4; j++) if (q.size() > 0) void'(q.pop_front());
    for (int j = n - 1; j >= 0; j--) q.push_back(int'(demux_data[j]));
    wp_model = (wp_model + n - 4 + 32) % 32;
    checks++;
    if (check_data && data_out !== {1'(expw[0]), 1'(expw[1]), 1'(expw[2]), 1'(expw[3])}) begin
      failures++;
      if (failures < 10) $display("data_out %b expected %0d%0d%0d%0d", data_out,
                                  expw[0], expw[1], expw[2], expw[3]);
    end
    checks++;
    if (coarse_phase !== CP_W'(wp_model)) begin
      failures++;
      if (failures < 10) $display("coarse phase %0d expected %0d", coarse_phase, wp_model);
    end
    checks++;
    if (freq_up !== (ev == 1 && last_ev == 1) || freq_down !== (ev == 2 && last_ev == 2)) begin
      failures++;
      $display("frequency pulse wrong: up %b down %b ev %0d last %0d", freq_up, freq_down, ev, last_ev);
    end
    if (ev == 1) n_ovf++;
    if (ev == 2) n_udf++;
    if (freq_up) n_up++;
    if (freq_down) n_dn++;
    if (ev != 0) last_ev = ev;
  endtask

  initial begin
    for (int j = 0; j < 18; j++) q.push_back(0);
    wp_model = 16;
    last_ev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // part 1: random sizes within the safe occupancy range
    for (int i = 0; i < 3000; i++) begin
      int n, r;
      r = int'($urandom % 3);
      n = 4 + ((r == 0) ? -1 : (r == 1) ? 1 : 0);
      if (wp_model + n - 4 > 29 || wp_model + n - 4 < 2) n = 4;
      cycle(n, 1'b1);
    end
    // part 2: steady up, steady down, then alternating wraps
    for (int i = 0; i < 100; i++) cycle(5, 1'b0);
    for (int i = 0; i < 100; i++) cycle(3, 1'b0);
    for (int k = 0; k < 3; k++) begin
      while (wp_model != 31) cycle(5, 1'b0);
      cycle(5, 1'b0);
      while (wp_model != 0) cycle(3, 1'b0);
      cycle(3, 1'b0);
      cycle(3, 1'b0);    // leave zero upwards before the next overflow
      cycle(5, 1'b0);
    end
    $display("overflows %0d underflows %0d freq_up %0d freq_down %0d", n_ovf, n_udf, n_up, n_dn);
    checks++;
    if (n_up == 0 || n_dn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
