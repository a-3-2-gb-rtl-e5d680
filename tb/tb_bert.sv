// tb_bert: self-checking test of the PRBS-31 bit-error-rate tester.
//
// A 2^31-1 sequence is produced here with a Fibonacci shift register
// (x^31 + x^28 + 1) from a random non-zero seed and fed 4 bits per clock.
// The checker must lock after 31 bits and count no error over thousands of
// clocks. One flipped bit must then add exactly 3 to the count, two flipped
// bits far apart 6, stalled clocks (data_valid low) must change nothing,
// clear must empty the count, and random data must produce errors.
module tb_bert;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, data_valid = 1'b0;
  logic [3:0]  data_in = '0;
  logic [31:0] err_cnt;
  logic        locked;
  int checks = 0, failures = 0;

  bert dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [30:0] lfsr;

  function automatic logic next_bit();
    logic b;
    b = lfsr[30] ^ lfsr[27];
    lfsr = {lfsr[29:0], b};
    return b;
  endfunction

  task automatic send(int flip_at);   // flip_at: bit 0..3 to flip, -1 none
    for (int j = 3; j >= 0; j--) data_in[j] = next_bit() ^ (flip_at == j);
    data_valid = 1'b1;
    @(negedge clk);
  endtask

  task automatic expect_cnt(int n, string what);
    checks++;
    if (err_cnt !== 32'(n)) begin
      failures++;
      $display("%s: error count %0d expected %0d", what, err_cnt, n);
    end
  endtask

  initial begin
    lfsr = 31'($urandom) | 31'd1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) send(-1);
    checks++;
    if (!locked) begin failures++; $display("not locked"); end
    expect_cnt(0, "clean PRBS");
    send(2);
    for (int i = 0; i < 20; i++) send(-1);
    expect_cnt(3, "one flipped bit");
    data_valid = 1'b0;
    data_in = 4'hF;
    repeat (10) @(negedge clk);
    expect_cnt(3, "stalled");
    send(0);
    for (int i = 0; i < 20; i++) send(-1);
    expect_cnt(6, "second flipped bit");
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    expect_cnt(0, "cleared");
    checks++;
    if (locked) begin failures++; $display("lock not cleared"); end
    for (int i = 0; i < 200; i++) send(-1);
    expect_cnt(0, "relocked after clear");
    for (int i = 0; i < 100; i++) begin
      data_in = 4'($urandom);
      @(negedge clk);
    end
    checks++;
    if (err_cnt < 32'd50) begin failures++; $display("random data gave only %0d errors", err_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
