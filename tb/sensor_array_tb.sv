// sensor_array_tb: a 2 x 3 array (6 sensors, each with its own oscillator
// speed) measured by one 4,000 ns timer pulse and read over its scan chain.
// The expected count of sensor k is 4,000 ns divided by its own oscillator
// period, 6 x (LUT + latch + interconnect delay of instance k), worked out
// here from the delay formula. The test also checks that the words leave the
// chain in the order sensor 5 ... sensor 0, matching the counters' contents
// before the scan, and that shifting the re-arm pattern in zeroes them all.
`timescale 1ns/1ps
module sensor_array_tb;
  localparam int R = 2, C = 3, N = R * C;
  localparam int M1 = 49, M2 = 17, M3 = 16, W = M1 + M2 + M3, M = M1 * M2 * M3;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1, timer = 1'b0, clk = 1'b0, scan_enable = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [N*W-1:0] words, snapshot;
  logic [W-1:0] got;

  sensor_array #(.ROWS(R), .COLS(C)) dut (
    .rst_n(rst_n), .timer(timer), .scan_clk(clk), .scan_enable(scan_enable),
    .scan_in(scan_in), .scan_out(scan_out), .words(words)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int hot(input logic [W-1:0] w, input int base, input int len);
    for (int i = 0; i < len; i++) if (w[base + i]) return i;
    return -1;
  endfunction

  function automatic int decode(input logic [W-1:0] w);
    for (int c = 0; c < M; c++)
      if (c % M1 == hot(w, 0, M1) && c % M2 == hot(w, M1, M2) && c % M3 == hot(w, M1 + M2, M3))
        return c;
    return -1;
  endfunction

  // Oscillator period of sensor k in ps, from the array's delay spread.
  function automatic int period_ps(int k);
    return 6 * (250 + 250 + 167 + ((k * 37) % 23) * 3 - 33);
  endfunction

  initial begin
    int c, e, lo = M, hi = 0;
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    #50;
    @(posedge clk);
    #1 timer = 1'b1;
    #4000;
    timer = 1'b0;
    #100;
    snapshot = words;
    for (int w = 0; w < N; w++) begin
      for (int j = 0; j < W; j++) begin
        @(negedge clk);
        scan_enable = 1'b1;
        scan_in = (j == W - 1) || (j == W - 1 - M1) || (j == W - 1 - M1 - M2);
        got[W-1-j] = scan_out;
        @(posedge clk);
      end
      c = decode(got);
      e = 4000000 / period_ps(N - 1 - w);
      check(got == snapshot[(N-1-w)*W +: W], $sformatf("word %0d is sensor %0d", w, N - 1 - w));
      check(c - e inside {[-2:2]},
            $sformatf("sensor %0d: count %0d, expected about %0d", N - 1 - w, c, e));
      if (c < lo) lo = c;
      if (c > hi) hi = c;
    end
    @(negedge clk);
    scan_enable = 1'b0;
    scan_in = 1'b0;
    check(hi - lo > 20, $sformatf("sensors differ (%0d..%0d)", lo, hi));
    for (int k = 0; k < N; k++) check(decode(words[k*W +: W]) == 0, "re-armed to zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
