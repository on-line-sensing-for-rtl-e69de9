// scan_controller_tb: the scan controller reading a model of a 3-sensor
// chain (a 246-bit shift register that shifts on the clock edges at which
// scan_enable is high). The chain is loaded with words of known counts; the
// test checks that every sensor's count comes out once, in the order sensor
// 2, 1, 0, that scan_enable stays high for exactly 82 x 3 cycles, that done
// follows, that a start during a readout is ignored, and that afterwards
// every ring in the chain holds a hot bit at position 0 (count zero).
`timescale 1ns/1ps
module scan_controller_tb;
  localparam int N = 3, M1 = 49, M2 = 17, M3 = 16, W = M1 + M2 + M3, M = M1 * M2 * M3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, scan_enable, scan_in, scan_out, sample_valid;
  logic [1:0] sample_index;
  logic [13:0] sample_count;
  logic [N*W-1:0] chain;
  int counts[N];
  int seen, en_cycles;

  scan_controller #(.N_SENSORS(N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (scan_enable) begin
    chain <= {chain[N*W-2:0], scan_in};
    en_cycles++;
  end
  assign scan_out = chain[N*W-1];

  function automatic logic [W-1:0] make_word(int c);
    logic [W-1:0] w;
    w = '0;
    w[c % M1] = 1'b1;
    w[M1 + (c % M2)] = 1'b1;
    w[M1 + M2 + (c % M3)] = 1'b1;
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    #1;
    if (sample_valid) begin
      check(int'(sample_index) == N - 1 - seen,
            $sformatf("sample %0d has index %0d", seen, sample_index));
      if (int'(sample_index) < N)
        check(int'(sample_count) == counts[sample_index],
              $sformatf("sensor %0d: count %0d, want %0d", sample_index, sample_count,
                        counts[sample_index]));
      seen++;
    end
  end

  task automatic readout(input bit poke);
    for (int s = 0; s < N; s++) begin
      counts[s] = $urandom % M;
      chain[s*W +: W] = make_word(counts[s]);
    end
    if (poke) counts[0] = M - 1;
    if (poke) chain[0 +: W] = make_word(M - 1);
    seen = 0;
    en_cycles = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    repeat (100) @(negedge clk);
    start = 1'b1;  // ignored while busy
    @(negedge clk);
    start = 1'b0;
    @(posedge done);
    repeat (4) @(posedge clk);
    #2;
    check(en_cycles == N * W, $sformatf("scan enable for %0d cycles, want %0d", en_cycles, N * W));
    check(seen == N, $sformatf("%0d samples, want %0d", seen, N));
    check(!busy, "idle after done");
    for (int s = 0; s < N; s++)
      check(chain[s*W +: W] == make_word(0), $sformatf("sensor %0d re-armed to zero", s));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    readout(1'b0);
    readout(1'b1);
    readout(1'b0);
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
