// sensor_tb: one complete sensor, oscillator model included (4.002 ns
// period). A 100 MHz clock drives the timer pulse and the scan clock. For
// pulses of 4,000 ns, 20,000 ns and 60,000 ns the test counts the
// oscillator's edges itself, then shifts the 82-bit word out while shifting
// a fresh one-hot pattern in, decodes it by searching for the number with
// the three residues, and compares. The 60 us pulse passes the counting
// period of 13,328, so its count must come back modulo 13,328. After each
// readout the counter must stand at zero again.
`timescale 1ns/1ps
module sensor_tb;
  localparam int M1 = 49, M2 = 17, M3 = 16, W = M1 + M2 + M3, M = M1 * M2 * M3;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1, timer = 1'b0, clk = 1'b0, scan_enable = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [W-1:0] word, got;
  int osc_edges = 0, wraps_seen = 0;

  sensor dut (
    .rst_n(rst_n), .timer(timer), .scan_clk(clk), .scan_enable(scan_enable),
    .scan_in(scan_in), .scan_out(scan_out), .word(word)
  );

  always #5 clk = ~clk;
  always @(posedge dut.osc_out) osc_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Position of the lowest set bit of a ring, -1 if none.
  function automatic int hot(input logic [W-1:0] w, input int base, input int len);
    for (int i = 0; i < len; i++) if (w[base + i]) return i;
    return -1;
  endfunction

  // Independent decode: the number 0..M-1 with the three residues.
  function automatic int decode(input logic [W-1:0] w);
    int r1, r2, r3;
    r1 = hot(w, 0, M1);
    r2 = hot(w, M1, M2);
    r3 = hot(w, M1 + M2, M3);
    for (int c = 0; c < M; c++)
      if (c % M1 == r1 && c % M2 == r2 && c % M3 == r3) return c;
    return -1;
  endfunction

  task automatic measure(input int ns);
    @(posedge clk);
    #1 timer = 1'b1;
    #(ns);
    timer = 1'b0;
    #100;
  endtask

  task automatic scan_word(output logic [W-1:0] w);
    for (int j = 0; j < W; j++) begin
      @(negedge clk);
      scan_enable = 1'b1;
      scan_in = (j == W - 1) || (j == W - 1 - M1) || (j == W - 1 - M1 - M2);
      w[W-1-j] = scan_out;
      @(posedge clk);
    end
    @(negedge clk);
    scan_enable = 1'b0;
    scan_in = 1'b0;
  endtask

  task automatic run(input int ns);
    int c, e, start_edges;
    start_edges = osc_edges;
    measure(ns);
    e = osc_edges - start_edges;
    scan_word(got);
    c = decode(got);
    check(c >= 0, $sformatf("word read for %0d ns holds valid residues", ns));
    // The oscillator runs two extra periods while the synchroniser drains,
    // and the first two edges only fill it: the count is the edges less two.
    check(c == ((e - 2) % M) || c == ((e - 3) % M) || c == ((e - 1) % M),
          $sformatf("%0d ns: decoded %0d, oscillator edges %0d (mod M %0d)", ns, c, e, e % M));
    // Count against the nominal period 4.002 ns.
    check(((ns * 1000 / 4002) % M - c) inside {[-2:2]},
          $sformatf("%0d ns: count %0d vs nominal %0d", ns, c, (ns * 1000 / 4002) % M));
    if (e >= M) wraps_seen++;
    check(decode(word) == 0, "counter re-armed to zero by the scan");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    #50;
    check(decode(word) == 0, "reset to zero");
    check(dut.osc_out == 1'b0, "oscillator off while idle");
    run(4000);
    run(20000);
    run(60000);
    check(wraps_seen == 1, "the long pulse wrapped the counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
