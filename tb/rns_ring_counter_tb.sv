// rns_ring_counter_tb: drives the RNS ring counter with random count enables
// past its full period (13,328) and compares its word, every cycle, with the
// one-hot rings worked out from a plain integer count. Then it shifts random
// bits through the scan path and compares scan_out and the word with an
// 82-bit shift-register model, and checks that an asynchronous reset brings
// back count zero.
`timescale 1ns/1ps
module rns_ring_counter_tb;
  localparam int M1 = 49, M2 = 17, M3 = 16, W = M1 + M2 + M3, M = M1 * M2 * M3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, count_en = 1'b0, scan_mode = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [W-1:0] word, model_chain;
  int count = 0, wraps = 0;

  rns_ring_counter dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] expected_word(int c);
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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(word == expected_word(0), "reset value is count 0");
    // Counting, with random enables, well past the period.
    for (int i = 0; i < 2 * M + 500; i++) begin
      @(negedge clk);
      count_en = ($urandom % 4) != 0;
      @(posedge clk);
      if (count_en) begin
        count++;
        if (count % M == 0) wraps++;
      end
      #1 check(word == expected_word(count), $sformatf("count %0d word mismatch", count));
    end
    check(wraps >= 1, "counter wrapped at least once");
    // Scan shifting: scan_mode overrides count_en.
    model_chain = word;
    for (int i = 0; i < 3 * W; i++) begin
      @(negedge clk);
      scan_mode = 1'b1;
      count_en  = $urandom % 2;
      scan_in   = $urandom % 2;
      check(scan_out == model_chain[W-1], "scan_out is the last bit of ring 3");
      @(posedge clk);
      model_chain = {model_chain[W-2:0], scan_in};
      #1 check(word == model_chain, "scan shift");
    end
    // Asynchronous reset.
    #2 rst_n = 1'b0;
    #1 check(word == expected_word(0), "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
