// rns_decoder_tb: builds sensor words from known counts (a hot bit at
// count mod 49, count mod 17 and count mod 16 of the three rings) and checks
// that the decoder returns the count and the residues one clock later. It
// covers the corners 0 and 13,327, every count from 0 to 2,000 and random
// counts over the whole period, presented back to back.
`timescale 1ns/1ps
module rns_decoder_tb;
  localparam int M1 = 49, M2 = 17, M3 = 16, W = M1 + M2 + M3, M = M1 * M2 * M3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [W-1:0] word = '0;
  logic out_valid;
  logic [13:0] count;
  logic [5:0] res1;
  logic [4:0] res2;
  logic [3:0] res3;
  int expected_q[$];

  rns_decoder dut (.*);

  always #5 clk = ~clk;

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Scoreboard: each valid output must match the oldest word presented.
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      int e;
      if (expected_q.size() == 0) begin
        check(1'b0, "unexpected output");
      end else begin
        e = expected_q.pop_front();
        check(int'(count) == e, $sformatf("count %0d, want %0d", count, e));
        check(int'(res1) == e % M1 && int'(res2) == e % M2 && int'(res3) == e % M3,
              $sformatf("residues of %0d", e));
      end
    end
  end

  task automatic present(input int c);
    @(negedge clk);
    in_valid = 1'b1;
    word = make_word(c);
    expected_q.push_back(c);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    present(0);
    present(M - 1);
    for (int c = 0; c <= 2000; c++) present(c);
    for (int i = 0; i < 3000; i++) present($urandom % M);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #2 check(expected_q.size() == 0, "every word decoded, one clock latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
