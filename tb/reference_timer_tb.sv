// reference_timer_tb: requests pulses of several lengths and checks that the
// output is high for exactly the requested number of clock cycles, starting
// on the edge that sees start, that a request while busy is ignored and that
// a length of zero gives no pulse. The 40 us pulse at 100 MHz is 4,000 cycles.
`timescale 1ns/1ps
module reference_timer_tb;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] cycles = '0;
  logic timer_out, busy;
  int high_cycles;

  reference_timer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse(input int len, input bit restart_midway);
    @(negedge clk);
    start = 1'b1;
    cycles = 16'(len);
    @(posedge clk);
    #1 start = 1'b0;
    check(timer_out == (len != 0), $sformatf("pulse of %0d starts at once", len));
    high_cycles = 0;
    while (timer_out) begin
      if (restart_midway && high_cycles == 2) begin
        start = 1'b1;
        cycles = 16'd50;
      end else begin
        start = 1'b0;
      end
      high_cycles++;
      @(posedge clk);
      #1;
    end
    start = 1'b0;
    check(high_cycles == len, $sformatf("pulse length %0d, want %0d", high_cycles, len));
    check(busy == timer_out, "busy follows the pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(timer_out == 1'b0, "idle after reset");
    pulse(1, 1'b0);
    pulse(7, 1'b1);
    pulse(0, 1'b0);
    pulse(4000, 1'b0);
    for (int i = 0; i < 5; i++) pulse(1 + $urandom % 300, 1'b0);
    repeat (5) @(posedge clk);
    check(timer_out == 1'b0, "no stray pulse");
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
