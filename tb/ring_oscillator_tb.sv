// ring_oscillator_tb: checks the ring oscillator model. It must rest low
// while switched off, oscillate with period 2 * 3 * (stage delay) while on
// (4.002 ns, about 250 MHz, with the default delays), and come back to rest
// low after being switched off. A second instance with slower interconnect
// must run at its own, lower frequency.
`timescale 1ns/1ps
module ring_oscillator_tb;

  int checks = 0, failures = 0;
  logic control = 1'b0;
  logic osc, osc_slow;
  int edges = 0, edges_slow = 0;
  realtime t_first, t_last;

  ring_oscillator dut (.control(control), .osc_out(osc));
  ring_oscillator #(.WIRE_PS(333)) dut_slow (.control(control), .osc_out(osc_slow));

  always @(posedge osc) begin
    if (edges == 0) t_first = $realtime;
    t_last = $realtime;
    edges++;
  end
  always @(posedge osc_slow) edges_slow++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #50;
    edges = 0; edges_slow = 0;
    #100;
    check(osc == 1'b0 && edges == 0, "rests low while off");
    control = 1'b1;
    #4002;
    control = 1'b0;
    #20;
    // 4002 ns / 4.002 ns = 1000 periods; 4002 / 5.0 = 800.4 for the slow one.
    check(edges >= 999 && edges <= 1001, $sformatf("fast ring edges %0d, want 1000", edges));
    check(edges_slow >= 799 && edges_slow <= 801,
          $sformatf("slow ring edges %0d, want 800", edges_slow));
    check((t_last - t_first) > 3990.0 && (t_last - t_first) < 4002.0,
          $sformatf("time from first to last edge %0f", t_last - t_first));
    check(osc == 1'b0 && osc_slow == 1'b0, "back to rest after switch-off");
    edges = 0;
    #200;
    check(edges == 0, "no edges after switch-off");
    // A short enable gives a proportional number of periods.
    control = 1'b1;
    #400.2;
    control = 1'b0;
    #20;
    check(edges >= 99 && edges <= 101, $sformatf("short burst edges %0d, want 100", edges));
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
