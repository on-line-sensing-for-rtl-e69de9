// sensor_control_tb: checks the sensor control with a stand-in oscillator
// (a 4 ns clock that runs while ro_control is high and rests low otherwise).
// Measuring: ro_control must follow the timer at once, count_en must rise
// after exactly two oscillator edges and fall two edges after the timer, and
// the number of counted edges must equal the oscillator periods within the
// pulse. Scanning: the sensor clock must carry exactly one pulse per scan
// clock cycle with scan_enable high, none otherwise, without glitches.
`timescale 1ns/1ps
module sensor_control_tb;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1, timer = 1'b0, scan_clk = 1'b0, scan_enable = 1'b0, osc_out = 1'b0;
  logic ro_control, sensor_clk, count_en, scan_mode;
  int sclk_edges = 0, counted = 0, osc_edges_in_pulse = 0, edges_at_en = 0;
  realtime last_rise = 0, min_high = 1.0e9;

  sensor_control dut (.*);

  // Stand-in oscillator: period 4 ns while enabled.
  initial forever begin
    @(posedge ro_control);
    while (ro_control) begin
      #2 osc_out = 1'b1;
      #2 osc_out = 1'b0;
    end
  end

  always @(posedge osc_out) if (timer) osc_edges_in_pulse++;

  always @(posedge sensor_clk) begin
    sclk_edges++;
    if (count_en) counted++;
    last_rise = $realtime;
  end
  always @(negedge sensor_clk) if ($realtime - last_rise < min_high) min_high = $realtime - last_rise;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    #10;
    check(ro_control == 1'b0 && count_en == 1'b0 && osc_out == 1'b0, "idle");
    // Measurement of 1000 ns.
    sclk_edges = 0;
    timer = 1'b1;
    #0.1 check(ro_control == 1'b1, "oscillator starts with the timer");
    @(posedge count_en);
    edges_at_en = sclk_edges;
    check(edges_at_en == 2, $sformatf("count_en after %0d edges, want 2", edges_at_en));
    #(1000 - $realtime % 1000);
    timer = 1'b0;
    sclk_edges = 0;
    @(negedge count_en);
    check(sclk_edges == 2, $sformatf("count_en fell after %0d edges, want 2", sclk_edges));
    #10;
    check(ro_control == 1'b0 && osc_out == 1'b0, "oscillator stopped");
    check(counted >= osc_edges_in_pulse - 1 && counted <= osc_edges_in_pulse + 1,
          $sformatf("counted %0d edges, oscillator gave %0d in the pulse", counted,
                    osc_edges_in_pulse));
    check(scan_mode == 1'b0, "not in scan mode");
    // Scan clock: 10 ns period; scan_enable high for 20 cycles.
    sclk_edges = 0;
    min_high = 1.0e9;
    fork
      repeat (40) begin
        #5 scan_clk = 1'b1;
        #5 scan_clk = 1'b0;
      end
      begin
        repeat (5) @(posedge scan_clk);
        #1 scan_enable = 1'b1;
        repeat (20) @(posedge scan_clk);
        #0.5 check(scan_mode == 1'b1, "scan_mode while scanning");
        #0.5 scan_enable = 1'b0;
      end
    join
    check(sclk_edges == 20, $sformatf("%0d scan clock pulses, want 20", sclk_edges));
    check(min_high > 4.9, $sformatf("narrowest sensor clock pulse %0f ns", min_high));
    check(count_en == 1'b0 && scan_mode == 1'b0, "idle after scan");
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
