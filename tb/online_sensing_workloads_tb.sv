// online_sensing_workloads_tb: runs the two measurement sequences the system
// is meant for, through the top-level ports, on a 2 x 4 sensor array (words
// of 82 bits, 100 MHz clock, 40 us pulses, 10 application regions of 12
// flops).
//
// Delay characterisation: ten consecutive readings of the idle array; every
// sensor's readings must agree within one count, and each must equal 40 us
// over that sensor's own oscillator period.
//
// Dynamic-power procedure: with application regions running, sample twice
// and check the two samples agree (no transient); pause the application,
// wait, sample again, resume; compare. The oscillator model has no supply
// voltage, so the expected shift is zero; the test checks the sequence runs,
// that the application really is frozen during the paused sample and
// switching during the others, and that the comparison finds no shift.
`timescale 1ns/1ps
module online_sensing_workloads_tb;
  localparam int ROWS = 2, COLS = 4, N = ROWS * COLS, REGIONS = 10;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic measure_start = 1'b0, readout_start = 1'b0, app_pause = 1'b0;
  logic [15:0] measure_cycles = 16'd4000;
  logic measure_busy, readout_busy, readout_done, sample_valid;
  logic [2:0] sample_index;
  logic [13:0] sample_count;
  logic [REGIONS-1:0] region_en = '0, app_probe, app_active;
  int snap[N];
  int first[N], lo[N], hi[N], run_a[N], run_b[N];
  int app_toggles;

  online_sensing_system #(.ROWS(ROWS), .COLS(COLS), .FLOPS_PER_REGION(12)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    #1;
    if (sample_valid) snap[sample_index] = int'(sample_count);
  end

  // Application activity during measurements: probe changes per clock.
  logic [REGIONS-1:0] probe_q;
  always @(posedge clk) begin
    if (measure_busy && app_probe != probe_q) app_toggles++;
    probe_q <= app_probe;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int period_ps(int k);
    return 6 * (250 + 250 + 167 + ((k * 37) % 23) * 3 - 33);
  endfunction

  // One reading: measurement then readout into snap[].
  task automatic reading();
    @(negedge clk);
    measure_start = 1'b1;
    @(negedge clk);
    measure_start = 1'b0;
    while (measure_busy) @(negedge clk);
    repeat (3) @(negedge clk);
    readout_start = 1'b1;
    @(negedge clk);
    readout_start = 1'b0;
    @(posedge readout_done);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Delay characterisation: ten readings of the idle array.
    for (int r = 0; r < 10; r++) begin
      reading();
      for (int k = 0; k < N; k++) begin
        if (r == 0) begin
          first[k] = snap[k];
          lo[k] = snap[k];
          hi[k] = snap[k];
        end
        if (snap[k] < lo[k]) lo[k] = snap[k];
        if (snap[k] > hi[k]) hi[k] = snap[k];
      end
    end
    for (int k = 0; k < N; k++) begin
      check(hi[k] - lo[k] <= 1, $sformatf("sensor %0d readings spread %0d..%0d", k, lo[k], hi[k]));
      check((first[k] - 40000000 / period_ps(k)) inside {[-2:2]},
            $sformatf("sensor %0d count %0d vs %0d", k, first[k], 40000000 / period_ps(k)));
    end
    // Dynamic-power procedure.
    @(negedge clk);
    region_en = '1;
    app_toggles = 0;
    reading();
    run_a = snap;
    reading();
    run_b = snap;
    check(app_toggles > 1000, "application switching during the running samples");
    for (int k = 0; k < N; k++)
      check((run_a[k] - run_b[k]) inside {[-1:1]}, $sformatf("sensor %0d consistent", k));
    app_pause = 1'b1;
    repeat (100) @(negedge clk);  // let transients settle
    app_toggles = 0;
    reading();
    check(app_toggles == 0, "application frozen during the paused sample");
    app_pause = 1'b0;
    for (int k = 0; k < N; k++)
      check((snap[k] - run_b[k]) inside {[-1:1]},
            $sformatf("sensor %0d shift %0d (no voltage in the model)", k, snap[k] - run_b[k]));
    repeat (3) @(negedge clk);
    check(app_active == region_en, "application resumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
