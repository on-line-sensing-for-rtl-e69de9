// online_sensing_system_tb: end-to-end test of the whole system, reduced to
// a 2 x 4 sensor array and 10 application regions of 12 flops so that it
// runs in seconds; words stay 82 bits and the clock 100 MHz.
//
// Sequence: switch some application regions on and check that they toggle;
// take a 40 us measurement (4,000 cycles) and try to start a readout during
// it, which must be ignored; read the array out and check all 112 counts,
// in the order sensor 7 ... 0, against 40 us divided by each sensor's own
// oscillator period, and the readout time of 82 x 8 cycles; pause the
// application and check that it holds; take a 60 us measurement, which
// passes the counting period of 13,328 so that every count wraps, and try to
// start a measurement during its readout, which must be ignored; check the
// wrapped counts, which also shows the first readout re-armed the counters.
// Each mechanism is counted and must have happened at least once.
`timescale 1ns/1ps
module online_sensing_system_tb;
  localparam int ROWS = 2, COLS = 4, N = ROWS * COLS, M = 13328, REGIONS = 10;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic measure_start = 1'b0, readout_start = 1'b0, app_pause = 1'b0;
  logic [15:0] measure_cycles = '0;
  logic measure_busy, readout_busy, readout_done, sample_valid;
  logic [2:0] sample_index;
  logic [13:0] sample_count;
  logic [REGIONS-1:0] region_en = '0, app_probe, app_active;

  // Mechanism counters.
  int n_measure = 0, n_readout = 0, n_wrap = 0, n_ignored_readout = 0;
  int n_ignored_measure = 0, n_region_toggle = 0, n_pause_hold = 0;

  int seen, expect_ns, busy_cycles;

  online_sensing_system #(.ROWS(ROWS), .COLS(COLS), .FLOPS_PER_REGION(12)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Oscillator period of sensor k in ps (array delay spread, 3 ps steps).
  function automatic int period_ps(int k);
    return 6 * (250 + 250 + 167 + ((k * 37) % 23) * 3 - 33);
  endfunction

  // Sample scoreboard.
  always @(posedge clk) begin
    #1;
    if (sample_valid) begin
      longint edges;
      int e;
      check(int'(sample_index) == N - 1 - seen, $sformatf("sample %0d index %0d", seen, sample_index));
      edges = longint'(expect_ns) * 1000 / period_ps(sample_index);
      e = int'(edges % M);
      check((int'(sample_count) - e) inside {[-2:2]} ||
            (int'(sample_count) - e + M) inside {[-2:2]} ||
            (int'(sample_count) - e - M) inside {[-2:2]},
            $sformatf("sensor %0d: count %0d, expected about %0d", sample_index, sample_count, e));
      if (edges >= M) n_wrap++;
      seen++;
    end
  end

  task automatic measure(input int cycles, input bit poke_readout);
    @(negedge clk);
    measure_cycles = 16'(cycles);
    measure_start = 1'b1;
    @(negedge clk);
    measure_start = 1'b0;
    busy_cycles = 1;
    while (measure_busy) begin
      if (poke_readout && busy_cycles == 100) readout_start = 1'b1;
      else readout_start = 1'b0;
      @(negedge clk);
      if (poke_readout && busy_cycles == 100) begin
        check(!readout_busy, "readout request ignored during a measurement");
        if (!readout_busy) n_ignored_readout++;
      end
      busy_cycles++;
    end
    readout_start = 1'b0;
    check(busy_cycles == cycles + 1 || busy_cycles == cycles,
          $sformatf("measurement lasted %0d cycles, want %0d", busy_cycles - 1, cycles));
    n_measure++;
    repeat (5) @(negedge clk);
  endtask

  task automatic readout(input int ns, input bit poke_measure);
    seen = 0;
    expect_ns = ns;
    @(negedge clk);
    readout_start = 1'b1;
    @(negedge clk);
    readout_start = 1'b0;
    busy_cycles = 0;
    while (readout_busy) begin
      if (poke_measure && busy_cycles == 500) measure_start = 1'b1;
      else measure_start = 1'b0;
      @(negedge clk);
      if (poke_measure && busy_cycles == 500) begin
        check(!measure_busy, "measurement request ignored during a readout");
        if (!measure_busy) n_ignored_measure++;
      end
      busy_cycles++;
    end
    measure_start = 1'b0;
    check(busy_cycles == 82 * N, $sformatf("readout took %0d cycles, want %0d", busy_cycles, 82 * N));
    repeat (5) @(negedge clk);
    check(seen == N, $sformatf("%0d samples, want %0d", seen, N));
    n_readout++;
  endtask

  initial begin
    logic [REGIONS-1:0] p0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Application regions: 0, 2 and 9 on.
    @(negedge clk);
    region_en = 10'b10_0000_0101;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      p0 = app_probe;
      @(negedge clk);
      check((app_probe ^ p0) == region_en, "enabled regions toggle, others hold");
      if ((app_probe ^ p0) == region_en) n_region_toggle++;
    end
    check(app_active == region_en, "active regions");
    // Measurement of 40 us, readout.
    measure(4000, 1'b1);
    readout(40000, 1'b0);
    // Pause the application.
    @(negedge clk);
    app_pause = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      p0 = app_probe;
      @(negedge clk);
      check(app_probe == p0, "paused application holds");
      if (app_probe == p0) n_pause_hold++;
    end
    check(app_active == '0, "nothing active while paused");
    // Measurement of 60 us: every counter wraps.
    measure(6000, 1'b0);
    readout(60000, 1'b1);
    app_pause = 1'b0;
    check(n_measure == 2, "two measurements");
    check(n_readout == 2, "two readouts");
    check(n_wrap > 0, "counter wrap happened");
    check(n_ignored_readout > 0, "readout request during measurement happened");
    check(n_ignored_measure > 0, "measurement request during readout happened");
    check(n_region_toggle > 0, "application switching happened");
    check(n_pause_hold > 0, "application pause happened");
    $display("mechanisms: measure=%0d readout=%0d wrap=%0d ignored_readout=%0d ignored_measure=%0d toggle=%0d pause=%0d",
             n_measure, n_readout, n_wrap, n_ignored_readout, n_ignored_measure, n_region_toggle,
             n_pause_hold);
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
