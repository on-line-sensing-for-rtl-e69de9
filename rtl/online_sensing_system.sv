// online_sensing_system: the programmable logic of the instrumented test
// system. An array of 112 compact sensors is spread over the die next to a
// switching "heater" application. A reference timer enables all sensors at
// once for a fixed time (40 us by default), each counting the periods of its
// own ring oscillator; then the scan controller shifts the whole array out
// over one chain, decodes the 112 RNS counts and leaves the counters at zero.
// The counts map the oscillator speed over the die: comparing snapshots
// taken in different conditions (idle, two temperatures, application
// running against briefly paused) gives delay, leakage, dynamic-power and
// temperature profiles.
//
// In the published system an embedded processor drives the sensors and the
// application over fast simplex links and runs the timer as a bus
// peripheral. Here those links are replaced by the plain ports below, and the
// timer and the decoding are logic. A measurement request is ignored while a
// readout runs and the other way round, so the oscillators and the scan
// clock never drive a sensor together.
//
// Interface (all in the clk domain, 100 MHz in the published system):
//   measure_start/measure_cycles  start a measurement of that many cycles
//   measure_busy                  the reference pulse is high
//   readout_start/readout_busy/readout_done  scan the array out
//   sample_valid/sample_index/sample_count   one decoded sensor count per
//                                 pulse, sensor N-1 first, sensor 0 last
//   region_en/app_pause           application regions and global pause
//   app_probe/app_active          application activity, for observation
// A full readout takes 82 x 112 = 9,184 cycles (92 us at 100 MHz).
`timescale 1ns/1ps
module online_sensing_system #(
  parameter int unsigned ROWS             = sensor_pkg::ARRAY_ROWS,
  parameter int unsigned COLS             = sensor_pkg::ARRAY_COLS,
  parameter int unsigned M1               = sensor_pkg::RNS_M1,
  parameter int unsigned M2               = sensor_pkg::RNS_M2,
  parameter int unsigned M3               = sensor_pkg::RNS_M3,
  parameter int unsigned TW               = 16,
  parameter int unsigned REGIONS          = 10,
  parameter int unsigned FLOPS_PER_REGION = 2820,
  parameter int unsigned SPREAD_PS        = 3,
  localparam int unsigned N  = ROWS * COLS,
  localparam int unsigned W  = M1 + M2 + M3,
  localparam int unsigned CW = sensor_pkg::bits_for(M1 * M2 * M3),
  localparam int unsigned IW = sensor_pkg::bits_for(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  // measurement
  input  logic               measure_start,
  input  logic [TW-1:0]      measure_cycles,
  output logic               measure_busy,
  // readout
  input  logic               readout_start,
  output logic               readout_busy,
  output logic               readout_done,
  output logic               sample_valid,
  output logic [IW-1:0]      sample_index,
  output logic [CW-1:0]      sample_count,
  // application logic
  input  logic [REGIONS-1:0] region_en,
  input  logic               app_pause,
  output logic [REGIONS-1:0] app_probe,
  output logic [REGIONS-1:0] app_active
);

  logic timer, scan_enable, scan_in, scan_out;
  logic [N*W-1:0] words;

  reference_timer #(.TW(TW)) u_timer (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (measure_start && !readout_busy),
    .cycles   (measure_cycles),
    .timer_out(timer),
    .busy     (measure_busy)
  );

  sensor_array #(
    .ROWS(ROWS), .COLS(COLS), .M1(M1), .M2(M2), .M3(M3), .SPREAD_PS(SPREAD_PS)
  ) u_array (
    .rst_n      (rst_n),
    .timer      (timer),
    .scan_clk   (clk),
    .scan_enable(scan_enable),
    .scan_in    (scan_in),
    .scan_out   (scan_out),
    .words      (words)
  );

  scan_controller #(.N_SENSORS(N), .M1(M1), .M2(M2), .M3(M3)) u_scan (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (readout_start && !measure_busy),
    .busy        (readout_busy),
    .done        (readout_done),
    .scan_enable (scan_enable),
    .scan_in     (scan_in),
    .scan_out    (scan_out),
    .sample_valid(sample_valid),
    .sample_index(sample_index),
    .sample_count(sample_count)
  );

  switching_circuit #(.REGIONS(REGIONS), .FLOPS_PER_REGION(FLOPS_PER_REGION)) u_app (
    .clk      (clk),
    .rst_n    (rst_n),
    .region_en(region_en),
    .pause    (app_pause),
    .probe    (app_probe),
    .active   (app_active)
  );

endmodule
