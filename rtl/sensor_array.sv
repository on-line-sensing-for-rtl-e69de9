// sensor_array: the grid of sensors spread over the die, 16 x 7 = 112 of
// them as in the published system, all enabled by one shared reference timer
// signal and read out over one scan chain.
//
// Sensor k's scan_in is sensor k-1's scan_out; sensor 0 takes the array's
// scan_in and sensor N-1 drives the array's scan_out. All sensors measure at
// the same time, so one timer pulse captures a snapshot of the whole die.
// The hexagonal placement of the sensors is a matter of placement
// constraints and does not appear in the logic; sensor k sits in row
// k / COLS, column k % COLS of the grid.
//
// Each sensor has its own ring oscillator, whose speed in silicon depends on
// where it sits. To give a simulation something to measure, instance k gets
// interconnect delay WIRE_PS + ((k * 37) mod 23 - 11) * SPREAD_PS, a fixed
// spread of a few percent in oscillator frequency; with SPREAD_PS = 0 all
// sensors are equal. This spread is a modelling choice only.
//
// Interface: as for one sensor (see sensor), plus words, the counters of all
// sensors side by side (sensor k in bits [k*W +: W]) for observation.
`timescale 1ns/1ps
module sensor_array #(
  parameter int unsigned ROWS      = sensor_pkg::ARRAY_ROWS,
  parameter int unsigned COLS      = sensor_pkg::ARRAY_COLS,
  parameter int unsigned M1        = sensor_pkg::RNS_M1,
  parameter int unsigned M2        = sensor_pkg::RNS_M2,
  parameter int unsigned M3        = sensor_pkg::RNS_M3,
  parameter int unsigned LUT_PS    = 250,
  parameter int unsigned LATCH_PS  = 250,
  parameter int unsigned WIRE_PS   = 167,
  parameter int unsigned SPREAD_PS = 3,
  localparam int unsigned N = ROWS * COLS,
  localparam int unsigned W = M1 + M2 + M3
) (
  input  logic           rst_n,
  input  logic           timer,
  input  logic           scan_clk,
  input  logic           scan_enable,
  input  logic           scan_in,
  output logic           scan_out,
  output logic [N*W-1:0] words
);

  logic [N:0] chain;

  assign chain[0] = scan_in;

  for (genvar k = 0; k < N; k++) begin : g_sensor
    localparam int unsigned WIRE_K = WIRE_PS + ((k * 37) % 23) * SPREAD_PS - 11 * SPREAD_PS;

    sensor #(
      .M1(M1), .M2(M2), .M3(M3),
      .LUT_PS(LUT_PS), .LATCH_PS(LATCH_PS), .WIRE_PS(WIRE_K)
    ) u_sensor (
      .rst_n      (rst_n),
      .timer      (timer),
      .scan_clk   (scan_clk),
      .scan_enable(scan_enable),
      .scan_in    (chain[k]),
      .scan_out   (chain[k+1]),
      .word       (words[k*W +: W])
    );
  end

  assign scan_out = chain[N];

endmodule
