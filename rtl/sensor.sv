// sensor: the compact multi-use sensor. A ring oscillator whose frequency
// depends on local temperature, supply voltage and transistor delay drives an
// RNS ring counter for the length of a reference timer pulse; afterwards the
// count is shifted out over a scan chain and the software (here
// scan_controller) decodes it. On a Virtex-5 the whole sensor takes 8 LUTs,
// one CLB.
//
// The block structure (oscillator, RNS ring counter with three rings,
// control with timer, scan in, scan enable and scan out) follows the
// published sensor. How the control works is described in sensor_control;
// the oscillator is a behavioural model (ring_oscillator), so this module is
// synthesizable except for that instance.
//
// Timing: after the timer rises the counter starts within two oscillator
// periods and stops two periods after it falls, so the count is the number
// of oscillator periods in the pulse. With scan_enable high each rising
// scan_clk edge shifts the 82-bit word one place, scan_in entering ring 1 and
// scan_out leaving ring 3; scan_out is the bit about to leave, valid before
// the edge. Scan only while the timer is low.
`timescale 1ns/1ps
module sensor #(
  parameter int unsigned M1       = sensor_pkg::RNS_M1,
  parameter int unsigned M2       = sensor_pkg::RNS_M2,
  parameter int unsigned M3       = sensor_pkg::RNS_M3,
  parameter int unsigned LUT_PS   = 250,
  parameter int unsigned LATCH_PS = 250,
  parameter int unsigned WIRE_PS  = 167,
  localparam int unsigned W = M1 + M2 + M3
) (
  input  logic         rst_n,
  input  logic         timer,
  input  logic         scan_clk,
  input  logic         scan_enable,
  input  logic         scan_in,
  output logic         scan_out,
  output logic [W-1:0] word      // counter contents, for observation
);

  logic ro_control, osc_out, sensor_clk, count_en, scan_mode;

  ring_oscillator #(
    .LUT_PS(LUT_PS), .LATCH_PS(LATCH_PS), .WIRE_PS(WIRE_PS)
  ) u_ro (
    .control(ro_control),
    .osc_out(osc_out)
  );

  sensor_control u_ctrl (
    .rst_n      (rst_n),
    .timer      (timer),
    .scan_clk   (scan_clk),
    .scan_enable(scan_enable),
    .osc_out    (osc_out),
    .ro_control (ro_control),
    .sensor_clk (sensor_clk),
    .count_en   (count_en),
    .scan_mode  (scan_mode)
  );

  rns_ring_counter #(.M1(M1), .M2(M2), .M3(M3)) u_cnt (
    .clk      (sensor_clk),
    .rst_n    (rst_n),
    .count_en (count_en),
    .scan_mode(scan_mode),
    .scan_in  (scan_in),
    .scan_out (scan_out),
    .word     (word)
  );

endmodule
