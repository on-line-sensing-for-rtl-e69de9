// sensor_control: the control logic of one sensor. It starts and stops the
// ring oscillator, brings the reference timer signal into the oscillator's
// clock domain, and switches the counter between counting and scan shifting.
//
// Measuring: the timer signal comes from another clock domain, so it passes
// through a two-flop synchroniser clocked by the sensor clock; its output is
// the counter's count_en. The oscillator is switched on by the raw timer
// signal and kept on until the synchroniser has drained after the timer
// falls (ro_control = timer | sync1 | sync2), so both edges of the pulse see
// the same two-cycle synchroniser delay and the count equals the number of
// oscillator periods in the pulse, give or take one.
//
// Scanning: scan_enable is latched while scan_clk is low and ANDed with
// scan_clk, the usual latch-based clock gate, which gives a glitch-free gated
// scan clock. Its latched value is also the counter's scan_mode. The sensor
// clock is osc_out OR the gated scan clock: the oscillator rests low when
// off, and the two are never active together because scanning is only done
// while no measurement runs. The level-sensitive latch is that clock gate
// and is intended.
//
// The published sensor states only that its control holds the scan logic and
// the timer synchronisation; the synchroniser depth, the clock gate and the
// OR-ed clock are this design's choices.
//
// Interface: timer (reference pulse, asynchronous to the oscillator),
// scan_clk and scan_enable (scan_enable changes after rising scan_clk edges),
// osc_out from the oscillator; ro_control to it; sensor_clk, count_en and
// scan_mode for the counter. rst_n clears the synchroniser asynchronously.
`timescale 1ns/1ps
module sensor_control (
  input  logic rst_n,
  input  logic timer,
  input  logic scan_clk,
  input  logic scan_enable,
  input  logic osc_out,
  output logic ro_control,
  output logic sensor_clk,
  output logic count_en,
  output logic scan_mode
);

  logic scan_en_latched;
  logic sync1, sync2;

  // Clock gate for the scan clock: transparent while scan_clk is low.
  always_latch begin
    if (!scan_clk) scan_en_latched = scan_enable;
  end

  assign sensor_clk = osc_out | (scan_clk & scan_en_latched);
  assign scan_mode  = scan_en_latched;

  // Two-flop synchroniser of the timer signal into the sensor clock domain.
  always_ff @(posedge sensor_clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= 1'b0;
      sync2 <= 1'b0;
    end else begin
      sync1 <= timer;
      sync2 <= sync1;
    end
  end

  assign count_en   = sync2;
  assign ro_control = timer | sync1 | sync2;

endmodule
