// ring_oscillator: behavioural model (not synthesizable) of the sensor's
// three-stage ring oscillator.
//
// A real ring oscillator is a combinational loop whose frequency is set by
// silicon delays, so it cannot be written as synthesizable logic; on the FPGA
// it is placed as a hand-made netlist. This model keeps the real part's
// structure and ports so that the rest of the sensor can be simulated.
//
// Each of the three stages is a LUT configured as an inverter, followed by a
// latch that is held open (it only adds transistor delay, which raises the
// oscillator's temperature sensitivity) and by a stretch of programmable
// interconnect. The first LUT also takes the on/off control. The ring has an
// odd number of inversions, so it oscillates with period
// 2 * 3 * (LUT_PS + LATCH_PS + WIRE_PS). The defaults give 4.002 ns, about
// 250 MHz, the nominal frequency quoted for the sensor; process variation is
// modelled by giving each instance its own delays.
//
// The three stages, the open latches and the control input follow the
// published design. The logic function of the first LUT is this model's
// choice: with control low it drives 0, so the ring rests with osc_out low,
// which lets the sensor OR the oscillator output with its gated scan clock.
//
// Interface: control (high = oscillate), osc_out (the ring's output after the
// third stage). osc_out is low within three stage delays after control falls.
`timescale 1ns/1ps
module ring_oscillator #(
  parameter int unsigned LUT_PS   = 250,  // LUT inverter delay, ps
  parameter int unsigned LATCH_PS = 250,  // open latch delay, ps
  parameter int unsigned WIRE_PS  = 167   // interconnect delay, ps
) (
  input  logic control,
  output logic osc_out
);

  localparam realtime LUT_D   = LUT_PS * 1ps;
  localparam realtime LATCH_D = LATCH_PS * 1ps;
  localparam realtime WIRE_D  = WIRE_PS * 1ps;

  logic [2:0] lut_o;    // LUT inverter outputs
  logic [2:0] latch_o;  // open latch outputs
  logic [2:0] stage_o;  // stage outputs after the interconnect

  // Stage 1: LUT gated by the control input.
  assign #(LUT_D) lut_o[0] = control & ~stage_o[2];
  // Stages 2 and 3: plain LUT inverters.
  assign #(LUT_D) lut_o[1] = ~stage_o[0];
  assign #(LUT_D) lut_o[2] = ~stage_o[1];

  for (genvar s = 0; s < 3; s++) begin : g_stage
    // Latch with its gate held open: transparent, adds delay only.
    assign #(LATCH_D) latch_o[s] = lut_o[s];
    // Programmable interconnect to the next stage.
    assign #(WIRE_D) stage_o[s] = latch_o[s];
  end

  assign osc_out = stage_o[2];

endmodule
