// reference_timer: generates the reference pulse that enables every sensor
// of the array at the same time.
//
// A start request loads a down-counter with the requested pulse length; the
// output is high for exactly that many clock cycles, beginning on the clock
// edge that sees start. The sensor resolution is set by this length: 4,000
// cycles of the 100 MHz system clock (40 us) let a 250 MHz oscillator reach
// about 10,000 counts, one part in 10,000.
//
// In the published system this is a general-purpose bus timer peripheral
// programmed by software; only its role and the 40 us pulse are given. The
// down-counter, the start/busy handshake and the 16-bit length are this
// design's choices. A start while busy is ignored.
//
// Interface: start (one-cycle request), cycles (pulse length, sampled with
// start; 0 gives no pulse), timer_out (the pulse, registered), busy (equal to
// timer_out).
`timescale 1ns/1ps
module reference_timer #(
  parameter int unsigned TW = 16  // width of the pulse-length counter
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [TW-1:0] cycles,
  output logic          timer_out,
  output logic          busy
);

  logic [TW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      timer_out <= 1'b0;
    end else if (!timer_out) begin
      if (start && cycles != '0) begin
        remaining <= cycles - 1'b1;
        timer_out <= 1'b1;
      end
    end else if (remaining == '0) begin
      timer_out <= 1'b0;
    end else begin
      remaining <= remaining - 1'b1;
    end
  end

  assign busy = timer_out;

endmodule
