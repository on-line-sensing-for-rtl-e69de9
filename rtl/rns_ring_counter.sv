// rns_ring_counter: event counter in a residue number system, built from
// one-hot ring shift registers, that doubles as the sensor's scan register.
//
// Each ring of length m_i holds a single "hot" bit whose position is the
// count modulo m_i, a residue r_i. On every clock edge with count_en high the
// hot bit of every ring advances one position, wrapping from the last
// position to position 0, so a ring of length 3 steps 100 -> 010 -> 001. With
// pairwise coprime lengths the set of residues repeats only after
// M = m1 * m2 * m3 edges (13,328 for 49, 17, 16), and the binary count is
// recovered from the residues with the Chinese remainder theorem (see
// rns_decoder). On an FPGA each ring maps onto a shift-register LUT, so the
// counter costs two LUTs instead of the 14 of a binary counter.
//
// The rings, their lengths, the one-hot start pattern and the shift direction
// follow the published design. Using the same shift registers as the scan
// path is this design's reading of the 82-bit sensor word: with scan_mode
// high the rings are opened and chained, scan_in -> ring 1 -> ring 2 ->
// ring 3 -> scan_out, and shift one bit per clock, so the software reads the
// residues out and writes a fresh one-hot pattern in with the same shifts.
//
// Interface: clk (the ring-oscillator or gated scan clock), rst_n
// (asynchronous, loads count 0: a hot bit at position 0 of every ring),
// count_en, scan_mode (takes priority over count_en), scan_in, scan_out
// (last bit of ring 3), word = {ring3, ring2, ring1}, bit i of each field
// being position i of that ring.
`timescale 1ns/1ps
module rns_ring_counter #(
  parameter int unsigned M1 = sensor_pkg::RNS_M1,
  parameter int unsigned M2 = sensor_pkg::RNS_M2,
  parameter int unsigned M3 = sensor_pkg::RNS_M3,
  localparam int unsigned W = M1 + M2 + M3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         count_en,
  input  logic         scan_mode,
  input  logic         scan_in,
  output logic         scan_out,
  output logic [W-1:0] word
);

  logic [M1-1:0] ring1;
  logic [M2-1:0] ring2;
  logic [M3-1:0] ring3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring1 <= M1'(1);
      ring2 <= M2'(1);
      ring3 <= M3'(1);
    end else if (scan_mode) begin
      // One long shift register through all three rings.
      ring1 <= {ring1[M1-2:0], scan_in};
      ring2 <= {ring2[M2-2:0], ring1[M1-1]};
      ring3 <= {ring3[M3-2:0], ring2[M2-1]};
    end else if (count_en) begin
      // Each ring feeds back to itself: the hot bit advances one position.
      ring1 <= {ring1[M1-2:0], ring1[M1-1]};
      ring2 <= {ring2[M2-2:0], ring2[M2-1]};
      ring3 <= {ring3[M3-2:0], ring3[M3-1]};
    end
  end

  assign scan_out = ring3[M3-1];
  assign word     = {ring3, ring2, ring1};

  initial begin
    assert (sensor_pkg::gcd(M1, M2) == 1 && sensor_pkg::gcd(M1, M3) == 1 &&
            sensor_pkg::gcd(M2, M3) == 1)
      else $error("rns_ring_counter: ring lengths must be pairwise coprime");
  end

endmodule
