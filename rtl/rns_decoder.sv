// rns_decoder: recovers the binary count from an 82-bit RNS sensor word.
//
// The word holds three one-hot rings, {ring3, ring2, ring1}. The position of
// the hot bit in each ring is its residue r_i. The count follows from the
// Chinese remainder theorem, count = (r1*W1 + r2*W2 + r3*W3) mod M, with
// M = m1*m2*m3 and W_i = (M/m_i) * v_i mod M, v_i being the inverse of M/m_i
// modulo m_i (for 49, 17, 16: W = 5440, 7056, 833 and M = 13,328). The
// weights are computed at elaboration from the moduli. A ring that holds no
// hot bit reads as residue 0; if several bits are set the lowest one counts.
//
// The decoding formula and the absence of any lookup table follow the
// published method, where it runs as software on the embedded processor.
// Doing it in logic, with one register stage, is this design's choice, so
// that the array can be used without a processor.
//
// Interface: in_valid/word in; out_valid/count and the three residues out,
// one clock later. No back-pressure: one word per clock.
`timescale 1ns/1ps
module rns_decoder #(
  parameter int unsigned M1 = sensor_pkg::RNS_M1,
  parameter int unsigned M2 = sensor_pkg::RNS_M2,
  parameter int unsigned M3 = sensor_pkg::RNS_M3,
  localparam int unsigned W  = M1 + M2 + M3,
  localparam int unsigned M  = M1 * M2 * M3,
  localparam int unsigned CW = sensor_pkg::bits_for(M)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic [W-1:0]                         word,
  output logic                                 out_valid,
  output logic [CW-1:0]                        count,
  output logic [sensor_pkg::bits_for(M1)-1:0]  res1,
  output logic [sensor_pkg::bits_for(M2)-1:0]  res2,
  output logic [sensor_pkg::bits_for(M3)-1:0]  res3
);

  localparam int unsigned W1 = sensor_pkg::crt_weight(M1, M);
  localparam int unsigned W2 = sensor_pkg::crt_weight(M2, M);
  localparam int unsigned W3 = sensor_pkg::crt_weight(M3, M);
  // Width of the weighted sum before the modulo.
  localparam int unsigned SW = sensor_pkg::bits_for(M1 * W1 + M2 * W2 + M3 * W3 + 1);

  logic [M1-1:0] ring1;
  logic [M2-1:0] ring2;
  logic [M3-1:0] ring3;
  logic [sensor_pkg::bits_for(M1)-1:0] r1;
  logic [sensor_pkg::bits_for(M2)-1:0] r2;
  logic [sensor_pkg::bits_for(M3)-1:0] r3;
  logic [SW-1:0] sum;

  assign {ring3, ring2, ring1} = word;

  // Residues: position of the lowest set bit of each ring.
  always_comb begin
    r1 = '0;
    for (int i = M1 - 1; i >= 0; i--) if (ring1[i]) r1 = $bits(r1)'(i);
    r2 = '0;
    for (int i = M2 - 1; i >= 0; i--) if (ring2[i]) r2 = $bits(r2)'(i);
    r3 = '0;
    for (int i = M3 - 1; i >= 0; i--) if (ring3[i]) r3 = $bits(r3)'(i);
  end

  // Chinese remainder theorem.
  assign sum = SW'(r1) * SW'(W1) + SW'(r2) * SW'(W2) + SW'(r3) * SW'(W3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      count     <= '0;
      res1      <= '0;
      res2      <= '0;
      res3      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        count <= CW'(sum % SW'(M));
        res1  <= r1;
        res2  <= r2;
        res3  <= r3;
      end
    end
  end

endmodule
