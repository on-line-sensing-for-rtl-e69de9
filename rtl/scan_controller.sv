// scan_controller: reads the whole sensor array out over its scan chain,
// decodes every sensor word and re-arms the counters, in one pass.
//
// On start it raises scan_enable for exactly W * N clock cycles (82 bits
// times 112 sensors = 9,184 cycles, 92 us at 100 MHz). Every cycle it takes
// the bit leaving the chain into an 82-bit word register and feeds one bit
// into the chain. The chain runs from sensor 0 (nearest scan_in) to sensor
// N-1 (drives scan_out), so the first word out belongs to sensor N-1 and the
// last to sensor 0. Within a word the first bit out is the last position of
// ring 3 and the last bit out is position 0 of ring 1, so after 82 shifts the
// word register holds {ring3, ring2, ring1} in the counter's own layout. The
// bits fed in form, for every sensor, a hot bit at position 0 of each ring,
// so when the pass ends all counters stand at zero, ready for the next
// measurement, with no reset needed. Each finished word goes through
// rns_decoder.
//
// The published system does this in software on the embedded processor; the
// 82-bit word, the single chain and the readout time of about 100 us are
// from it. The sequencing and the re-arming by shifting in a fresh pattern
// are this design's choices.
//
// Interface: start (ignored while busy), busy, done (one-cycle pulse after
// the last shift); scan_enable, scan_in to the chain and scan_out from it,
// all in this clock domain (the chain shifts on the rising clock edges at
// which scan_enable is high, and scan_out is sampled at those edges);
// sample_valid/sample_index/sample_count, one sensor per pulse, the decoded
// count arriving two cycles after the word's last bit.
`timescale 1ns/1ps
module scan_controller #(
  parameter int unsigned N_SENSORS = sensor_pkg::ARRAY_ROWS * sensor_pkg::ARRAY_COLS,
  parameter int unsigned M1 = sensor_pkg::RNS_M1,
  parameter int unsigned M2 = sensor_pkg::RNS_M2,
  parameter int unsigned M3 = sensor_pkg::RNS_M3,
  localparam int unsigned W  = M1 + M2 + M3,
  localparam int unsigned CW = sensor_pkg::bits_for(M1 * M2 * M3),
  localparam int unsigned IW = sensor_pkg::bits_for(N_SENSORS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          scan_enable,
  output logic          scan_in,
  input  logic          scan_out,
  output logic          sample_valid,
  output logic [IW-1:0] sample_index,
  output logic [CW-1:0] sample_count
);

  localparam int unsigned BW = sensor_pkg::bits_for(W);

  logic [BW-1:0] bit_cnt;
  logic [IW-1:0] word_cnt;
  logic [W-2:0]  shreg;      // the first W-1 bits of a word
  logic          word_valid;
  logic [W-1:0]  word;
  logic [IW-1:0] word_index, dec_index;
  logic          last_bit;

  assign last_bit = (bit_cnt == BW'(W - 1));

  // Re-arm pattern: a 1 where the bit will come to rest at position 0 of a ring.
  assign scan_in = scan_enable &&
                   (bit_cnt == BW'(W - 1) || bit_cnt == BW'(W - 1 - M1) ||
                    bit_cnt == BW'(W - 1 - M1 - M2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_enable <= 1'b0;
      done        <= 1'b0;
      bit_cnt     <= '0;
      word_cnt    <= '0;
      shreg       <= '0;
      word_valid  <= 1'b0;
      word        <= '0;
      word_index  <= '0;
    end else begin
      done       <= 1'b0;
      word_valid <= 1'b0;
      if (!scan_enable) begin
        if (start) begin
          scan_enable <= 1'b1;
          bit_cnt     <= '0;
          word_cnt    <= '0;
        end
      end else begin
        shreg <= {shreg[W-3:0], scan_out};
        if (last_bit) begin
          bit_cnt    <= '0;
          word_valid <= 1'b1;
          word       <= {shreg[W-2:0], scan_out};
          word_index <= IW'(N_SENSORS - 1) - word_cnt;
          if (word_cnt == IW'(N_SENSORS - 1)) begin
            scan_enable <= 1'b0;
            done        <= 1'b1;
          end else begin
            word_cnt <= word_cnt + 1'b1;
          end
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end

  assign busy = scan_enable;

  rns_decoder #(.M1(M1), .M2(M2), .M3(M3)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (word_valid),
    .word     (word),
    .out_valid(sample_valid),
    .count    (sample_count),
    .res1     (),
    .res2     (),
    .res3     ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_index <= '0;
    else if (word_valid) dec_index <= word_index;
  end

  assign sample_index = dec_index;

endmodule
