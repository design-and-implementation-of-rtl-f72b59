// post_processing: turns beat counts into random words.
//
// For each count_valid, the LSB_BITS least significant bits of count_max are
// shifted into a register from the right. As soon as at least OUT_W new bits
// have been collected, the newest OUT_W bits are presented on rnd with a
// one-cycle rnd_valid pulse and collection starts afresh, so no bit is used
// in two words; bits beyond OUT_W in the last group are dropped. With the
// defaults (3 bits per count, 16-bit words) every word takes 6 counts, and its
// bits 1:0 hold count 6, bits 4:2 count 5 and so on up to bit 15, which is
// bit 0 of count 1 (bits 2:1 of count 1 are dropped).
//
// Follows the source: the three least significant bits of the maximum counts
// are the random bits, and the output word is 16 bits wide. This design's
// choice: the packing order and the dropping of surplus bits. rnd changes one
// clock after the count_valid that completes a word.
`timescale 1ns / 1ps
module post_processing #(
  parameter int unsigned COUNT_W  = 16,
  parameter int unsigned LSB_BITS = 3,
  parameter int unsigned OUT_W    = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [COUNT_W-1:0] count_max,
  input  logic               count_valid,
  output logic [OUT_W-1:0]   rnd,
  output logic               rnd_valid
);

  localparam int unsigned FILL_W = $clog2(OUT_W + LSB_BITS + 1);

  logic [OUT_W-1:0]  shreg;
  logic [OUT_W-1:0]  shreg_next;
  logic [FILL_W-1:0] fill;
  logic [FILL_W-1:0] fill_next;

  if (LSB_BITS >= OUT_W) begin : g_wide
    assign shreg_next = count_max[OUT_W-1:0];
  end else begin : g_shift
    assign shreg_next = {shreg[OUT_W-LSB_BITS-1:0], count_max[LSB_BITS-1:0]};
  end
  assign fill_next = fill + FILL_W'(LSB_BITS);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      shreg     <= '0;
      fill      <= '0;
      rnd       <= '0;
      rnd_valid <= 1'b0;
    end else begin
      rnd_valid <= 1'b0;
      if (count_valid) begin
        shreg <= shreg_next;
        if (fill_next >= FILL_W'(OUT_W)) begin
          rnd       <= shreg_next;
          rnd_valid <= 1'b1;
          fill      <= '0;
        end else begin
          fill <= fill_next;
        end
      end
    end
  end

endmodule
