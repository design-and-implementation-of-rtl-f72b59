// bfd_dff: the beat-frequency detector flip-flop of the TRNG.
//
// Samples clock A (d) on every rising edge of clock B (clk). Because the two
// clocks differ slightly in frequency, the sampled value stays constant for
// about half a beat period and then flips; near the flip the clock jitter
// decides the sampled value, which is where the randomness enters. q sets
// when the faster clock has gained one cycle on the slower one.
//
// Follows the source: a D flip-flop with clock A on D and clock B on CLK. The
// asynchronous active-high reset is this design's choice. One cycle of
// latency: q shows the value of d at the last rising edge of clk.
`timescale 1ns / 1ps
module bfd_dff (
  input  logic clk,   // clock B
  input  logic rst,
  input  logic d,     // clock A, sampled as data
  output logic q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end

endmodule
