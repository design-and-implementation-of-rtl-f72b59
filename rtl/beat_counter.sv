// beat_counter: measures the beat period of the TRNG in cycles of clock B.
//
// The counter runs on clock B. When the detector flip-flop output q sets
// (a rising edge of q, seen one cycle later through a registered copy), the
// number of clock-B cycles since the previous rising edge is presented on
// count_max with a one-cycle count_valid pulse, and counting restarts at 1.
// The first interval after reset is only partial and is not presented. The
// count saturates at its maximum value.
//
// Follows the source: a counter driven by one of the generated clocks and
// reset when the DFF sets, whose maximum count values carry the randomness.
// This design's choices: restarting on the rising edge of q rather than
// holding the counter in reset while q is high, the saturation, the width,
// and dropping the first interval.
`timescale 1ns / 1ps
module beat_counter #(
  parameter int unsigned COUNT_W = 16
) (
  input  logic               clk,        // clock B
  input  logic               rst,
  input  logic               q,          // detector flip-flop output
  output logic [COUNT_W-1:0] count_max,
  output logic               count_valid
);

  logic               q_d;
  logic               primed;   // a full interval is being measured
  logic [COUNT_W-1:0] cnt;
  logic               set_evt;

  assign set_evt = q & ~q_d;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q_d         <= 1'b0;
      primed      <= 1'b0;
      cnt         <= '0;
      count_max   <= '0;
      count_valid <= 1'b0;
    end else begin
      q_d         <= q;
      count_valid <= 1'b0;
      if (set_evt) begin
        primed <= 1'b1;
        cnt    <= COUNT_W'(1);
        if (primed) begin
          count_max   <= cnt;
          count_valid <= 1'b1;
        end
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
