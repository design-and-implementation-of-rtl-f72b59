// reset_sync: reset bridge for a clock domain of the TRNG.
//
// srst rises at once (asynchronously) when arst rises and falls on the second
// rising edge of clk after arst has fallen, so the logic of that domain leaves
// reset in step with its own clock. Helper of this design, not named by the
// source.
`timescale 1ns / 1ps
module reset_sync (
  input  logic clk,
  input  logic arst,
  output logic srst
);

  logic meta;

  always_ff @(posedge clk or posedge arst) begin
    if (arst) begin
      meta <= 1'b1;
      srst <= 1'b1;
    end else begin
      meta <= 1'b0;
      srst <= meta;
    end
  end

endmodule
