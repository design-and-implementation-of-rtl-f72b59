// trng: DCM based, tunable beat-frequency-detection true random number
// generator.
//
// Two clock managers, both fed by clk, synthesize clock A at clk*(N+1)/N and
// clock B at clk*(N+2)/(N+1). A flip-flop clocked by clock B samples clock A;
// its output sets once per beat, i.e. each time clock A has gained one full
// cycle on clock B, about every N*(N+2) cycles of clock B. The counter on
// clock B reports how many cycles each beat took; the clock jitter makes the
// low bits of that count random. The post-processing unit packs the three
// least significant bits of six counts into one 16-bit word on out, marked by
// a one-cycle out_valid pulse (both in the clock-B domain).
//
// Tuning: while drp is high, a new setting on add (clamped to N = 1..30) is
// written to both clock managers through their reconfiguration ports; they
// relock with the new factors. Small N gives short beats and fast output,
// large N long beats and more accumulated jitter per count. Power-up setting
// N_INIT. en low holds both clock managers in reset, which stops the clocks
// and the output. The clock-B logic is reset while reset is high or either
// clock manager is not locked, so a count never spans a retune.
//
// Follows the source: the block structure DCM-A, DCM-B, DFF, COUNTER, POST
// PROCESSING and DRP_CONTROL, the connections (clock A to D, clock B to the
// flip-flop and counter clocks, flip-flop output to the counter reset, count
// to post-processing), the 3 LSBs per count and the ports clk, reset, en, drp,
// add[5:0], out[15:0]. This design's own choices: the M/D rule per setting,
// the counter restart on the rising edge, the word packing, out_valid and the
// reset bridge.
`timescale 1ns / 1ps
module trng
  import trng_pkg::*;
#(
  parameter int unsigned N_INIT          = 30,
  parameter int unsigned COUNT_W         = 16,
  parameter int unsigned LSB_BITS        = 3,
  parameter int unsigned OUT_W           = 16,
  parameter int unsigned ADD_W           = 6,
  parameter int unsigned CLKIN_PERIOD_PS = 10000,
  parameter int unsigned JITTER_PS       = 150
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             en,
  input  logic             drp,
  input  logic [ADD_W-1:0] add,
  output logic [OUT_W-1:0] out,
  output logic             out_valid
);

  drp_req_t           drp_a_req, drp_b_req;
  drp_rsp_t           drp_a_rsp, drp_b_rsp;
  logic               dcm_rst;
  logic               clk_a, clk_b;
  logic               locked_a, locked_b;
  logic               rst_b;
  logic               q;
  logic [COUNT_W-1:0] count_max;
  logic               count_valid;
  logic               drp_busy;
  logic [7:0]         applied_n;

  assign dcm_rst = reset | ~en;

  drp_control #(
    .ADD_W (ADD_W),
    .N_INIT(N_INIT)
  ) u_drp_control (
    .clk      (clk),
    .rst      (reset),
    .drp      (drp),
    .add      (add),
    .drp_a_req(drp_a_req),
    .drp_a_rsp(drp_a_rsp),
    .drp_b_req(drp_b_req),
    .drp_b_rsp(drp_b_rsp),
    .busy     (drp_busy),
    .applied_n(applied_n)
  );

  dcm_model #(
    .M_INIT         (N_INIT + 1),
    .D_INIT         (N_INIT),
    .CLKIN_PERIOD_PS(CLKIN_PERIOD_PS),
    .JITTER_PS      (JITTER_PS)
  ) u_dcm_a (
    .clkin  (clk),
    .rst    (dcm_rst),
    .dclk   (clk),
    .drp_req(drp_a_req),
    .drp_rsp(drp_a_rsp),
    .clkfx  (clk_a),
    .locked (locked_a)
  );

  dcm_model #(
    .M_INIT         (N_INIT + 2),
    .D_INIT         (N_INIT + 1),
    .CLKIN_PERIOD_PS(CLKIN_PERIOD_PS),
    .JITTER_PS      (JITTER_PS)
  ) u_dcm_b (
    .clkin  (clk),
    .rst    (dcm_rst),
    .dclk   (clk),
    .drp_req(drp_b_req),
    .drp_rsp(drp_b_rsp),
    .clkfx  (clk_b),
    .locked (locked_b)
  );

  reset_sync u_rst_b (
    .clk (clk_b),
    .arst(reset | ~locked_a | ~locked_b),
    .srst(rst_b)
  );

  bfd_dff u_dff (
    .clk(clk_b),
    .rst(rst_b),
    .d  (clk_a),
    .q  (q)
  );

  beat_counter #(
    .COUNT_W(COUNT_W)
  ) u_counter (
    .clk        (clk_b),
    .rst        (rst_b),
    .q          (q),
    .count_max  (count_max),
    .count_valid(count_valid)
  );

  post_processing #(
    .COUNT_W (COUNT_W),
    .LSB_BITS(LSB_BITS),
    .OUT_W   (OUT_W)
  ) u_post (
    .clk        (clk_b),
    .rst        (rst_b),
    .count_max  (count_max),
    .count_valid(count_valid),
    .rnd        (out),
    .rnd_valid  (out_valid)
  );

endmodule
