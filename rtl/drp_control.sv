// drp_control: retunes the two clock managers of the TRNG on the fly through
// their Dynamic Reconfiguration Ports (DRP).
//
// The tuning request add is clamped to a setting N in 1..30 (see trng_pkg).
// While drp is high and N differs from the setting last written, the
// controller writes {M-1, D-1} of DCM-A to register DRP_ADDR_MD, waits for
// DCM-A's drdy, then does the same for DCM-B, and records N as applied. A
// retune therefore takes 2 cycles per port plus the ports' response time
// (4 clk cycles with a one-cycle drdy). busy is high from the first write
// until the last drdy. After reset the applied setting is N_INIT, the value
// both clock managers power up with.
//
// Follows the source: a DRP control block in the top level that tunes M and D
// of both DCMs on the fly, with inputs drp and add[5:0]. This design's own
// choices: the meaning of add as the setting N, the level-sensitive drp
// request, the write order A then B, and the register layout.
//
// All logic is on clk with an asynchronous active-high reset. Both ports
// always address register DRP_ADDR_MD, so daddr is constant, and the read
// data of the responses is not used (the controller only writes).
`timescale 1ns / 1ps
module drp_control
  import trng_pkg::*;
#(
  parameter int unsigned ADD_W  = 6,
  parameter int unsigned N_INIT = 30
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             drp,        // retuning permitted
  input  logic [ADD_W-1:0] add,        // requested setting N
  output drp_req_t         drp_a_req,
  input  drp_rsp_t         drp_a_rsp,
  output drp_req_t         drp_b_req,
  input  drp_rsp_t         drp_b_rsp,
  output logic             busy,
  output logic [7:0]       applied_n   // setting currently programmed
);

  typedef enum logic [2:0] {S_IDLE, S_WR_A, S_WAIT_A, S_WR_B, S_WAIT_B} state_t;

  state_t     state;
  logic [7:0] target_n;
  logic [7:0] req_n;

  assign req_n = setting_n(8'(add));
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= S_IDLE;
      target_n  <= 8'(N_INIT);
      applied_n <= 8'(N_INIT);
    end else begin
      unique case (state)
        S_IDLE:   if (drp && req_n != applied_n) begin
                    target_n <= req_n;
                    state    <= S_WR_A;
                  end
        S_WR_A:   state <= S_WAIT_A;
        S_WAIT_A: if (drp_a_rsp.drdy) state <= S_WR_B;
        S_WR_B:   state <= S_WAIT_B;
        S_WAIT_B: if (drp_b_rsp.drdy) begin
                    applied_n <= target_n;
                    state     <= S_IDLE;
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    drp_a_req       = '0;
    drp_b_req       = '0;
    drp_a_req.daddr = DRP_ADDR_MD;
    drp_b_req.daddr = DRP_ADDR_MD;
    drp_a_req.di    = md_word(md_a(target_n));
    drp_b_req.di    = md_word(md_b(target_n));
    drp_a_req.den   = (state == S_WR_A);
    drp_a_req.dwe   = (state == S_WR_A);
    drp_b_req.den   = (state == S_WR_B);
    drp_b_req.dwe   = (state == S_WR_B);
  end

  // One transaction at a time: no strobe while a port is being waited on.
  a_no_overlap : assert property (@(posedge clk) disable iff (rst)
                                  (state == S_WAIT_A || state == S_WAIT_B) |-> !(drp_a_req.den || drp_b_req.den));

endmodule
