// dcm_model: behavioural model of an FPGA Digital Clock Manager (DCM) used as
// one of the two jittery oscillators of the TRNG. Behavioural model: not
// synthesizable; on an FPGA the vendor DCM primitive takes its place.
//
// The synthesized clock is clkfx = clkin * M / D. The model measures the
// period of clkin, keeps an ideal edge timeline at half the synthesized
// period, and places every clkfx edge at its ideal time plus an independent,
// uniformly distributed offset in [-JITTER_PS, +JITTER_PS]. This cycle jitter
// does not accumulate, as in a phase-locked clock manager, and it is the
// entropy source of the generator.
//
// M and D are read and written through a Dynamic Reconfiguration Port (DRP)
// clocked by dclk: register DRP_ADDR_MD holds {M-1, D-1} (other addresses read
// as 0 and ignore writes). drp_rsp.drdy pulses one dclk cycle after
// drp_req.den. A write to DRP_ADDR_MD makes the model drop locked, hold clkfx
// low and relock after LOCK_CYCLES clkin cycles with the new factors, as a DCM
// does after being reconfigured. rst (active high) stops clkfx and clears
// locked; the DRP registers keep their value through rst.
//
// Follows the source: two DCMs with M and D factors, tuned through DRP ports,
// jitter as the randomness. This model's own choices: the register address
// and layout, the jitter distribution and size, and the relock time. Its
// variables start from declared initial values, which stand for the
// power-up state of the primitive (M_INIT, D_INIT, unlocked).
`timescale 1ns / 1ps
module dcm_model
  import trng_pkg::*;
#(
  parameter int unsigned M_INIT          = 2,     // CLKFX multiply factor after power-up
  parameter int unsigned D_INIT          = 1,     // CLKFX divide factor after power-up
  parameter int unsigned CLKIN_PERIOD_PS = 10000, // clkin period used before it is measured
  parameter int unsigned JITTER_PS       = 150,   // peak cycle jitter of each clkfx edge
  parameter int unsigned LOCK_CYCLES     = 16     // clkin cycles from reset/reconfig to lock
) (
  input  logic     clkin,
  input  logic     rst,
  input  logic     dclk,
  input  drp_req_t drp_req,
  output drp_rsp_t drp_rsp,
  output logic     clkfx,
  output logic     locked
);

  logic [7:0] m_reg = 8'(M_INIT);
  logic [7:0] d_reg = 8'(D_INIT);
  logic       reconf_tgl = 1'b0;   // toggles on every write of the M/D register
  logic       reconf_seen = 1'b0;
  logic [$clog2(LOCK_CYCLES+1)-1:0] lock_cnt = '0;

  // ---------------------------------------------------------------- DRP port
  initial drp_rsp = '0;
  always @(posedge dclk) begin
    drp_rsp.drdy <= drp_req.den;
    if (drp_req.den) begin
      if (drp_req.dwe) begin
        if (drp_req.daddr == DRP_ADDR_MD) begin
          m_reg      <= drp_req.di[15:8] + 8'd1;
          d_reg      <= drp_req.di[7:0] + 8'd1;
          reconf_tgl <= ~reconf_tgl;
        end
        drp_rsp.dout <= '0;
      end else begin
        drp_rsp.dout <= (drp_req.daddr == DRP_ADDR_MD) ? {m_reg - 8'd1, d_reg - 8'd1} : '0;
      end
    end
  end

  // A new transaction must not start before the previous one has completed.
  a_drp_no_back_to_back : assert property (@(posedge dclk) drp_req.den |=> !drp_req.den)
    else $error("dcm_model: DRP den asserted on two consecutive cycles");
  a_md_range : assert property (@(posedge dclk)
                                (m_reg >= 8'd2 && m_reg <= 8'd32 && d_reg >= 8'd1 && d_reg <= 8'd32))
    else $error("dcm_model: M=%0d D=%0d outside the supported range", m_reg, d_reg);

  // ------------------------------------------------------------- lock logic
  always @(posedge clkin or posedge rst) begin
    if (rst) begin
      lock_cnt    <= '0;
      reconf_seen <= reconf_tgl;
    end else if (reconf_seen != reconf_tgl) begin
      lock_cnt    <= '0;
      reconf_seen <= reconf_tgl;
    end else if (lock_cnt != LOCK_CYCLES[$bits(lock_cnt)-1:0]) begin
      lock_cnt <= lock_cnt + 1'b1;
    end
  end
  assign locked = (lock_cnt == LOCK_CYCLES[$bits(lock_cnt)-1:0]);

  // ------------------------------------------------------ clkin measurement
  real period_in = real'(CLKIN_PERIOD_PS) / 1000.0;
  real t_last    = -1.0;
  always @(posedge clkin) begin
    if (t_last >= 0.0) period_in <= $realtime - t_last;
    t_last <= $realtime;
  end

  // ------------------------------------------------------- clkfx generation
  real t_ideal = 0.0;
  real t_edge;
  real half;
  real jit;
  initial begin
    clkfx = 1'b0;
    forever begin
      if (!locked) begin
        clkfx = 1'b0;
        @(posedge locked);
        t_ideal = $realtime;
      end
      half    = period_in * real'(d_reg) / real'(m_reg) / 2.0;
      t_ideal = t_ideal + half;
      jit     = (real'($urandom_range(2 * JITTER_PS, 0)) - real'(JITTER_PS)) / 1000.0;
      t_edge  = t_ideal + jit;
      if (t_edge > $realtime) #(t_edge - $realtime);
      else #0.001;
      if (locked) clkfx = ~clkfx;
    end
  end

endmodule
