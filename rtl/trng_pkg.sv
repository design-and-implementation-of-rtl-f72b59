// trng_pkg: types and constants shared by the DCM based beat-frequency TRNG.
//
// Holds the Dynamic Reconfiguration Port (DRP) bundle types used between the
// DRP controller and the two clock managers, the DRP register address that
// carries the clock-synthesis factors, and the mapping from a tuning setting
// to the multiply (M) and divide (D) factors of both clock managers.
//
// Tuning rule (this design's choice; the source only says that M and D are
// set so the two clocks differ slightly): for a setting N,
//   DCM-A: M = N+1, D = N      -> fA = fin*(N+1)/N
//   DCM-B: M = N+2, D = N+1    -> fB = fin*(N+2)/(N+1)
// so fA - fB = fin/(N*(N+1)) and one beat lasts N*(N+2) cycles of clock B.
// N is limited to 1..30 so that M stays within 2..32 and D within 1..32.
`timescale 1ns / 1ps
package trng_pkg;

  localparam int unsigned DRP_ADDR_W = 7;
  localparam int unsigned DRP_DATA_W = 16;

  // DRP register holding {M-1, D-1} of the frequency synthesizer output.
  localparam logic [DRP_ADDR_W-1:0] DRP_ADDR_MD = 7'h50;

  localparam int unsigned N_MIN = 1;
  localparam int unsigned N_MAX = 30;

  // Request side of a DRP transaction (driven by the master, sampled on DCLK).
  typedef struct packed {
    logic                  den;    // one-cycle transaction strobe
    logic                  dwe;    // 1 = write, 0 = read
    logic [DRP_ADDR_W-1:0] daddr;  // register address
    logic [DRP_DATA_W-1:0] di;     // write data
  } drp_req_t;

  // Response side of a DRP transaction.
  typedef struct packed {
    logic                  drdy;   // one-cycle completion strobe
    logic [DRP_DATA_W-1:0] dout;   // read data, valid with drdy
  } drp_rsp_t;

  // Multiply and divide factor of one clock manager.
  typedef struct packed {
    logic [7:0] m;
    logic [7:0] d;
  } md_t;

  // Clamp a tuning request to the supported range of N.
  function automatic logic [7:0] setting_n(input logic [7:0] req);
    if (req < 8'(N_MIN)) return 8'(N_MIN);
    if (req > 8'(N_MAX)) return 8'(N_MAX);
    return req;
  endfunction

  function automatic md_t md_a(input logic [7:0] n);
    md_t r;
    r.m = n + 8'd1;
    r.d = n;
    return r;
  endfunction

  function automatic md_t md_b(input logic [7:0] n);
    md_t r;
    r.m = n + 8'd2;
    r.d = n + 8'd1;
    return r;
  endfunction

  // DRP data word for register DRP_ADDR_MD: {M-1, D-1}.
  function automatic logic [DRP_DATA_W-1:0] md_word(input md_t f);
    return {f.m - 8'd1, f.d - 8'd1};
  endfunction

endpackage
