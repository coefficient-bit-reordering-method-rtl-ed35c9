// cfg_fir_top: FIR filter with configurable number of coefficients,
// coefficient length and folding factor, on a folded bit-plane array.
//
// The filter computes y_n = c_0 x_n + c_1 x_(n-1) + ... + c_(kC-1) x_(n-kC+1)
// for unsigned XW-bit input words and unsigned mC-bit coefficients, on K rows
// of bit-level functional units that each multiply one input word by one
// coefficient bit per clock. The coefficient bits are supplied by the CBSM,
// a K x N bit store that reorders them while they are loaded so that, when
// it rotates, every row gets the right bit in the right clock.
//
// Use:
//   1. Pulse load for one clock with cfg = {n_eff, m_c}; kC = K*n_eff/m_c.
//   2. For the next K*n_eff clocks (coef_req high) drive coef_in with the
//      coefficient bits: c_(kC-1) first, each coefficient LSB first.
//   3. Then filtering runs: in every clock with x_take high drive the next
//      input word on x_in (one word per n_eff clocks). y_valid marks each
//      new output word on y, one per n_eff clocks.
//   A new load at any time reconfigures the filter.
//
// Output numbering: the m-th y_valid after loading (m = 0, 1, ...) carries
// y_(m - K + kC) with x_0 the word taken in the first x_take clock and all
// earlier words taken as zero; indices below zero give 0.
//
// The structure (array, CBSM, their connection and modes) follows the
// document; the interface protocol is this design's own.
module cfg_fir_top
  import fir_pkg::*;
#(
  parameter int K  = 3,         // rows / folding sets
  parameter int N  = 4,         // folding factor (CBSM row length)
  parameter int XW = 5,         // input word width
  parameter int YW = XW + K*N   // output width, no overflow for any valid cfg
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  fir_cfg_t      cfg,
  input  logic          coef_in,
  output logic          coef_req,
  input  logic [XW-1:0] x_in,
  output logic          x_take,
  output logic [YW-1:0] y,
  output logic          y_valid,
  output logic          busy_init
);
  fir_cfg_t               cfg_q;
  logic                   init, run, chain_start, out_take;
  logic [K-1:0]           cbit;

  fbpa_ctrl #(.K(K), .N(N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (load),
    .cfg        (cfg),
    .cfg_q      (cfg_q),
    .init       (init),
    .run        (run),
    .coef_req   (coef_req),
    .phase      (),
    .chain_start(chain_start),
    .x_take     (x_take),
    .out_take   (out_take)
  );

  cbsm #(.K(K), .N(N)) u_cbsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .run      (run),
    .n_eff    (cfg_q.n_eff[$clog2(N+1)-1:0]),
    .serial_in(coef_in),
    .cbit     (cbit)
  );

  fbpa #(.K(K), .N(N), .XW(XW), .YW(YW), .TW(CFG_W)) u_fbpa (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (!run),
    .chain_start(chain_start),
    .out_take   (out_take),
    .m_c        (cfg_q.m_c),
    .x_in       (x_in),
    .cbit       (cbit),
    .y          (y),
    .y_valid    (y_valid)
  );

  assign busy_init = init;

endmodule
