// fir_pkg: types and constants shared by the configurable folded bit-plane
// FIR filter.
//
// The filter computes y_n = sum_i c_i * x_(n-i) on K rows of bit-level
// functional units (folding sets), each row doing one coefficient bit times
// one input word per clock. The configuration that can change at run time is
// the folding factor in use (n_eff <= N, the length of the coefficient
// shift rows) and the coefficient length m_c. The number of coefficients k_c
// follows from k_c * m_c = K * n_eff and is not needed by the hardware.
//
// cfg_ok() states the rules a configuration must meet:
//   * 1 <= n_eff <= N and m_c >= 1,
//   * m_c divides K * n_eff (every coefficient has m_c bits, all bits used),
//   * gcd(K, n_eff) = 1, without which two operations of the folding set
//     assignment s = (p-1) mod K, r = (p-1) mod n_eff fall on the same
//     row and time slot (this condition is this design's own finding).
package fir_pkg;

  localparam int CFG_W = 8;   // width of each configuration field

  typedef struct packed {
    logic [CFG_W-1:0] n_eff;  // folding factor in use (row length of the CBSM)
    logic [CFG_W-1:0] m_c;    // coefficient length in bits
  } fir_cfg_t;

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // no coefficients loaded
    ST_INIT = 2'd1,  // initialization mode: serial coefficient bits enter
    ST_RUN  = 2'd2   // run mode: filtering
  } fir_state_t;

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic logic cfg_ok(fir_cfg_t cfg, int unsigned k, int unsigned n);
    int unsigned ne, mc;
    ne = int'(cfg.n_eff);
    mc = int'(cfg.m_c);
    if (ne < 1 || ne > n || mc < 1) return 1'b0;
    if (((k * ne) % mc) != 0) return 1'b0;
    return gcd(k, ne) == 1;
  endfunction

endpackage
