// fbpa_ctrl: mode and timing controller of the configurable folded FIR filter.
//
// A one-clock load pulse latches the configuration cfg (n_eff, m_c) and puts
// the filter into initialization mode for K*n_eff clocks, one serial
// coefficient bit per clock (coef_req high). Then run mode follows until the
// next load. A load during run mode reconfigures the filter on the fly; the
// output words in flight are dropped.
//
// phase is the folding order r = 0 .. n_eff-1. It restarts at 0 with every
// load and keeps counting during loading, so that run mode begins at r = 0
// and the bit-index tags of the chains in flight are already correct.
// chain_start (r = 0, in both modes) tells row S_0 to begin a new output word;
// in run mode it is also the clock in which the input word is taken (x_take).
// out_take marks the clocks in which the last row holds a completed word:
// r = 0 of run mode, except in its first clock (that word was computed
// entirely during loading).
//
// The modes, the K*N loading clocks and a new word every N clocks follow the
// document; the handshake, the idle state after reset and the configuration
// checks are this design's choices.
module fbpa_ctrl
  import fir_pkg::*;
#(
  parameter int K = 3,
  parameter int N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  fir_cfg_t               cfg,
  output fir_cfg_t               cfg_q,
  output logic                   init,
  output logic                   run,
  output logic                   coef_req,
  output logic [$clog2(N+1)-1:0] phase,
  output logic                   chain_start,
  output logic                   x_take,
  output logic                   out_take
);
  localparam int CW = $clog2(K*N+1);

  fir_state_t    state;
  logic [CW-1:0] cnt;
  logic          run_d;
  logic [CW-1:0] init_len;
  logic [$clog2(N+1)-1:0] ne;

  always_comb begin
    ne       = cfg_q.n_eff[$clog2(N+1)-1:0];
    init_len = CW'(K) * CW'(ne);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cfg_q <= '{n_eff: CFG_W'(N), m_c: CFG_W'(N)};
      cnt   <= '0;
      phase <= '0;
      run_d <= 1'b0;
    end else begin
      run_d <= (state == ST_RUN) && !load;
      if (load) begin
        assert (cfg_ok(cfg, K, N))
          else $error("fbpa_ctrl: unsupported configuration n_eff=%0d m_c=%0d",
                      cfg.n_eff, cfg.m_c);
        state <= ST_INIT;
        cfg_q <= cfg;
        cnt   <= '0;
        phase <= '0;
      end else begin
        if (state != ST_IDLE)
          phase <= (phase + 1'b1 >= ne) ? '0 : phase + 1'b1;
        if (state == ST_INIT) begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 >= init_len) state <= ST_RUN;
        end
      end
    end
  end

  always_comb begin
    init        = (state == ST_INIT);
    run         = (state == ST_RUN);
    coef_req    = init;
    chain_start = (state != ST_IDLE) && (phase == '0);
    x_take      = run && (phase == '0);
    out_take    = run && run_d && (phase == '0);
  end

endmodule
