// tb_fbpa_ctrl: test of the mode and timing controller at K = 3, N = 4.
//
// For several configurations it pulses load and checks: initialization mode
// lasts exactly K*n_eff clocks with coef_req high throughout; the folding
// order counts 0 .. n_eff-1 from the load on; chain_start is high exactly
// when the order is 0; in run mode x_take comes every n_eff clocks starting
// in the first run clock, and out_take every n_eff clocks starting n_eff
// clocks into run mode. It also reloads during run mode and checks that
// loading restarts at once.
module tb_fbpa_ctrl;
  import fir_pkg::*;
  localparam int K = 3, N = 4;
  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  fir_cfg_t   cfg = '0, cfg_q;
  logic       init, run, coef_req, chain_start, x_take, out_take;
  logic [2:0] phase;
  int checks = 0, failures = 0;

  fbpa_ctrl #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic one(input int ne, input int mc, input int run_clocks);
    @(negedge clk);
    cfg  = '{n_eff: CFG_W'(ne), m_c: CFG_W'(mc)};
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    chk(cfg_q.n_eff == CFG_W'(ne) && cfg_q.m_c == CFG_W'(mc), "configuration not latched");
    for (int t = 0; t < K*ne; t++) begin
      chk(init && coef_req && !run, $sformatf("ne=%0d loading clock %0d", ne, t));
      chk(int'(phase) == t % ne, $sformatf("phase %0d at loading clock %0d", phase, t));
      chk(chain_start == (t % ne == 0), "chain_start during loading");
      chk(!x_take && !out_take, "take strobes during loading");
      @(negedge clk);
    end
    for (int t = 0; t < run_clocks; t++) begin
      chk(run && !init && !coef_req, $sformatf("ne=%0d run clock %0d", ne, t));
      chk(int'(phase) == t % ne, "phase in run mode");
      chk(x_take == (t % ne == 0), "x_take period");
      chk(out_take == (t % ne == 0 && t > 0), "out_take period");
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!init && !run && !chain_start, "idle after reset");
    one(4, 6, 13);
    one(2, 3, 9);
    one(1, 1, 5);
    one(4, 4, 8);   // this load interrupts run mode
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
