// tb_cfg_fir_top: end-to-end test of the configurable folded FIR filter at
// its default size (K = 3 rows, N = 4, 5-bit inputs).
//
// For each configuration the test loads random coefficients through the
// serial port, streams random input words and compares every output word
// with y_n = sum_i c_i x_(n-i), computed here directly from the coefficient
// list and the input history (words before the first one count as zero).
// It also checks the cycle counts: K*n_eff loading clocks, one input word
// and one output word every n_eff clocks.
//
// Configurations (n_eff, m_c, kC): (4,6,2) the main one, (4,4,3) where the
// second and third coefficients start in rows S_1 and S_2, (4,12,1), reduced
// folding factors (2,3,2), (2,2,3), (1,3,1), (1,1,3), and a reload in the
// middle of filtering (on-the-fly reconfiguration). The test counts how often
// each mechanism happened and fails if one never did.
module tb_cfg_fir_top;
  import fir_pkg::*;

  localparam int K  = 3;
  localparam int N  = 4;
  localparam int XW = 5;
  localparam int YW = XW + K*N;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          load = 1'b0;
  fir_cfg_t      cfg = '0;
  logic          coef_in = 1'b0;
  logic          coef_req;
  logic [XW-1:0] x_in = '0;
  logic          x_take;
  logic [YW-1:0] y;
  logic          y_valid;
  logic          busy_init;

  int checks = 0, failures = 0;
  int n_load = 0, n_reduced = 0, n_reconfig = 0, n_fresh_mid = 0, n_outputs = 0;

  cfg_fir_top dut (.*);

  always #5 clk = ~clk;

  // Fresh input word taken in a row other than S_0 (a coefficient that does
  // not start in the first row).
  always @(posedge clk)
    if (dut.run && (dut.u_fbpa.g_row[1].u_row.j_next == '0 ||
                    dut.u_fbpa.g_row[2].u_row.j_next == '0))
      n_fresh_mid++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned coef [16];
  int unsigned xs   [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Load kc coefficients of mc bits for folding factor ne.
  task automatic do_load(input int ne, input int mc, input int kc);
    int cyc;
    int b;
    for (int i = 0; i < kc; i++) coef[i] = $urandom_range(0, (1 << mc) - 1);
    if (ne < N) n_reduced++;
    @(negedge clk);
    cfg  = '{n_eff: CFG_W'(ne), m_c: CFG_W'(mc)};
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    cyc = 0;
    b   = 0;
    // bits: c_(kc-1) first, LSB first
    while (coef_req) begin
      coef_in = 1'((coef[kc-1-b/mc] >> (b % mc)) & 1);
      b++;
      cyc++;
      @(negedge clk);
    end
    check(cyc == K*ne, $sformatf("load took %0d clocks, expected %0d", cyc, K*ne));
    n_load++;
  endtask

  // Stream nwords input words and check all outputs that appear meanwhile.
  task automatic do_run(input int ne, input int mc, input int kc, input int nwords);
    int m;
    int last_take, last_out;
    int t;
    longint exp_y;
    xs.delete();
    m = 0;
    last_take = -1;
    last_out  = -1;
    t = 0;
    while (xs.size() < nwords || m < nwords - 1) begin
      // drive a word when it is taken, garbage otherwise
      if (x_take) begin
        x_in = XW'($urandom);
        xs.push_back(int'(x_in));
        if (last_take >= 0)
          check(t - last_take == ne, $sformatf("input period %0d, expected %0d", t - last_take, ne));
        last_take = t;
      end else begin
        x_in = XW'($urandom);
      end
      @(posedge clk);
      #1;
      t++;
      if (y_valid) begin
        int n;
        n = m - K + kc;
        exp_y = 0;
        for (int i = 0; i < kc; i++)
          if (n - i >= 0 && n - i < xs.size())
            exp_y += longint'(coef[i]) * longint'(xs[n-i]);
        check(longint'(y) == exp_y,
              $sformatf("ne=%0d mc=%0d kc=%0d out %0d (y_%0d): got %0d expected %0d",
                        ne, mc, kc, m, n, y, exp_y));
        if (last_out >= 0)
          check(t - last_out == ne, $sformatf("output period %0d, expected %0d", t - last_out, ne));
        last_out = t;
        m++;
        n_outputs++;
      end
      @(negedge clk);
    end
  endtask

  task automatic cfg_test(input int ne, input int mc, input int nwords);
    int kc;
    kc = K * ne / mc;
    do_load(ne, mc, kc);
    do_run(ne, mc, kc, nwords);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_test(4, 6, 20);   // main configuration, kC = 2, mC = 6
    cfg_test(4, 4, 20);   // kC = 3
    cfg_test(4, 12, 12);  // kC = 1
    cfg_test(2, 3, 20);   // reduced folding factor, kC = 2
    cfg_test(2, 2, 20);   // kC = 3
    cfg_test(1, 3, 12);   // kC = 1
    cfg_test(1, 1, 20);   // kC = 3, mC = 1
    // on-the-fly: reload while the filter is running, then check the new one
    do_load(4, 6, 2);
    repeat (17) @(negedge clk);
    check(!busy_init && !coef_req, "filter should be running");
    n_reconfig++;
    cfg_test(2, 3, 16);
    cfg_test(4, 6, 24);

    check(n_load > 0,      "no coefficient load happened");
    check(n_reduced > 0,   "no reduced folding factor used");
    check(n_reconfig > 0,  "no on-the-fly reconfiguration happened");
    check(n_fresh_mid > 0, "no coefficient started outside row S_0");
    check(n_outputs > 100, "too few output words");
    $display("mechanisms: loads=%0d reduced=%0d reconfig=%0d fresh_word_in_S1_S2=%0d outputs=%0d",
             n_load, n_reduced, n_reconfig, n_fresh_mid, n_outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
