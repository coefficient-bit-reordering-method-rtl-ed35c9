// tb_fbpa: test of the folded bit-plane array with its coefficient bits and
// control strobes generated here (no CBSM, no controller).
//
// Configuration: K = 3, N = 4, n_eff = 4, main case kC = 2, mC = 6, then
// kC = 3, mC = 4. The bit fed to row S_s at folding order r is that of the
// operation p with s = (p-1) mod K and r = (p-1) mod N; operation p uses
// coefficient i = kC-1-(p-1) div mC, bit j = (p-1) mod mC. After K*N clocks
// with clear high (all-zero history) the array runs; every output word is
// compared with y_n = sum_i c_i x_(n-i), and the m-th output is y_(m-K+kC).
module tb_fbpa;
  localparam int K = 3, N = 4, XW = 5, YW = XW + K*N, TW = 8;
  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b1, chain_start = 1'b0, out_take = 1'b0;
  logic [TW-1:0] m_c = 8'd6;
  logic [XW-1:0] x_in = '0;
  logic [K-1:0]  cbit = '0;
  logic [YW-1:0] y;
  logic          y_valid;
  int checks = 0, failures = 0;
  int unsigned coef [4];
  int unsigned xs [$];

  fbpa #(.K(K), .N(N), .XW(XW), .YW(YW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bit_for(input int s, input int r, input int kc, input int mc);
    for (int p = 1; p <= K*N; p++)
      if ((p-1) % K == s && (p-1) % N == r)
        return 1'((coef[kc-1-(p-1)/mc] >> ((p-1) % mc)) & 1);
    return 1'b0;
  endfunction

  task automatic test(input int kc, input int mc, input int words);
    int m, t, outs;
    for (int i = 0; i < kc; i++) coef[i] = $urandom_range(0, (1 << mc) - 1);
    m_c = TW'(mc);
    xs.delete();
    m = 0;
    outs = 0;
    clear = 1'b1;
    for (t = -K*N; t < words*N; t++) begin
      if (t == 0) clear = 1'b0;
      chain_start = ((t % N + N) % N == 0);
      out_take    = (t > 0) && (t % N == 0);
      for (int s = 0; s < K; s++) cbit[s] = bit_for(s, (t % N + N) % N, kc, mc);
      x_in = XW'($urandom);
      if (t >= 0 && t % N == 0) xs.push_back(int'(x_in));
      @(posedge clk);
      #1;
      if (y_valid) begin
        int n;
        longint e;
        n = m - K + kc;
        e = 0;
        for (int i = 0; i < kc; i++)
          if (n - i >= 0) e += longint'(coef[i]) * longint'(xs[n-i]);
        checks++;
        if (longint'(y) != e) begin
          failures++;
          $display("FAIL: kc=%0d out %0d got %0d expected %0d", kc, m, y, e);
        end
        m++;
      end
      @(negedge clk);
    end
    checks++;
    if (m != words - 1) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", m, words - 1);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    test(2, 6, 30);
    test(3, 4, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
