// tb_cbsm: test of the coefficient bit supply module at K = 3, N = 4.
//
// For every valid row length (n_eff = 4, 2, 1) it shifts in K*n_eff random
// bits, the b-th bit belonging to operation p = b + 1, then runs the array
// and checks that in run clock t the output for row S_s is the bit of the
// operation with (p-1) mod K = s and (p-1) mod n_eff = t mod n_eff, found
// here by searching over p (the folding set assignment). It also checks
// the layout the main example gives: with N = 4 and bits c_1^0..c_1^5,
// c_0^0..c_0^5, S_0 must see c_1^0, c_0^3, c_0^0, c_1^3 in turn, and that
// the array holds when neither mode is active.
module tb_cbsm;
  localparam int K = 3, N = 4;
  logic         clk = 1'b0, rst_n = 1'b0, init = 1'b0, run = 1'b0, serial_in = 1'b0;
  logic [2:0]   n_eff = 3'd4;
  logic [K-1:0] cbit;
  int checks = 0, failures = 0;
  logic bits [K*N];

  cbsm #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int ne);
    n_eff = 3'(ne);
    init  = 1'b1;
    for (int b = 0; b < K*ne; b++) begin
      serial_in = bits[b];
      @(negedge clk);
    end
    init = 1'b0;
  endtask

  function automatic int op_of(input int s, input int r, input int ne);
    for (int p = 1; p <= K*ne; p++)
      if ((p-1) % K == s && (p-1) % ne == r) return p;
    return -1;
  endfunction

  task automatic run_check(input int ne, input int clocks);
    run = 1'b1;
    for (int t = 0; t < clocks; t++) begin
      for (int s = 0; s < K; s++) begin
        int p;
        p = op_of(s, t % ne, ne);
        checks++;
        if (p < 1 || cbit[s] != bits[p-1]) begin
          failures++;
          $display("FAIL: ne=%0d t=%0d S_%0d got %0b expected bit of p=%0d", ne, t, s, cbit[s], p);
        end
      end
      @(negedge clk);
    end
    run = 1'b0;
  endtask

  initial begin
    int ne;
    logic [K-1:0] held;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Main example: bit b is 1 only for the operations of c_1^0 (b=0) and
    // c_0^3 (b=9), so S_0 must output 1,1,0,0 over one period.
    for (int b = 0; b < K*N; b++) bits[b] = (b == 0 || b == 9);
    load(4);
    run = 1'b1;
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (cbit[0] != ((t == 0) || (t == 1))) begin
        failures++;
        $display("FAIL: example S_0 at r=%0d", t);
      end
      @(negedge clk);
    end
    run = 1'b0;
    // random tests at every valid row length
    for (int rep = 0; rep < 6; rep++) begin
      ne = (rep % 3 == 0) ? 4 : (rep % 3 == 1) ? 2 : 1;
      for (int b = 0; b < K*N; b++) bits[b] = 1'($urandom);
      load(ne);
      run_check(ne, 3*ne + 1);
      // hold: no mode for a few clocks must not disturb the rotation state
      held = cbit;
      repeat (3) @(negedge clk);
      checks++;
      if (cbit != held) begin
        failures++;
        $display("FAIL: hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
