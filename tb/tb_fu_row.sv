// tb_fu_row: random test of one functional-unit row. Inputs are random
// (start, clear, tag, coefficient bit, previous state); the expected next
// state is computed here with integer arithmetic: tag advances modulo m_c
// (0 on start), operand = fresh word when the new tag is 0 else previous
// operand * 2, and the carry-save pair must add up to previous sum + previous
// carry + operand * coefficient bit (modulo 2^YW).
module tb_fu_row;
  localparam int XW = 5, YW = 17, TW = 8;
  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0, start = 1'b0, cbit = 1'b0;
  logic [TW-1:0] m_c = 8'd6, j_prev = '0, j_q;
  logic [XW-1:0] x_in = '0;
  logic [YW-1:0] s_prev = '0, c_prev = '0, x_prev = '0, s_q, c_q, x_q;
  int checks = 0, failures = 0;

  fu_row #(.XW(XW), .YW(YW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int jn;
    longint xo, acc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      m_c    = TW'($urandom_range(1, 12));
      j_prev = TW'($urandom_range(0, int'(m_c) - 1));
      start  = ($urandom_range(0, 3) == 0);
      clear  = ($urandom_range(0, 7) == 0);
      cbit   = 1'($urandom);
      x_in   = XW'($urandom);
      s_prev = YW'($urandom);
      c_prev = YW'($urandom);
      x_prev = YW'($urandom);
      jn = start ? 0 : ((int'(j_prev) + 1) % int'(m_c));
      xo = (jn == 0) ? longint'(x_in) : (longint'(x_prev) * 2) % (longint'(1) << YW);
      acc = (start ? 0 : longint'(s_prev) + longint'(c_prev)) + (cbit ? xo : 0);
      acc = acc % (longint'(1) << YW);
      @(posedge clk);
      #1;
      checks++;
      if (j_q != TW'(jn)) begin
        failures++;
        $display("FAIL tag: got %0d expected %0d", j_q, jn);
      end
      checks++;
      if (clear) begin
        if (s_q != '0 || c_q != '0 || x_q != '0) begin
          failures++;
          $display("FAIL clear");
        end
      end else if (longint'(x_q) != xo || longint'(YW'(s_q + c_q)) != acc) begin
        failures++;
        $display("FAIL: start=%0b cbit=%0b x=%0d s+c=%0d expected x=%0d acc=%0d",
                 start, cbit, x_q, YW'(s_q + c_q), xo, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
