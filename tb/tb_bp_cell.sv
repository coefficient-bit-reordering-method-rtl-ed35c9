// tb_bp_cell: exhaustive test of the bit-plane cell. For all 16 input
// combinations the pair (c_out, s_out) must equal the binary value of
// s_in + c_in + (xb AND cb).
module tb_bp_cell;
  logic xb, cb, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;

  bp_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_sum;
      {xb, cb, s_in, c_in} = 4'(v);
      #1;
      exp_sum = int'(s_in) + int'(c_in) + ((xb && cb) ? 1 : 0);
      checks++;
      if ({c_out, s_out} != 2'(exp_sum)) begin
        failures++;
        $display("FAIL: x=%0b c=%0b s=%0b cy=%0b -> %0b%0b", xb, cb, s_in, c_in, c_out, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
