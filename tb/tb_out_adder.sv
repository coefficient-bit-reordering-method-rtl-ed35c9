// tb_out_adder: random test of the output adder. y must become s_vec + c_vec
// (modulo 2^YW) one clock after take, y_valid must follow take by one clock,
// and y must hold while take is low.
module tb_out_adder;
  localparam int YW = 17;
  logic          clk = 1'b0, rst_n = 1'b0, take = 1'b0;
  logic [YW-1:0] s_vec = '0, c_vec = '0, y;
  logic          y_valid;
  logic [YW-1:0] exp_y;
  int checks = 0, failures = 0;

  out_adder #(.YW(YW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      take  = 1'($urandom_range(0, 1));
      s_vec = YW'($urandom);
      c_vec = YW'($urandom);
      if (take) exp_y = YW'(s_vec + c_vec);
      @(negedge clk);
      checks++;
      if (y_valid != take || y != exp_y) begin
        failures++;
        $display("FAIL: take=%0b y=%0d y_valid=%0b expected %0d", take, y, y_valid, exp_y);
      end
      take = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
