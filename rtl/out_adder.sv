// out_adder: output adder of the folded bit-plane array.
//
// When the last row S_(K-1) holds a completed output word in carry-save form
// (take high), the sum and carry vectors are added by a carry-propagate
// adder and the result is registered as y with a one-clock y_valid strobe.
// y holds its value between strobes.
//
// Timing: y and y_valid appear the clock after take. The document only draws
// an adder below the rows; the registered adder is this design's choice.
module out_adder #(
  parameter int YW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          take,
  input  logic [YW-1:0] s_vec,
  input  logic [YW-1:0] c_vec,
  output logic [YW-1:0] y,
  output logic          y_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= take;
      if (take) y <= s_vec + c_vec;
    end
  end
endmodule
