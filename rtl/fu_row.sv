// fu_row: one functional unit (folding set S_s) of the folded bit-plane array.
//
// Every clock the row performs one operation of an output word's chain: it
// takes the stage state left by the previous row one clock earlier (partial
// sum and carry vectors, operand word, bit-index tag j), selects the operand
// and adds operand AND coefficient bit to the carry-save partial sum with a
// row of YW bp_cell instances. The result is registered and read by the next
// row in the ring.
//
// Operand selection: the tag counts the coefficient bit index j modulo m_c.
// When the next index is 0 a new coefficient begins and the fresh input
// word x_in (weight 2^0) is taken; otherwise the previous operand shifted
// left by one (weight 2^j). With start high (first operation of a new output
// word, only in row S_0) the partial sum enters as zero and j = 0.
// clear zeroes sum, carry and operand but lets the tag advance, so chains in
// flight keep correct tags while the coefficient store is being loaded.
//
// Timing: combinational from inputs to the registers, one clock per
// operation. Carries out of bit YW-1 are dropped; YW is chosen wide enough
// that a complete result never needs them.
//
// Follows the document: one coefficient bit per row per clock, the word
// moving to the next row one clock later shifted left by one position, the
// new input word at each coefficient's first bit. Carry-save form and the
// travelling tag are this design's choices.
module fu_row #(
  parameter int XW = 5,   // input word width
  parameter int YW = 17,  // partial sum / output width
  parameter int TW = 8    // tag and m_c width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,   // zero sum, carry and operand
  input  logic          start,   // first operation of a new output word
  input  logic [TW-1:0] m_c,     // coefficient length
  input  logic [XW-1:0] x_in,    // fresh input word
  input  logic          cbit,    // coefficient bit for this operation
  input  logic [YW-1:0] s_prev,  // previous row: sum vector
  input  logic [YW-1:0] c_prev,  // previous row: carry vector
  input  logic [YW-1:0] x_prev,  // previous row: operand word
  input  logic [TW-1:0] j_prev,  // previous row: bit index used
  output logic [YW-1:0] s_q,
  output logic [YW-1:0] c_q,
  output logic [YW-1:0] x_q,
  output logic [TW-1:0] j_q
);
  logic [TW-1:0] j_next;
  logic [YW-1:0] xop, s_in, c_in, s_out, cy;

  always_comb begin
    if (start || (j_prev + TW'(1) >= m_c)) j_next = '0;
    else                                    j_next = j_prev + TW'(1);
    xop  = (j_next == '0) ? YW'(x_in) : (x_prev << 1);
    s_in = start ? '0 : s_prev;
    c_in = start ? '0 : c_prev;
  end

  for (genvar b = 0; b < YW; b++) begin : g_cell
    bp_cell u_cell (
      .xb   (xop[b]),
      .cb   (cbit),
      .s_in (s_in[b]),
      .c_in (c_in[b]),
      .s_out(s_out[b]),
      .c_out(cy[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
      x_q <= '0;
      j_q <= '0;
    end else begin
      j_q <= j_next;
      if (clear) begin
        s_q <= '0;
        c_q <= '0;
        x_q <= '0;
      end else begin
        s_q <= s_out;
        c_q <= {cy[YW-2:0], 1'b0};
        x_q <= xop;
      end
    end
  end

endmodule
