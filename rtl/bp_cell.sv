// bp_cell: one cell of a folded bit-plane row.
//
// The cell multiplies one bit of the (already shifted) input word by the
// coefficient bit, which for single bits is an AND, and adds the product to
// the partial sum arriving in carry-save form (one sum bit, one carry bit of
// the same weight) with a full adder. The sum bit keeps its weight, the carry
// bit goes one position up in the next row.
//
// Purely combinational. The document names the cell and its function
// (multiply by a coefficient bit, add to the earlier partial products); the
// AND-plus-full-adder circuit is this design's choice.
module bp_cell (
  input  logic xb,     // operand bit at this weight
  input  logic cb,     // coefficient bit c_i^j
  input  logic s_in,   // incoming sum bit
  input  logic c_in,   // incoming carry bit
  output logic s_out,  // sum bit, same weight
  output logic c_out   // carry bit, next weight
);
  logic pp;

  always_comb begin
    pp    = xb & cb;
    s_out = s_in ^ c_in ^ pp;
    c_out = (s_in & c_in) | (pp & (s_in ^ c_in));
  end

endmodule
