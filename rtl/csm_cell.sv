// csm_cell: basic cell of the carry-save array multiplier.
//
// The cell forms the bit product x*a and adds it to a sum bit coming
// from the row above (si) and a carry bit (ci) with a full adder:
//   so = si ^ ci ^ (x & a)
//   co = si&ci | x&a&si | x&a&ci
// The carry output has double the weight of the sum output. The cell is
// purely combinational; the carry equation is the one the design is
// specified by, the sum is the matching full-adder sum.
module csm_cell (
  input  logic x,   // bit of operand X (passed across a row)
  input  logic a,   // bit of operand A (passed down a column)
  input  logic si,  // sum in
  input  logic ci,  // carry in
  output logic so,  // sum out
  output logic co   // carry out (double weight)
);

  logic p;

  always_comb begin
    p  = x & a;
    so = si ^ ci ^ p;
    co = (si & ci) | (p & si) | (p & ci);
  end

endmodule
