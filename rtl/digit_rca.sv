// digit_rca: D-bit ripple-carry adder, the digit adder used by the
// multiplier's second stage and by the A cells of the adder tree.
//
// Combinational: {co, s} = a + b + ci, built as a chain of full adders
// from bit 0 upwards so that it maps onto the ripple-carry structure.
module digit_rca #(
  parameter int D = 4
) (
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  input  logic         ci,
  output logic [D-1:0] s,
  output logic         co
);

  logic [D:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < D; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign co = c[D];

endmodule
