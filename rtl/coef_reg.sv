// coef_reg: coefficient register RA_j of a multiplier cell.
//
// The k coefficient registers of the convolver are linked into one long
// ("meandering") shift register through which the coefficients are
// loaded bit-serially at initialisation. While `shift` is high, the
// register moves one bit per clock towards its LSB: `sin` enters at bit
// W-1 and bit 0 leaves on `sout` for the next register in the chain.
// After W shifts of a word fed LSB first the register holds that word.
// While `shift` is low the register holds its value, which the
// multiplier reads in parallel on `a`.
//
// Serial loading through a chain follows the published design; the shift
// direction, the LSB-first bit order and the enable are this design's
// choices. The register is cleared by reset.
module coef_reg #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sin,
  output logic         sout,
  output logic [W-1:0] a
);

  always_ff @(posedge clk) begin
    if (!rst_n) a <= '0;
    else if (shift) a <= {sin, a[W-1:1]};
  end

  assign sout = a[0];

endmodule
