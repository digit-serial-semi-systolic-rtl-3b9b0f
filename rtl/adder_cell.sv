// adder_cell: cell A of the pipeline adder tree.
//
// In ADD mode (`add_mode` = 1) the cell is a double digit-serial adder for
// two 2W-bit products that arrive as a low-order digit stream (al, bl)
// and, ALPHA cycles later, a high-order digit stream (ah, bh). RCA_L adds
// the low digits and RCA_H the high digits; both run at once, RCA_H
// working on the previous word. In the first cycle of a word (`c_first`,
// the control signal Ci that drives this tree level) RCA_L starts with a
// zero carry, while RCA_H takes the final carry of the low-order word
// from LCL through MUX_H. In the other cycles each adder uses its own
// carry latch (LCL, LCH). The sums are registered, so results leave one
// cycle after the operands arrive.
//
// In L mode (`add_mode` = 0) the cell only passes operand a (al, ah) to
// its outputs one cycle later; the adder tree uses this to balance its
// branches when the number of taps is not a power of two.
//
// The two adders, the carry latches, MUX_H and the two modes follow the
// published design, which routes the modes with three-state buffers and latches;
// here they are a multiplexer in front of the output registers. LCL
// latches RCA_L's carry every cycle, so that it also carries between the
// digits of one word; the value it holds after the last digit is the
// word carry used by RCA_H.
module adder_cell #(
  parameter int D = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         add_mode,  // ADD/L*: 1 = ADD, 0 = L
  input  logic         c_first,   // first cycle of a low-order word
  input  logic [D-1:0] al,
  input  logic [D-1:0] ah,
  input  logic [D-1:0] bl,
  input  logic [D-1:0] bh,
  output logic [D-1:0] ol,
  output logic [D-1:0] oh
);

  logic         lcl, lch;
  logic         cil, cih;
  logic [D-1:0] sl, sh;
  logic         col, coh;

  assign cil = c_first ? 1'b0 : lcl;
  assign cih = c_first ? lcl : lch;    // MUX_H

  digit_rca #(.D(D)) u_rca_l (.a(al), .b(bl), .ci(cil), .s(sl), .co(col));
  digit_rca #(.D(D)) u_rca_h (.a(ah), .b(bh), .ci(cih), .s(sh), .co(coh));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lcl <= 1'b0;
      lch <= 1'b0;
      ol  <= '0;
      oh  <= '0;
    end else if (add_mode) begin
      lcl <= col;
      lch <= coh;
      ol  <= sl;
      oh  <= sh;
    end else begin
      ol  <= al;
      oh  <= ah;
    end
  end

endmodule
