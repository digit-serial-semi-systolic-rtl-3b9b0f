// mult_cell: multiplier cell MC_j of the convolver.
//
// Combines the coefficient register RA_j (coef_reg), the synchronisation
// block S_j (sync_block) and the digit-serial multiplier DSM_j (dsm). The
// input digit stream is delayed by one sample period in S_j; the delayed
// stream goes both to DSM_j, which multiplies it by the coefficient held
// in RA_j, and out on `xo` to the next cell. The coefficient chain passes
// through RA_j from `coef_in` to `coef_out`.
//
// Timing: a word whose LSD is on `xi` in cycle t (a C1 cycle) is on `xo`
// from cycle t + ALPHA; the LSD of its product with the coefficient is on
// `pl` in cycle t + ALPHA + 1 and the LSD of the high-order word on `ph`
// in cycle t + 2*ALPHA + 1. The structure is that of the published design.
module mult_cell #(
  parameter int W = 16,
  parameter int D = 4,
  localparam int ALPHA = W / D
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ALPHA-1:0] phase,
  input  logic [D-1:0]     xi,
  output logic [D-1:0]     xo,
  input  logic             coef_shift,
  input  logic             coef_in,
  output logic             coef_out,
  output logic [D-1:0]     pl,
  output logic [D-1:0]     ph
);

  logic [W-1:0] a;

  coef_reg #(.W(W)) u_ra (
    .clk  (clk),
    .rst_n(rst_n),
    .shift(coef_shift),
    .sin  (coef_in),
    .sout (coef_out),
    .a    (a)
  );

  sync_block #(.D(D), .ALPHA(ALPHA)) u_s (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase),
    .di   (xi),
    .dout (xo)
  );

  dsm #(.W(W), .D(D)) u_dsm (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase),
    .a    (a),
    .x    (xo),
    .pl   (pl),
    .ph   (ph)
  );

endmodule
