// dsc: digit-serial semi-systolic convolver (type F).
//
// Computes the convolution Y_i = A_1*X_i + A_2*X_(i+1) + ... + A_K*X_(i+K-1)
// of a stream of W-bit two's complement samples X with K programmable
// coefficients A. Samples enter digit-serially, D bits per clock, least
// significant digit first, one word every ALPHA = W/D cycles with no gaps.
// Each result is a 2W-bit two's complement word, delivered as a low-order
// digit stream on `yl` and, ALPHA cycles later, a high-order digit stream
// on `yh`.
//
// K multiplier cells MC_1..MC_K form a chain. Each cell delays the sample
// stream by one sample period and passes it on, so that in any sample
// period MC_j multiplies sample X_(m-j+1) by its coefficient; all cells
// see digit i of their samples in the same cycle (when Ci is high). The
// products are summed by a pipeline adder tree of A cells. Coefficients
// are loaded bit-serially through the chain of coefficient registers:
// with `coef_shift` high, feed A_1, A_2, ..., A_K one after another, each
// LSB first, K*W clocks in all; RA_j then holds A_(K-j+1).
//
// Timing: `phase` brings out the control signals C1..C_alpha; C1
// (phase[0]) is high in the first cycle after reset and every ALPHA
// cycles after. Present the LSD of each sample in a C1 cycle. If the LSD
// of X_1 is on `x` in cycle t, the LSD of Y_1 is on `yl` in cycle t + Z
// with Z = ALPHA*K + floor(log2(K-1)) + 2, and the LSD of its high-order
// word on `yh` in cycle t + Z + ALPHA; Y_(i+1) follows ALPHA cycles after
// Y_i. The result is exact while the coefficients are at most
// Amax = W - floor(log2(K-1)) - 1 bits wide (two's complement).
//
// Default parameters are the published design's main example (W = 16, D = 4,
// K = 4). Its structure, control-signal scheme and latency follow the
// published design; port names, the reset and the coefficient bit order are this
// design's choices.
module dsc
  import dsc_pkg::*;
#(
  parameter int W = 16,
  parameter int D = 4,
  parameter int K = 4,
  localparam int ALPHA = W / D
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             coef_shift,  // shift the coefficient chain
  input  logic             coef_in,     // serial coefficient input
  output logic             coef_out,    // end of the coefficient chain
  input  logic [D-1:0]     x,           // sample digit, LSD first
  output logic [D-1:0]     yl,          // low-order result digit
  output logic [D-1:0]     yh,          // high-order result digit
  output logic [ALPHA-1:0] phase        // control signals C1..C_alpha
);

  logic [D-1:0] xs   [K+1];   // digit stream entering each cell
  logic         cs   [K+1];   // coefficient chain
  logic [D-1:0] pl   [K];
  logic [D-1:0] ph   [K];

  phase_gen #(.ALPHA(ALPHA)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase)
  );

  assign xs[0] = x;
  assign cs[0] = coef_in;

  for (genvar j = 0; j < K; j++) begin : g_mc
    mult_cell #(.W(W), .D(D)) u_mc (
      .clk       (clk),
      .rst_n     (rst_n),
      .phase     (phase),
      .xi        (xs[j]),
      .xo        (xs[j+1]),
      .coef_shift(coef_shift),
      .coef_in   (cs[j]),
      .coef_out  (cs[j+1]),
      .pl        (pl[j]),
      .ph        (ph[j])
    );
  end

  assign coef_out = cs[K];

  adder_tree #(.D(D), .ALPHA(ALPHA), .K(K)) u_tree (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase),
    .pl   (pl),
    .ph   (ph),
    .yl   (yl),
    .yh   (yh)
  );

endmodule
