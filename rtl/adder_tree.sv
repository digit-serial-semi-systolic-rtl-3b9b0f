// adder_tree: multilevel pipeline adder tree of the convolver.
//
// Sums the K products delivered by the multiplier cells, each as a
// low-order and a high-order digit stream, into one 2W-bit result that
// leaves the same way (yl, yh). Level 1 has ceil(K/2) A cells (adder_cell)
// fed by neighbouring multiplier outputs, level l+1 has ceil(n/2) cells
// fed by the n cells of level l, down to a single cell. Every level adds
// one clock cycle, so the tree takes floor(log2(K-1)) + 1 cycles. Where a
// level has an odd number of inputs, the last cell is set to L mode and
// only delays its single input by one cycle, which keeps all branches in
// step. The cells of level l are driven by control signal C_(l+1)
// (indices modulo ALPHA): level 1 by C2, because the multipliers deliver
// the LSD of a product one cycle after their C1 input digit.
//
// Interface: pl[j], ph[j] are the low and high product digits of
// multiplier cell j+1. The LSD of the sum of products whose LSDs are on
// pl in cycle t is on yl in cycle t + LEVELS. The tree shape for powers
// of two, the balancing by L-mode cells and the control-signal rule follow
// the published design; the pairing of odd inputs is this design's choice, and
// the cell modes are fixed by K at elaboration rather than set at run time.
module adder_tree
  import dsc_pkg::*;
#(
  parameter int D = 4,
  parameter int ALPHA = 4,
  parameter int K = 4,
  localparam int LEVELS = tree_levels(K)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ALPHA-1:0] phase,
  input  logic [D-1:0]     pl [K],
  input  logic [D-1:0]     ph [K],
  output logic [D-1:0]     yl,
  output logic [D-1:0]     yh
);

  // node_l[l][n], node_h[l][n]: output n of level l (level 0: the inputs)
  logic [D-1:0] node_l [LEVELS+1][K];
  logic [D-1:0] node_h [LEVELS+1][K];

  for (genvar n = 0; n < K; n++) begin : g_in
    assign node_l[0][n] = pl[n];
    assign node_h[0][n] = ph[n];
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int NIN  = tree_nodes(K, l - 1);
    localparam int NOUT = tree_nodes(K, l);
    for (genvar n = 0; n < K; n++) begin : g_node
      if (n < NOUT) begin : g_cell
        localparam bit PAIR = (2 * n + 1 < NIN);
        localparam int BI   = PAIR ? 2 * n + 1 : 2 * n;
        adder_cell #(.D(D)) u_a (
          .clk     (clk),
          .rst_n   (rst_n),
          .add_mode(PAIR),
          .c_first (phase[l % ALPHA]),
          .al      (node_l[l-1][2*n]),
          .ah      (node_h[l-1][2*n]),
          .bl      (PAIR ? node_l[l-1][BI] : '0),
          .bh      (PAIR ? node_h[l-1][BI] : '0),
          .ol      (node_l[l][n]),
          .oh      (node_h[l][n])
        );
      end else begin : g_none
        assign node_l[l][n] = '0;
        assign node_h[l][n] = '0;
      end
    end
  end

  assign yl = node_l[LEVELS][0];
  assign yh = node_h[LEVELS][0];

  initial begin
    assert (K >= 2) else $error("adder_tree needs at least two inputs");
  end

endmodule
