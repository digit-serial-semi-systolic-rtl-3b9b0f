// sync_block: synchronisation block S_j of multiplier cell MC_j.
//
// Delays the digit-serial input stream by exactly one sample period
// (ALPHA cycles) so that the word held by MC_j is passed on to MC_(j+1)
// one sample period later, as in a systolic shift of X by one cell per
// word. It consists of ALPHA sync_subblock instances; subblock i stores
// digit i of each word and drives the shared output bus while Ci is high,
// so all multipliers of the convolver see digit i in the same cycle.
//
// Interface: `di` is the input digit, `dout` the delayed digit, sent both
// to the cell's multiplier and to the next cell. Timing: a digit present
// on `di` in cycle t appears on `dout` in cycle t + ALPHA. The bus is an
// OR of the gated subblock outputs (the published design uses three-state
// buffers); exactly one subblock drives it in each cycle.
module sync_block #(
  parameter int D = 4,
  parameter int ALPHA = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ALPHA-1:0] phase,
  input  logic [D-1:0]     di,
  output logic [D-1:0]     dout
);

  logic [D-1:0] bus [ALPHA];

  for (genvar i = 0; i < ALPHA; i++) begin : g_sub
    sync_subblock #(.D(D)) u_l (
      .clk  (clk),
      .rst_n(rst_n),
      .cap  (phase[i]),
      .xfer (phase[(i + 1) % ALPHA]),
      .drive(phase[i]),
      .di   (di),
      .dout (bus[i])
    );
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < ALPHA; i++) dout |= bus[i];
  end

  initial begin
    assert (ALPHA >= 2) else $error("sync_block needs at least two digits per word");
  end

endmodule
