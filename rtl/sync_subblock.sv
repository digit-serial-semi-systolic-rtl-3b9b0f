// sync_subblock: subblock L_ji of a synchronisation block S_j.
//
// Holds digit i of the words passing through multiplier cell MC_j and
// re-issues it one sample period (alpha clock cycles) later. It is double
// buffered: section L' captures the digit at the end of the cycle in which
// Ci is high (`cap`), section L'' takes it over from L' at the end of the
// following cycle, when C_((i mod alpha)+1) is high (`xfer`), and keeps it
// for the rest of the sample period. When Ci is high again (`drive`), the
// output section B drives the stored digit while L' is already capturing
// the same digit of the next word.
//
// In the published design the B section is a set of three-state buffers on a bus
// shared by the alpha subblocks. Here B is an AND gate: `dout` is zero
// while `drive` is low, so the subblocks' outputs can be ORed onto the
// bus. Its control strobes Ci' are realised as clock enables
// of one common clock. Needs alpha >= 2 (with alpha = 1 the L' and L''
// transfers would coincide).
module sync_subblock #(
  parameter int D = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cap,    // Ci: load L'
  input  logic         xfer,   // C_((i mod alpha)+1): move L' to L''
  input  logic         drive,  // Ci: enable output section B
  input  logic [D-1:0] di,
  output logic [D-1:0] dout
);

  logic [D-1:0] l1, l2;  // L' and L''

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l1 <= '0;
      l2 <= '0;
    end else begin
      if (cap)  l1 <= di;
      if (xfer) l2 <= l1;
    end
  end

  assign dout = drive ? l2 : '0;

endmodule
