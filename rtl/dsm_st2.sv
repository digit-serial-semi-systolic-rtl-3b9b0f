// dsm_st2: second pipeline stage (ST2) of the digit-serial multiplier.
//
// When the array of stage ST1 has consumed the last digit of X, the
// product's high-order word is still held in carry-save form: a vector of
// sums, a vector of carries and one extra carry from cell C_A. At the end
// of that cycle (control signal C_alpha) they are captured in L_S (sums
// and carries) and L_SC (the C_A carry). During the next alpha cycles a
// D-bit ripple-carry adder adds them one digit at a time, LSD first:
// mux_PS picks digit i of both vectors while Ci is high, MUX_C gives the
// adder L_SC as carry-in in the first cycle (C1) and the carry latched in
// L_C otherwise. Each result digit is latched into L_H and so appears on
// `ph` one cycle later. Because L_S holds its word for a whole sample
// period, ST1 can already multiply the next word meanwhile.
//
// Interface: `u` and `v` are the W-bit two's complement vectors of
// sums (already shifted and sign-extended by the array) and carries, `cin`
// the C_A carry; all three are sampled when phase[ALPHA-1] is high. `ph`
// carries digit i of the high word in the cycle after the one in which Ci
// is high. The structure follows the published design; making mux_PS a one-hot
// AND-OR selector and the synchronous reset are this design's choices.
module dsm_st2 #(
  parameter int W = 16,
  parameter int D = 4,
  localparam int ALPHA = W / D
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ALPHA-1:0] phase,
  input  logic [W-1:0]     u,
  input  logic [W-1:0]     v,
  input  logic             cin,
  output logic [D-1:0]     ph
);

  logic [W-1:0] ls_u, ls_v;   // L_S
  logic         lsc;          // L_SC
  logic         lc;           // L_C
  logic [D-1:0] du, dv;       // mux_PS outputs
  logic         c_rca;        // MUX_C output
  logic [D-1:0] sum;
  logic         cout;

  // mux_PS: digit selected by the one-hot control signals
  always_comb begin
    du = '0;
    dv = '0;
    for (int i = 0; i < ALPHA; i++) begin
      if (phase[i]) begin
        du |= ls_u[i*D +: D];
        dv |= ls_v[i*D +: D];
      end
    end
    c_rca = phase[0] ? lsc : lc;
  end

  digit_rca #(.D(D)) u_rca (.a(du), .b(dv), .ci(c_rca), .s(sum), .co(cout));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ls_u <= '0;
      ls_v <= '0;
      lsc  <= 1'b0;
      lc   <= 1'b0;
      ph   <= '0;
    end else begin
      if (phase[ALPHA-1]) begin
        ls_u <= u;
        ls_v <= v;
        lsc  <= cin;
      end
      lc <= cout;
      ph <= sum;
    end
  end

endmodule
