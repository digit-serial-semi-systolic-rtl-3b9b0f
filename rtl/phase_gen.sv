// phase_gen: generator of the periodic control signals C1..C_alpha.
//
// A digit-serial word of alpha digits occupies alpha consecutive clock
// cycles (one sample period) with no gap between words, so every unit
// needs to know which digit of the word is on its inputs. Control signal
// Ci is high during the i-th clock cycle of each sample period only; the
// signals are produced here by a one-hot ring register, bit i-1 of
// `phase` being Ci.
//
// Interface: `phase[0]` (C1) is high in the first cycle after reset is
// released, then the one-hot bit rotates by one position per clock.
// Using a one-hot ring, and the synchronous active-low reset, are this
// implementation's choices; the published design specifies only the waveforms.
module phase_gen #(
  parameter int ALPHA = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [ALPHA-1:0] phase
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= ALPHA'(1);
    else phase <= (phase << 1) | (phase >> (ALPHA - 1));
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(phase));

endmodule
