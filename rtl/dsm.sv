// dsm: digit-serial two's complement multiplier (DSM).
//
// Multiplies a parallel W-bit coefficient A by a stream of W-bit words X
// that arrive D bits per clock, least significant digit first, with no
// gap between words. Each product is 2W bits wide and leaves as two
// digit streams: the low-order word on `pl` and the high-order word on
// `ph`.
//
// Stage ST1 is a W x D carry-save array of csm_cell (a folded W x W
// array). Row r multiplies A by bit r of the current digit; a row's sum
// outputs move one column towards the LSB for the next row, its carries
// go straight down, and the sum of the most significant column is also
// fed back into that column (sign extension). The LSB sum of each row is
// one product bit. The sums and carries of the last row are latched in
// L_R and feed the first row in the next cycle; in the first cycle of a
// word (C1) the array inputs are forced to zero instead, which starts a
// new product. In the last cycle of a word (C_alpha) the last row sees
// the sign bit of X, whose weight is negative: XOR gates invert A for
// that row and the extra cell C_A adds the sign bit at the row's LSB,
// which together subtract A*2^(W-1). The D product bits of each cycle go
// to L_L and appear on `pl` one cycle later. The last-row sums and
// carries of the C_alpha cycle, plus the C_A carry, are handed to ST2
// (dsm_st2), which adds them digit by digit and produces the high-order
// word on `ph`.
//
// Timing, for a word whose digit i is on `x` while Ci is high in cycle
// T+i-1: low digit i is on `pl` in cycle T+i, high digit i on `ph` in
// cycle T+ALPHA+i. A new word can start every ALPHA cycles.
//
// The array, C_A, the XOR inversion, L_R, L_L and the two-stage pipeline
// follow the published design. Realising the reset of L_R as a C1-controlled
// gate on the array inputs is this design's choice.
module dsm #(
  parameter int W = 16,
  parameter int D = 4,
  localparam int ALPHA = W / D
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ALPHA-1:0] phase,  // C1..C_alpha, one-hot
  input  logic [W-1:0]     a,      // coefficient, parallel
  input  logic [D-1:0]     x,      // current digit of X
  output logic [D-1:0]     pl,     // low-order product digit (L_L)
  output logic [D-1:0]     ph      // high-order product digit (L_H)
);

  logic [W-1:0] lr_s, lr_c;               // L_R
  logic [W-1:0] s_last, c_last_row;       // sums and carries of the last row
  logic [D-1:0] row_bit;                  // LSB sum of each row
  logic         c_first, c_last;
  logic         so_ca, co_ca;             // cell C_A
  logic [D-1:0] low_digit;

  assign c_first = phase[0];
  assign c_last  = phase[ALPHA-1];

  // Row r: inputs are the previous row's sums, shifted one column towards
  // the LSB and sign-extended, and its carries, straight down. Row 0 takes
  // them from L_R, or zero in the first cycle of a word.
  for (genvar r = 0; r < D; r++) begin : g_row
    logic [W-1:0] si, ci, so, co, a_row;
    if (r == 0) begin : g_first
      assign si = c_first ? '0 : {lr_s[W-1], lr_s[W-1:1]};
      assign ci = c_first ? '0 : lr_c;
    end else begin : g_next
      assign si = {g_row[r-1].so[W-1], g_row[r-1].so[W-1:1]};
      assign ci = g_row[r-1].co;
    end
    // XOR gates: the last row subtracts A while the sign bit of X is in it
    if (r == D - 1) begin : g_inv
      assign a_row = a ^ {W{c_last}};
    end else begin : g_pass
      assign a_row = a;
    end
    for (genvar c = 0; c < W; c++) begin : g_col
      csm_cell u_cell (
        .x (x[r]),
        .a (a_row[c]),
        .si(si[c]),
        .ci(ci[c]),
        .so(so[c]),
        .co(co[c])
      );
    end
    assign row_bit[r] = so[0];
  end

  assign s_last     = g_row[D-1].so;
  assign c_last_row = g_row[D-1].co;

  // Cell C_A: adds the sign bit of X at the LSB of the last row.
  always_comb begin
    so_ca = (c_last & x[D-1]) ^ row_bit[D-1];
    co_ca = c_last & x[D-1] & row_bit[D-1];
    low_digit = row_bit;
    low_digit[D-1] = so_ca;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lr_s <= '0;
      lr_c <= '0;
      pl   <= '0;
    end else begin
      lr_s <= s_last;
      lr_c <= c_last_row;
      pl   <= low_digit;
    end
  end

  dsm_st2 #(.W(W), .D(D)) u_st2 (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase),
    .u    ({s_last[W-1], s_last[W-1:1]}),
    .v    (c_last_row),
    .cin  (co_ca),
    .ph   (ph)
  );

  initial begin
    assert (W % D == 0) else $error("W must be a multiple of D");
  end

endmodule
