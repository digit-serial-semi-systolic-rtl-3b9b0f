// dsc_driver: stimulus generator and result checker for the convolver.
//
// Drives a dsc instance through reset, bit-serial coefficient loading and
// a continuous stream of random samples, and checks every result word
// Y_i = A_1*X_i + ... + A_K*X_(i+K-1) against a reference computed here in
// 64-bit integer arithmetic. Results are read at the cycle the latency
// formula Z = ALPHA*K + floor(log2(K-1)) + 2 predicts, so a wrong latency
// or throughput shows up as wrong values. It also counts the results for
// which the root A cell had to pass a carry from the low-order to the
// high-order word (n_hcarry). The whole sequence is repeated
// for NSETS coefficient sets, reloading the coefficients without a reset.
//
// Coefficients are random two's complement numbers of Amax bits with the
// extreme values included; samples are random W-bit numbers, with the
// most negative value included.
module dsc_driver
  import dsc_pkg::*;
#(
  parameter int W = 16,
  parameter int D = 4,
  parameter int K = 4,
  parameter int NWORDS = 64,
  parameter int NSETS = 2,
  parameter int SEED = 1,
  localparam int ALPHA = W / D
) (
  input  logic             clk,
  output logic             rst_n,
  output logic             coef_shift,
  output logic             coef_in,
  output logic [D-1:0]     x,
  input  logic [D-1:0]     yl,
  input  logic [D-1:0]     yh,
  input  logic [ALPHA-1:0] phase,
  output logic             done,
  output int               checks,
  output int               failures,
  output int               n_neg_x,
  output int               n_neg_a,
  output int               n_reload,
  output int               n_hcarry
);

  localparam int Z    = latency_z(ALPHA, K);
  localparam int AMAX = amax(W, K);

  longint coef [K];
  longint xs   [NWORDS];

  function automatic longint sext(input longint v, input int bits);
    longint m;
    m = (longint'(1) << bits) - 1;
    v = v & m;
    if (bits < 64 && v[bits-1]) v = v | ~m;
    return v;
  endfunction

  function automatic longint rnd(input int bits);
    longint v;
    v = {$urandom, $urandom};
    case ($urandom % 8)
      0: v = longint'(1) << (bits - 1);          // most negative
      1: v = (longint'(1) << (bits - 1)) - 1;    // most positive
      default: ;
    endcase
    return sext(v, bits);
  endfunction

  function automatic longint mask2w(input longint v);
    if (2 * W >= 64) return v;
    return v & ((longint'(1) << (2 * W)) - 1);
  endfunction

  task automatic load_coefs();
    // A_1 first, each LSB first; RA_j ends up holding A_(K-j+1)
    for (int j = 0; j < K; j++) begin
      coef[j] = rnd(AMAX);
      if (coef[j] < 0) n_neg_a++;
    end
    for (int j = 0; j < K; j++) begin
      for (int b = 0; b < W; b++) begin
        @(negedge clk);
        coef_shift = 1'b1;
        coef_in    = coef[j][b];
      end
    end
    @(negedge clk);
    coef_shift = 1'b0;
    coef_in    = 1'b0;
  endtask

  // Align to a C1 cycle (called at a negedge).
  task automatic align();
    while (!phase[0]) @(negedge clk);
  endtask

  // One run: NWORDS random samples from a C1 cycle on. Result word m is
  // read in cycles rel = Z + m*ALPHA + i (low digit i) and
  // Z + (m+1)*ALPHA + i (high digit i), rel counted from the LSD of X_1.
  task automatic run_stream();
    int           rel;
    int           total;
    longint       ylo [NWORDS];
    longint       yhi [NWORDS];
    total = NWORDS * ALPHA + Z + 2 * ALPHA;
    for (int m = 0; m < NWORDS; m++) begin
      xs[m] = rnd(W);
      if (xs[m] < 0) n_neg_x++;
      ylo[m] = 0;
      yhi[m] = 0;
    end
    align();
    for (rel = 0; rel < total; rel++) begin
      // drive
      if (rel < NWORDS * ALPHA)
        x = D'(xs[rel / ALPHA] >> (D * (rel % ALPHA)));
      else
        x = '0;
      // sample (outputs are stable between clock edges)
      if (rel >= Z) begin
        int q;
        q = rel - Z;
        if (q / ALPHA < NWORDS) ylo[q / ALPHA] |= longint'(yl) << (D * (q % ALPHA));
      end
      if (rel >= Z + ALPHA) begin
        int q;
        q = rel - Z - ALPHA;
        if (q / ALPHA < NWORDS) begin
          yhi[q / ALPHA] |= longint'(yh) << (D * (q % ALPHA));
          if (q % ALPHA == ALPHA - 1 && q / ALPHA + K <= NWORDS) begin
            int m;
            longint exp_y, got;
            m = q / ALPHA;
            exp_y = 0;
            for (int j = 0; j < K; j++) exp_y += coef[j] * xs[m + j];
            got = ylo[m] | (yhi[m] << W);
            // Carry from the low to the high word in the root A cell: its
            // left input sums leaves 0..2^(LEVELS-1)-1 (leaf j is the
            // product of MC_(j+1), A_(K-j) * X_(m+K-j)), the right input
            // the rest.
            begin
              longint lsum, rsum, wm;
              lsum = 0;
              rsum = 0;
              wm = (longint'(1) << W) - 1;
              for (int j = 0; j < K; j++) begin
                if (j < (1 << (tree_levels(K) - 1))) lsum += coef[K-1-j] * xs[m + K - 1 - j];
                else rsum += coef[K-1-j] * xs[m + K - 1 - j];
              end
              if (((lsum & wm) + (rsum & wm)) > wm) n_hcarry++;
            end
            checks++;
            if (mask2w(got) != mask2w(exp_y)) begin
              failures++;
              if (failures < 10)
                $display("W=%0d D=%0d K=%0d: Y_%0d got %h expected %h", W, D, K, m + 1,
                         mask2w(got), mask2w(exp_y));
            end
          end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    coef_shift = 1'b0;
    coef_in = 1'b0;
    x = '0;
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_neg_x = 0;
    n_neg_a = 0;
    n_reload = 0;
    n_hcarry = 0;
    void'($urandom(SEED));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSETS; s++) begin
      load_coefs();
      if (s > 0) n_reload++;
      run_stream();
    end
    done = 1'b1;
  end

endmodule
