// tb_mult_cell: checks multiplier cell MC_j (W = 16, D = 4). A random
// coefficient is shifted in bit-serially and a second one after it, the
// first must then appear on coef_out bit by bit. Then a continuous stream
// of random signed words is fed in from a C1 cycle t0: the stream must
// leave on xo one sample period later, and for word m (LSD in cycle
// t0 + 4m) the low-order product digits must be on pl in cycles
// t0 + 4m + 5 .. t0 + 4m + 8 and the high-order digits on ph four cycles
// after that, matching A*X computed as an integer.
module tb_mult_cell;

  localparam int W = 16, D = 4, ALPHA = W / D, NWORDS = 100;

  logic clk = 1'b0;
  logic rst_n;
  logic [ALPHA-1:0] phase;
  logic [D-1:0] xi, xo, pl, ph;
  logic coef_shift, coef_in, coef_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_gen #(.ALPHA(ALPHA)) u_pg (.clk, .rst_n, .phase);
  mult_cell #(.W(W), .D(D)) u_dut (
    .clk, .rst_n, .phase, .xi, .xo, .coef_shift, .coef_in, .coef_out, .pl, .ph
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [W-1:0]   a0, a1;
    logic [W-1:0]   xs [NWORDS];
    logic [D-1:0]   hist [$];
    logic [2*W-1:0] got [NWORDS];
    logic [2*W-1:0] expv;
    rst_n = 1'b0;
    coef_shift = 1'b0;
    coef_in = 1'b0;
    xi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    a0 = W'($urandom);
    a1 = W'($urandom);
    for (int b = 0; b < 2 * W; b++) begin
      coef_shift = 1'b1;
      coef_in = (b < W) ? a0[b] : a1[b-W];
      #1;
      if (b >= W) chk(coef_out == a0[b-W], $sformatf("coef_out bit %0d", b - W));
      @(negedge clk);
    end
    coef_shift = 1'b0;
    for (int m = 0; m < NWORDS; m++) begin
      xs[m] = W'($urandom);
      if (m % 9 == 4) xs[m] = {1'b1, {(W-1){1'b0}}};
      got[m] = '0;
    end
    while (!phase[0]) @(negedge clk);
    for (int rel = 0; rel < (NWORDS + 3) * ALPHA; rel++) begin
      int q;
      xi = (rel < NWORDS * ALPHA) ? xs[rel / ALPHA][(rel % ALPHA)*D +: D] : D'($urandom);
      #1;
      if (rel >= ALPHA) chk(xo == hist[rel - ALPHA], $sformatf("xo in cycle %0d", rel));
      hist.push_back(xi);
      q = rel - ALPHA - 1;
      if (q >= 0 && q / ALPHA < NWORDS) got[q / ALPHA][(q % ALPHA)*D +: D] = pl;
      q = rel - 2 * ALPHA - 1;
      if (q >= 0 && q / ALPHA < NWORDS) got[q / ALPHA][W + (q % ALPHA)*D +: D] = ph;
      @(negedge clk);
    end
    for (int m = 0; m < NWORDS; m++) begin
      expv = (2*W)'(longint'(signed'(a1)) * longint'(signed'(xs[m])));
      chk(got[m] == expv, $sformatf("%h * %h = %h, got %h", a1, xs[m], expv, got[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
