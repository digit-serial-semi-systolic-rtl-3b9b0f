// tb_adder_cell: checks cell A with D = 4 and alpha = 4, driven by C2 as
// on the first tree level. Two random 32-bit two's complement operand
// streams are fed as the multipliers deliver them: low-order digits in
// the four cycles starting with C2, high-order digits in the four cycles
// after. In ADD mode the sum (mod 2^32) must come out one cycle later in
// the same format; operands with all-ones low words force the carry from
// the low to the high word. A second cell in L mode must output operand a
// one cycle late.
module tb_adder_cell;

  localparam int D = 4, ALPHA = 4, W = D * ALPHA, NWORDS = 120;

  logic clk = 1'b0;
  logic rst_n;
  logic [ALPHA-1:0] phase;
  logic [D-1:0] al, ah, bl, bh, ol, oh, ml, mh;
  int checks = 0, failures = 0, n_wordcarry = 0;

  always #5 clk = ~clk;

  phase_gen #(.ALPHA(ALPHA)) u_pg (.clk, .rst_n, .phase);
  adder_cell #(.D(D)) u_add (
    .clk, .rst_n, .add_mode(1'b1), .c_first(phase[1]), .al, .ah, .bl, .bh, .ol, .oh
  );
  adder_cell #(.D(D)) u_lat (
    .clk, .rst_n, .add_mode(1'b0), .c_first(phase[1]), .al, .ah, .bl, .bh, .ol(ml), .oh(mh)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [2*W-1:0] pa [NWORDS];
    logic [2*W-1:0] pb [NWORDS];
    logic [2*W-1:0] got [NWORDS];
    logic [D-1:0]   pal, pah;
    rst_n = 1'b0;
    {al, ah, bl, bh} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NWORDS; m++) begin
      pa[m] = (2*W)'({$urandom, $urandom});
      pb[m] = (2*W)'({$urandom, $urandom});
      if (m % 5 == 2) begin
        pa[m][W-1:0] = '1;
        pb[m][W-1:0] = W'(1 + $urandom % 3);
      end
      if (pa[m][W-1:0] + pb[m][W-1:0] < pa[m][W-1:0]) n_wordcarry++;
      got[m] = '0;
    end
    while (!phase[1]) @(negedge clk);
    pal = '0;
    pah = '0;
    for (int rel = 0; rel < (NWORDS + 2) * ALPHA; rel++) begin
      int m, i, q;
      m = rel / ALPHA;
      i = rel % ALPHA;
      al = (m < NWORDS) ? pa[m][i*D +: D] : '0;
      bl = (m < NWORDS) ? pb[m][i*D +: D] : '0;
      ah = (m >= 1 && m - 1 < NWORDS) ? pa[m-1][W + i*D +: D] : '0;
      bh = (m >= 1 && m - 1 < NWORDS) ? pb[m-1][W + i*D +: D] : '0;
      #1;
      q = rel - 1;
      if (q >= 0 && q / ALPHA < NWORDS) got[q / ALPHA][(q % ALPHA)*D +: D] = ol;
      q = rel - ALPHA - 1;
      if (q >= 0 && q / ALPHA < NWORDS) got[q / ALPHA][W + (q % ALPHA)*D +: D] = oh;
      if (rel >= 1) chk(ml == pal && mh == pah, $sformatf("L mode in cycle %0d", rel));
      pal = al;
      pah = ah;
      @(negedge clk);
    end
    for (int m = 0; m < NWORDS; m++)
      chk(got[m] == pa[m] + pb[m], $sformatf("%h + %h = %h, got %h", pa[m], pb[m],
          pa[m] + pb[m], got[m]));
    chk(n_wordcarry > 0, "low-to-high word carry exercised");
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
