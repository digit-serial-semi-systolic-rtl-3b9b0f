// tb_adder_tree: checks the pipeline adder tree for K = 4 (two levels,
// all cells in ADD mode), K = 3 (one cell in L mode) and K = 6 (L-mode
// cell on level 2), with W = 16, D = 4. Each input carries a stream of
// random 32-bit values in the multipliers' format (low-order LSD in a C2
// cycle, high-order digits one sample period later). The sum of the K
// values of word m (mod 2^32) must start on yl LEVELS cycles after the
// inputs' LSD, LEVELS = floor(log2(K-1)) + 1.
module tb_adder_tree;
  import dsc_pkg::*;

  localparam int NC = 3;
  localparam int CK [NC] = '{4, 3, 6};
  localparam int D = 4, ALPHA = 4, W = D * ALPHA, NWORDS = 80;

  logic clk = 1'b0;
  logic rst_n;
  logic [ALPHA-1:0] phase;
  int   checks [NC];
  int   failures [NC];
  logic done [NC];

  always #5 clk = ~clk;

  phase_gen #(.ALPHA(ALPHA)) u_pg (.clk, .rst_n, .phase);

  initial begin
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int K = CK[c];
    localparam int LEV = tree_levels(K);
    logic [D-1:0] pl [K];
    logic [D-1:0] ph [K];
    logic [D-1:0] yl, yh;

    adder_tree #(.D(D), .ALPHA(ALPHA), .K(K)) u_dut (.clk, .rst_n, .phase, .pl, .ph, .yl, .yh);

    initial begin
      logic [2*W-1:0] pv [NWORDS][K];
      logic [2*W-1:0] got [NWORDS];
      logic [2*W-1:0] expv;
      checks[c] = 0;
      failures[c] = 0;
      done[c] = 1'b0;
      for (int j = 0; j < K; j++) begin
        pl[j] = '0;
        ph[j] = '0;
      end
      for (int m = 0; m < NWORDS; m++) begin
        for (int j = 0; j < K; j++) pv[m][j] = (2*W)'({$urandom, $urandom});
        got[m] = '0;
      end
      wait (rst_n);
      @(negedge clk);
      while (!phase[1]) @(negedge clk);
      for (int rel = 0; rel < (NWORDS + 2) * ALPHA + LEV; rel++) begin
        int m, i, q;
        m = rel / ALPHA;
        i = rel % ALPHA;
        for (int j = 0; j < K; j++) begin
          pl[j] = (m < NWORDS) ? pv[m][j][i*D +: D] : '0;
          ph[j] = (m >= 1 && m - 1 < NWORDS) ? pv[m-1][j][W + i*D +: D] : '0;
        end
        #1;
        q = rel - LEV;
        if (q >= 0 && q / ALPHA < NWORDS) got[q / ALPHA][(q % ALPHA)*D +: D] = yl;
        q = rel - LEV - ALPHA;
        if (q >= 0 && q / ALPHA < NWORDS) got[q / ALPHA][W + (q % ALPHA)*D +: D] = yh;
        @(negedge clk);
      end
      for (int m = 0; m < NWORDS; m++) begin
        expv = '0;
        for (int j = 0; j < K; j++) expv += pv[m][j];
        checks[c]++;
        if (got[m] != expv) begin
          failures[c]++;
          if (failures[c] < 8) $display("FAIL K=%0d word %0d: %h expected %h", K, m, got[m], expv);
        end
      end
      done[c] = 1'b1;
    end
  end

  initial begin
    int tc, tf;
    repeat (2) @(posedge clk);  // let the drivers clear their flags first
    for (int c = 0; c < NC; c++) wait (done[c]);
    tc = 0;
    tf = 0;
    for (int c = 0; c < NC; c++) begin
      tc += checks[c];
      tf += failures[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

endmodule
