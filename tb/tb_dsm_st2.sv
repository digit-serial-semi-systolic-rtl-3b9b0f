// tb_dsm_st2: checks the multiplier's second stage. In every C_alpha
// cycle random sum and carry vectors u, v and a random C_A carry are
// offered (with different random values in the other cycles, which must
// be ignored). Digit i of (u + v + cin) mod 2^W must appear on ph in
// cycle t + 2 + i, t being the C_alpha cycle.
module tb_dsm_st2;

  localparam int W = 16, D = 4, ALPHA = W / D;

  logic clk = 1'b0;
  logic rst_n;
  logic [ALPHA-1:0] phase;
  logic [W-1:0] u, v;
  logic cin;
  logic [D-1:0] ph;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_gen #(.ALPHA(ALPHA)) u_pg (.clk, .rst_n, .phase);
  dsm_st2 #(.W(W), .D(D)) u_dut (.clk, .rst_n, .phase, .u, .v, .cin, .ph);

  initial begin
    logic [W-1:0] exp_w [200];
    rst_n = 1'b0;
    u = '0;
    v = '0;
    cin = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // cycle t = 0 is the first C1 cycle; the word loaded in cycle
    // k*ALPHA - 1 (C_alpha) has digit i on ph in cycle k*ALPHA + 1 + i
    for (int t = 0; t < 400; t++) begin
      u = W'($urandom);
      v = W'($urandom);
      cin = 1'($urandom);
      if (t % 8 == 3) begin
        u = '1;   // force a carry through the whole word now and then
        v = '0;
        cin = 1'b1;
      end
      #1;
      if (t >= ALPHA + 1) begin
        int k, i;
        k = (t - 1) / ALPHA;
        i = (t - 1) % ALPHA;
        checks++;
        if (ph != exp_w[k][i*D +: D]) begin
          failures++;
          $display("FAIL cycle %0d: digit %0d = %h expected %h", t, i, ph, exp_w[k][i*D +: D]);
        end
      end
      if (phase[ALPHA-1]) exp_w[(t + 1) / ALPHA] = u + v + W'(cin);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
