// tb_dsm: checks the digit-serial multiplier in two configurations,
// W = 16, D = 4 (the default) and W = 12, D = 3. A continuous stream of
// random signed words X (including the most negative value) is
// multiplied by a random signed coefficient A, changed every 16 words.
// For word m whose LSD is presented in cycle t0 + m*ALPHA, low-order
// product digit i must be on pl in cycle t0 + m*ALPHA + i + 1 and
// high-order digit i on ph in cycle t0 + (m+1)*ALPHA + i + 1; the 2W-bit
// product is compared with A*X computed as a 64-bit integer.
module tb_dsm;

  localparam int NC = 2;
  localparam int CW [NC] = '{16, 12};
  localparam int CD [NC] = '{4, 3};
  localparam int NWORDS = 120;

  logic clk = 1'b0;
  logic rst_n;
  int   checks [NC];
  int   failures [NC];
  logic done [NC];

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int W = CW[c], D = CD[c], ALPHA = W / D;
    logic [ALPHA-1:0] phase;
    logic [W-1:0]     a;
    logic [D-1:0]     x, pl, ph;

    phase_gen #(.ALPHA(ALPHA)) u_pg (.clk, .rst_n, .phase);
    dsm #(.W(W), .D(D)) u_dut (.clk, .rst_n, .phase, .a, .x, .pl, .ph);

    function automatic longint sx(input logic [W-1:0] v);
      return longint'(signed'(v));
    endfunction

    initial begin
      logic [W-1:0]   xs [NWORDS];
      logic [W-1:0]   as [NWORDS];
      logic [2*W-1:0] got [NWORDS];
      logic [2*W-1:0] expv;
      checks[c] = 0;
      failures[c] = 0;
      done[c] = 1'b0;
      a = '0;
      x = '0;
      for (int m = 0; m < NWORDS; m++) begin
        xs[m] = W'($urandom);
        if (m % 7 == 3) xs[m] = {1'b1, {(W-1){1'b0}}};
        if (m % 16 == 0) as[m] = W'($urandom);
        else as[m] = as[m-1];
        if (m == 32) as[m] = {1'b1, {(W-1){1'b0}}};
        got[m] = '0;
      end
      wait (rst_n);
      @(negedge clk);
      while (!phase[0]) @(negedge clk);
      for (int rel = 0; rel < (NWORDS + 2) * ALPHA; rel++) begin
        int m, i;
        m = rel / ALPHA;
        i = rel % ALPHA;
        if (m < NWORDS) begin
          x = xs[m][i*D +: D];
          a = as[m];
        end else begin
          x = '0;
        end
        #1;
        if (rel >= 1 && (rel - 1) / ALPHA < NWORDS)
          got[(rel - 1) / ALPHA][((rel - 1) % ALPHA)*D +: D] = pl;
        if (rel >= ALPHA + 1 && (rel - ALPHA - 1) / ALPHA < NWORDS)
          got[(rel - ALPHA - 1) / ALPHA][W + ((rel - ALPHA - 1) % ALPHA)*D +: D] = ph;
        @(negedge clk);
      end
      for (int m = 0; m < NWORDS; m++) begin
        expv = (2*W)'(sx(as[m]) * sx(xs[m]));
        checks[c]++;
        if (got[m] != expv) begin
          failures[c]++;
          if (failures[c] < 8)
            $display("FAIL W=%0d D=%0d: %h * %h = %h, got %h", W, D, as[m], xs[m], expv, got[m]);
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
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

endmodule
