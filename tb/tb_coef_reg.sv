// tb_coef_reg: checks the coefficient register and the chaining of two of
// them. Two random words are shifted in LSB first (the first word fed
// ends up in the second register), the parallel outputs are compared, and
// the registers must hold their contents while shift is low.
module tb_coef_reg;

  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n, shift, sin, s1, s2;
  logic [W-1:0] a1, a2;
  logic [W-1:0] w0, w1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coef_reg #(.W(W)) u_ra1 (.clk, .rst_n, .shift, .sin,      .sout(s1), .a(a1));
  coef_reg #(.W(W)) u_ra2 (.clk, .rst_n, .shift, .sin(s1),  .sout(s2), .a(a2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    shift = 1'b0;
    sin = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(a1 == 0 && a2 == 0, "cleared by reset");
    for (int rep = 0; rep < 8; rep++) begin
      w0 = W'($urandom);
      w1 = W'($urandom);
      for (int b = 0; b < 2 * W; b++) begin
        shift = 1'b1;
        sin = (b < W) ? w0[b] : w1[b-W];
        @(negedge clk);
      end
      shift = 1'b0;
      sin = 1'b1;
      chk(a2 == w0, $sformatf("RA2 %h expected %h", a2, w0));
      chk(a1 == w1, $sformatf("RA1 %h expected %h", a1, w1));
      chk(s2 == w0[0], "chain output is the LSB of the last register");
      repeat (5) @(negedge clk);
      chk(a1 == w1 && a2 == w0, "hold while shift is low");
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
