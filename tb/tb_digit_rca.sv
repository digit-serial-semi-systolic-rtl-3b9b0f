// tb_digit_rca: exhaustive test of the 4-bit ripple-carry digit adder
// and a random test of a 6-bit one: {co, s} must equal a + b + ci.
module tb_digit_rca;

  logic [3:0] a4, b4, s4;
  logic [5:0] a6, b6, s6;
  logic       ci4, co4, ci6, co6;
  int checks = 0, failures = 0;

  digit_rca #(.D(4)) u_dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  digit_rca #(.D(6)) u_dut6 (.a(a6), .b(b6), .ci(ci6), .s(s6), .co(co6));

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      {ci6, a6, b6} = 13'($urandom);
      #1;
      checks += 2;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL: %h + %h + %b = %b%h", a4, b4, ci4, co4, s4);
      end
      if ({co6, s6} != 7'(a6) + 7'(b6) + 7'(ci6)) begin
        failures++;
        $display("FAIL: %h + %h + %b = %b%h", a6, b6, ci6, co6, s6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
