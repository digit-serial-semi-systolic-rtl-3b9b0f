// tb_csm_cell: exhaustive test of the carry-save multiplier cell. For all
// 16 input combinations, 2*co + so must equal x*a + si + ci.
module tb_csm_cell;

  logic x, a, si, ci, so, co;
  int checks = 0, failures = 0;

  csm_cell u_dut (.x, .a, .si, .ci, .so, .co);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x, a, si, ci} = 4'(v);
      #1;
      checks++;
      if (2 * int'(co) + int'(so) != int'(x) * int'(a) + int'(si) + int'(ci)) begin
        failures++;
        $display("FAIL: x=%b a=%b si=%b ci=%b -> so=%b co=%b", x, a, si, ci, so, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
