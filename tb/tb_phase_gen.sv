// tb_phase_gen: checks the control-signal generator for alpha = 4 (the
// default) and alpha = 2: C1 in the first cycle after reset, exactly one
// signal high in every cycle, and Ci high in cycle i of every sample
// period, i.e. each signal repeats with period alpha.
module tb_phase_gen;

  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] ph4;
  logic [1:0] ph2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_gen u_dut4 (.clk, .rst_n, .phase(ph4));
  phase_gen #(.ALPHA(2)) u_dut2 (.clk, .rst_n, .phase(ph2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      chk(ph4 == 4'(1 << (t % 4)), $sformatf("alpha=4 cycle %0d: %b", t, ph4));
      chk(ph2 == 2'(1 << (t % 2)), $sformatf("alpha=2 cycle %0d: %b", t, ph2));
      @(negedge clk);
    end
    // a second reset restarts the sequence at C1
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    chk(ph4 == 4'b0001, "C1 after second reset");
    @(negedge clk);
    chk(ph4 == 4'b0010, "C2 after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
