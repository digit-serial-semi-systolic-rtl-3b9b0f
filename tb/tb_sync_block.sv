// tb_sync_block: checks that block S_j delays a continuous random digit
// stream by exactly one sample period, for alpha = 4 (default) and for
// alpha = 2, with the control signals produced by phase_gen.
module tb_sync_block;

  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] ph4;
  logic [1:0] ph2;
  logic [3:0] di4, do4;
  logic [3:0] di2, do2;
  logic [3:0] h4 [$], h2 [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_gen #(.ALPHA(4)) u_pg4 (.clk, .rst_n, .phase(ph4));
  phase_gen #(.ALPHA(2)) u_pg2 (.clk, .rst_n, .phase(ph2));
  sync_block #(.D(4), .ALPHA(4)) u_dut4 (.clk, .rst_n, .phase(ph4), .di(di4), .dout(do4));
  sync_block #(.D(4), .ALPHA(2)) u_dut2 (.clk, .rst_n, .phase(ph2), .di(di2), .dout(do2));

  initial begin
    rst_n = 1'b0;
    di4 = '0;
    di2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      di4 = 4'($urandom);
      di2 = 4'($urandom);
      #1;
      if (t >= 4) begin
        checks++;
        if (do4 != h4[t - 4]) begin
          failures++;
          $display("FAIL alpha=4 cycle %0d: %h expected %h", t, do4, h4[t - 4]);
        end
      end
      if (t >= 2) begin
        checks++;
        if (do2 != h2[t - 2]) begin
          failures++;
          $display("FAIL alpha=2 cycle %0d: %h expected %h", t, do2, h2[t - 2]);
        end
      end
      h4.push_back(di4);
      h2.push_back(di2);
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
