// tb_sync_subblock: checks subblock L_ji with alpha = 4 and i = 2. A new
// random digit is offered every cycle; the subblock must capture the one
// present while C2 is high and drive it, and only it, during the next C2
// cycle (alpha cycles later), outputting zero in all other cycles.
module tb_sync_subblock;

  localparam int D = 4, ALPHA = 4, I = 1;  // I: zero-based index of Ci

  logic clk = 1'b0;
  logic rst_n;
  logic [ALPHA-1:0] phase;
  logic [D-1:0] di, dout;
  logic [D-1:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_subblock #(.D(D)) u_dut (
    .clk, .rst_n,
    .cap  (phase[I]),
    .xfer (phase[(I + 1) % ALPHA]),
    .drive(phase[I]),
    .di, .dout
  );

  initial begin
    rst_n = 1'b0;
    phase = 4'b0001;
    di = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      phase = 4'(1 << (t % ALPHA));
      di = D'($urandom);
      #1;
      if (t >= ALPHA) begin
        checks++;
        if (phase[I] && dout != hist[t - ALPHA]) begin
          failures++;
          $display("FAIL cycle %0d: dout %h expected %h", t, dout, hist[t - ALPHA]);
        end else if (!phase[I] && dout != 0) begin
          failures++;
          $display("FAIL cycle %0d: output not released", t);
        end
      end
      hist.push_back(di);
      @(negedge clk);
    end
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
