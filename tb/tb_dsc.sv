// tb_dsc: end-to-end test of the convolver at its default size
// (W = 16, D = 4, K = 4).
//
// dsc_driver loads two coefficient sets bit-serially (the second without
// a reset), streams random samples and checks every result word at the
// cycle the latency formula predicts (Z = 19 here). The testbench also
// counts how often the design's mechanisms were exercised and fails if
// one never was: negative samples (the sign-digit correction of the
// multipliers: inverted last row and cell C_A), negative coefficients,
// the low-to-high word carry in the root A cell (LCL selected by MUX_H)
// and a coefficient reload without reset.
module tb_dsc;
  import dsc_pkg::*;

  localparam int W = 16, D = 4, K = 4, ALPHA = W / D;

  logic             clk = 1'b0;
  logic             rst_n, coef_shift, coef_in, coef_out;
  logic [D-1:0]     x, yl, yh;
  logic [ALPHA-1:0] phase;
  logic             done;
  int               checks, failures, n_neg_x, n_neg_a, n_reload;
  int               n_hcarry, cycles = 0;
  int               ext_checks = 0, ext_fail = 0;

  always #5 clk = ~clk;

  dsc u_dut (
    .clk, .rst_n, .coef_shift, .coef_in, .coef_out, .x, .yl, .yh, .phase
  );

  dsc_driver #(.W(W), .D(D), .K(K), .NWORDS(200), .NSETS(2), .SEED(7)) u_drv (
    .clk, .rst_n, .coef_shift, .coef_in, .x, .yl, .yh, .phase,
    .done, .checks, .failures, .n_neg_x, .n_neg_a, .n_reload, .n_hcarry
  );

  always @(posedge clk) cycles++;

  task automatic need(input string what, input int n);
    ext_checks++;
    if (n == 0) begin
      ext_fail++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);  // let the driver clear its flag first
    wait (done);
    ext_checks++;
    if (latency_z(ALPHA, K) != 19) begin
      ext_fail++;
      $display("latency formula gives %0d, expected 19", latency_z(ALPHA, K));
    end
    need("negative sample", n_neg_x);
    need("negative coefficient", n_neg_a);
    need("low-to-high word carry in the root A cell", n_hcarry);
    need("coefficient reload", n_reload);
    $display("mechanisms: neg_x=%0d neg_a=%0d hcarry=%0d reload=%0d cycles=%0d",
             n_neg_x, n_neg_a, n_hcarry, n_reload, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ext_checks, failures + ext_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ext_checks, failures + ext_fail + 1);
    $finish;
  end

endmodule
