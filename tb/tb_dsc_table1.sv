// tb_dsc_table1: the convolver in the five configurations of its
// evaluation table, run side by side.
//
//   W   D  alpha  K  Amax  Z
//   8   4    2    8    5   20
//  12   3    4    6    9   28
//  16   4    4    4   14   19
//  24   6    4    3   22   15
//  32   8    4    2   31   10
//
// plus the 8-tap, 16-bit, 4-bit-digit convolver used to illustrate the
// data flow through the synchronisation blocks (Amax = 13, Z = 36 by the
// same formulas).
//
// Each instance gets its own dsc_driver, which loads coefficients of Amax
// bits, streams random samples and checks every result at the cycle given
// by Z. The testbench also checks the latency and Amax formulas against
// the table, and that the two configurations whose tap count is not a
// power of two (K = 6 and K = 3), whose adder trees contain L-mode cells,
// produced checked results.
module tb_dsc_table1;
  import dsc_pkg::*;

  localparam int NC = 6;
  localparam int CW [NC] = '{8, 12, 16, 24, 32, 16};
  localparam int CD [NC] = '{4, 3, 4, 6, 8, 4};
  localparam int CK [NC] = '{8, 6, 4, 3, 2, 8};
  localparam int CA [NC] = '{5, 9, 14, 22, 31, 13};
  localparam int CZ [NC] = '{20, 28, 19, 15, 10, 36};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done     [NC];
  int   checks   [NC];
  int   failures [NC];
  int   n_neg_x  [NC];
  int   n_neg_a  [NC];
  int   n_reload [NC];
  int   n_hcarry [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int W = CW[c], D = CD[c], K = CK[c], ALPHA = W / D;
    logic             rst_n, coef_shift, coef_in, coef_out;
    logic [D-1:0]     x, yl, yh;
    logic [ALPHA-1:0] phase;

    dsc #(.W(W), .D(D), .K(K)) u_dut (
      .clk, .rst_n, .coef_shift, .coef_in, .coef_out, .x, .yl, .yh, .phase
    );

    dsc_driver #(.W(W), .D(D), .K(K), .NWORDS(100), .NSETS(2), .SEED(11 + c)) u_drv (
      .clk, .rst_n, .coef_shift, .coef_in, .x, .yl, .yh, .phase,
      .done(done[c]), .checks(checks[c]), .failures(failures[c]),
      .n_neg_x(n_neg_x[c]), .n_neg_a(n_neg_a[c]), .n_reload(n_reload[c]),
      .n_hcarry(n_hcarry[c])
    );
  end

  int tot_checks = 0, tot_fail = 0;

  task automatic check(input bit ok, input string what);
    tot_checks++;
    if (!ok) begin
      tot_fail++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);  // let the drivers clear their flags first
    for (int c = 0; c < NC; c++) wait (done[c]);
    for (int c = 0; c < NC; c++) begin
      check(latency_z(CW[c] / CD[c], CK[c]) == CZ[c], $sformatf("Z for config %0d", c));
      check(amax(CW[c], CK[c]) == CA[c], $sformatf("Amax for config %0d", c));
      check(n_neg_x[c] > 0 && n_neg_a[c] > 0 && n_reload[c] > 0 && n_hcarry[c] > 0,
            $sformatf("mechanisms exercised in config %0d", c));
      $display("W=%0d D=%0d K=%0d Z=%0d: %0d results checked, %0d failed, hcarry=%0d",
               CW[c], CD[c], CK[c], CZ[c], checks[c], failures[c], n_hcarry[c]);
      tot_checks += checks[c];
      tot_fail += failures[c];
    end
    // L-mode balancing cells exist only in the K = 6 and K = 3 trees
    check(checks[1] > 0 && checks[3] > 0, "results through trees with L-mode cells");
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_fail + 1);
    $finish;
  end

endmodule
