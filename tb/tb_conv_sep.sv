// tb_conv_sep: self-checking test of the separable convolver.
//
// Two generated separable convolvers, each checked by a sep_harness against
// the direct 2D sum with the outer-product kernel:
//   5x5 Sobel y  = [2 1 0 -1 -2]^T x [1 1 2 1 1] (zero skip in the vertical
//                  pass, negative shifts, products shared between the equal
//                  horizontal neighbours)
//   3x3 binomial = [1 2 1]^T x [1 2 1]
// Results and arrival clocks are compared.
module tb_conv_sep;
  import conv_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   c [2];
  int   f [2];
  logic d [2];

  sep_harness #(.M(5), .KV(SOBEL5_V), .KH(SOBEL5_H))
    h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  sep_harness #(.M(3), .KV(BINOM3_1D), .KH(BINOM3_1D))
    h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));

  int checks;
  int failures;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    checks = c[0] + c[1];
    failures = f[0] + f[1] + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d[0] && d[1]);
    checks = c[0] + c[1];
    failures = f[0] + f[1];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
