// tb_conv2d_direct: self-checking test of the parallel 2D convolver.
//
// Six generated convolvers, each checked by a conv2d_harness:
//   3x3 Sobel x     (three zero-skipped positions, only +-1/+-2 shifts)
//   3x3 Gaussian    (sigma 1, 16-bit coefficients, constant multipliers)
//   5x5 Gaussian    (sigma 1.2, 16-bit coefficients)
//   5x5 Sobel y     (five zero positions, pre-computed products, sliding)
//   7x7 Gaussian    (sigma 1.5, 8-bit coefficients, sliding window)
//   5x5 Gaussian    (sigma 1.2, 4-bit: zero corners are skipped)
// Each result and its arrival clock are compared with values computed in
// the harness.
module tb_conv2d_direct;
  import conv_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 6;
  int   c [NH];
  int   f [NH];
  logic d [NH];

  conv2d_harness #(.K(3), .KERNEL(SOBEL3_X),       .PRECOMP(1'b0), .SLIDE(1'b0))
    h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  conv2d_harness #(.K(3), .KERNEL(GAUSS3_Q16),     .PRECOMP(1'b0), .SLIDE(1'b0))
    h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  conv2d_harness #(.K(5), .KERNEL(GAUSS5_S12_Q16), .PRECOMP(1'b0), .SLIDE(1'b0))
    h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  conv2d_harness #(.K(5), .KERNEL(SOBEL5_Y),       .PRECOMP(1'b1), .SLIDE(1'b1))
    h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));
  conv2d_harness #(.K(7), .KERNEL(GAUSS7_S15_Q8),  .PRECOMP(1'b1), .SLIDE(1'b1))
    h4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .done(d[4]));
  conv2d_harness #(.K(5), .KERNEL(GAUSS5_S12_Q4),  .PRECOMP(1'b1), .SLIDE(1'b1))
    h5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .done(d[5]));

  int checks;
  int failures;

  function automatic void total();
    checks = 0;
    failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
