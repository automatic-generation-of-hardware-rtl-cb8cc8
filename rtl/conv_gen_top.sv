// conv_gen_top: two generated fixed-kernel convolvers side by side.
//
// The convolver generator offers two architectures for a given kernel:
// the fully parallel one (a multiplier array plus an adder tree over the
// whole window) and, for kernels that factor into a column and a row vector,
// the separable one (a vertical then a horizontal 1D pass). This top carries
// one of each, each with its own kernel and its own ports:
//   * u_2d  - conv2d_direct with the 5x5 integer Gaussian (scale 1/273): 25
//             positions, shifts for 1/4/16, constant multipliers for 7/26/41.
//   * u_sep - conv_sep with the 5x5 Sobel y kernel factored as
//             [2 1 0 -1 -2]^T x [1 1 2 1 1]: a zero-skipped vertical tap,
//             shift units throughout, and products shared between the equal
//             horizontal neighbours.
// Both are specialised at elaboration; change the kernel parameters to
// generate another convolver.
//
// Interface:
//   win_valid/win   one 5x5 window per beat, flat row-major, column 4 newest.
//                   With PRECOMP_2D = 1 the windows must slide by one column
//                   per valid beat from an all-zero window after reset (a
//                   line-buffer front end delivers this).
//   res2d_valid/res2d   signed full-precision 2D result.
//   col_valid/col   one 5-pixel column per beat for the separable convolver.
//   ressep_valid/ressep signed full-precision result of the last 5 columns.
// Timing: see conv2d_direct and conv_sep; 6 clocks for u_2d and 8 for u_sep
// with the default kernels. Active-low synchronous reset.
//
// Origin: both architectures and both default kernels come from the original
// convolver generator's examples; putting one of each side by side in a
// single top is this design's choice.
module conv_gen_top
  import conv_pkg::*;
#(
  parameter int PIX_W          = PIX_W_DEFAULT,
  parameter int K2D            = 5,
  parameter int KERNEL_2D [K2D*K2D] = GAUSS5_273,
  parameter bit PRECOMP_2D     = 1'b1,
  parameter int RES2D_W        = 32,
  parameter int KS             = 5,
  parameter int KV [KS]        = SOBEL5_V,
  parameter int KH [KS]        = SOBEL5_H,
  parameter int RESSEP_W       = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       win_valid,
  input  logic [PIX_W-1:0]           win [K2D*K2D],
  output logic                       res2d_valid,
  output logic signed [RES2D_W-1:0]  res2d,
  input  logic                       col_valid,
  input  logic [PIX_W-1:0]           col [KS],
  output logic                       ressep_valid,
  output logic signed [RESSEP_W-1:0] ressep
);

  conv2d_direct #(
    .ROWS(K2D), .COLS(K2D), .IN_W(PIX_W), .IN_SIGNED(1'b0),
    .KERNEL(KERNEL_2D), .PRECOMP(PRECOMP_2D), .OUT_W(RES2D_W)
  ) u_2d (
    .clk, .rst_n, .in_valid(win_valid), .win,
    .out_valid(res2d_valid), .res(res2d)
  );

  conv_sep #(
    .M(KS), .IN_W(PIX_W), .KV(KV), .KH(KH), .PRECOMP(1'b1), .OUT_W(RESSEP_W)
  ) u_sep (
    .clk, .rst_n, .in_valid(col_valid), .col,
    .out_valid(ressep_valid), .res(ressep)
  );

endmodule
