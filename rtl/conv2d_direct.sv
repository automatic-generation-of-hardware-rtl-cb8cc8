// conv2d_direct: fixed-kernel 2D convolver, fully parallel architecture.
//
// Each valid beat presents one ROWS x COLS window of pixels; the convolver
// returns sum over r, c of KERNEL[r*COLS+c] * win[r*COLS+c] (the kernel is
// applied to the window as printed, without flipping). It is built from a
// multiplier array (one constant unit per non-zero coefficient: a shift for
// +-2^n, a constant multiplier otherwise, nothing for zero) and a pipelined
// adder tree whose input count is the number of non-zero coefficients.
//
// The internal word width ACC_W is the smallest signed width that holds
// the largest possible sum, worked out at elaboration from the input range
// and the sum of |coefficients|; no overflow can occur inside. The result is
// sign-extended to OUT_W bits (an elaboration check enforces OUT_W >= ACC_W).
// No rounding or rescaling is applied: a fixed-point kernel scaled by s gives
// a result scaled by s.
//
// Interface: win is a flat row-major array (column COLS-1 is the newest
// column of a sliding window). With PRECOMP = 1, equal horizontally adjacent
// coefficients share one product through a register (see mult_array); the
// window stream must then slide by exactly one column per valid beat,
// starting from an all-zero window after reset.
// Timing: res/out_valid follow in_valid by LATENCY = 1 + ceil(log2(NZ))
// clocks, NZ being the number of non-zero coefficients. One window per clock
// is accepted; there is no back-pressure. Reset is active-low, synchronous.
//
// Origin: the multiplier-array-plus-adder-tree architecture with fixed-point
// coefficients follows the original convolver generator; the window port,
// the unscaled full-precision result and the handshake are this design's
// choices.
module conv2d_direct
  import conv_pkg::*;
#(
  parameter int ROWS      = 5,
  parameter int COLS      = 5,
  parameter int IN_W      = PIX_W_DEFAULT,
  parameter bit IN_SIGNED = 1'b0,
  parameter int KERNEL [ROWS*COLS] = GAUSS5_273,
  parameter bit PRECOMP   = 1'b1,
  parameter int OUT_W     = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         win [ROWS*COLS],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] res
);

  localparam int TAPS = ROWS * COLS;

  function automatic int count_nz();
    int n;
    n = 0;
    for (int k = 0; k < TAPS; k++) if (KERNEL[k] != 0) n++;
    return n;
  endfunction

  function automatic longint sum_abs();
    longint s;
    s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(iabs(KERNEL[k]));
    return s;
  endfunction

  localparam int NZ      = count_nz();
  localparam int ACC_W   = signed_width(in_mag(IN_W, IN_SIGNED) * sum_abs());
  localparam int LATENCY = 1 + $clog2(NZ);

  if (NZ == 0) begin : g_chk_nz
    $error("conv2d_direct: the kernel has no non-zero coefficient");
  end
  if (OUT_W < ACC_W) begin : g_chk_w
    $error("conv2d_direct: OUT_W is narrower than the full-precision result");
  end

  logic                    prod_valid;
  logic signed [ACC_W-1:0] prod [NZ];
  logic signed [ACC_W-1:0] sum;

  mult_array #(
    .ROWS(ROWS), .COLS(COLS), .IN_W(IN_W), .IN_SIGNED(IN_SIGNED),
    .KERNEL(KERNEL), .PRECOMP(PRECOMP), .W(ACC_W), .N_OUT(NZ)
  ) u_mul (
    .clk, .rst_n, .in_valid, .win,
    .out_valid(prod_valid), .prod
  );

  adder_tree #(.N(NZ), .W(ACC_W)) u_add (
    .clk, .rst_n,
    .in_valid(prod_valid), .in(prod),
    .out_valid, .sum
  );

  assign res = OUT_W'(sum);

endmodule
