// mult_array: the multiplier array of a fixed-kernel convolver.
//
// One product is formed per non-zero kernel coefficient; zero coefficients
// get no unit and no output, so the adder tree behind the array has only
// N_OUT inputs (zero skipping). Power-of-two coefficients become shifts and
// the rest constant multipliers (see const_mult). Products leave the array in
// row-major order of their kernel positions, zeros left out.
//
// Pre-computed products (PRECOMP = 1): when a coefficient equals its right
// neighbour in the same row, the product that position needs this beat is
// the one its neighbour formed on the previous beat, because a sliding window
// moves every pixel one column to the left per beat. Such a position builds
// no multiplier; its product register simply loads the neighbour's register.
// This holds only when each valid window is the previous valid window
// shifted left by one column, with a new column entering at COLS-1, and when
// the window stream starts, after reset, from an all-zero window (which is
// what a column shift register cleared at reset delivers). With PRECOMP = 0
// every window is independent.
//
// Interface: win is a flat row-major ROWS*COLS array of IN_W-bit pixels,
// unsigned or, with IN_SIGNED, two's complement. prod holds N_OUT signed
// W-bit products. W and N_OUT are computed by the parent from the kernel and
// checked here at elaboration.
// Timing: one register stage; prod and out_valid follow in_valid by one
// clock. Product registers load only on in_valid beats, are cleared by the
// active-low synchronous reset, and hold otherwise.
//
// Origin: zero skipping, shift units and reuse of pre-computed products for
// repeated coefficients follow the original convolver generator; the
// register-sharing scheme for the reuse, the valid bit, the reset and the
// full-precision width are this design's choices.
module mult_array
  import conv_pkg::*;
#(
  parameter int ROWS      = 5,
  parameter int COLS      = 5,
  parameter int IN_W      = PIX_W_DEFAULT,
  parameter bit IN_SIGNED = 1'b0,
  parameter int KERNEL [ROWS*COLS] = GAUSS5_273,
  parameter bit PRECOMP   = 1'b1,
  parameter int W         = 18,
  parameter int N_OUT     = 25
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [IN_W-1:0]     win  [ROWS*COLS],
  output logic                out_valid,
  output logic signed [W-1:0] prod [N_OUT]
);

  localparam int TAPS = ROWS * COLS;

  // Number of non-zero coefficients before position i (its output slot).
  function automatic int slot_of(int i);
    int n;
    n = 0;
    for (int k = 0; k < i; k++) if (KERNEL[k] != 0) n++;
    return n;
  endfunction

  // Position i takes its product from its right neighbour's register.
  function automatic bit reuses(int i);
    return PRECOMP && (KERNEL[i] != 0) && ((i % COLS) != COLS - 1)
           && (KERNEL[i] == KERNEL[i + 1]);
  endfunction

  function automatic int count_kind(mult_kind_e kind, bit with_reuse);
    int n;
    n = 0;
    for (int k = 0; k < TAPS; k++)
      if (classify(KERNEL[k]) == kind && (with_reuse || !reuses(k))) n++;
    return n;
  endfunction

  function automatic int count_reuse();
    int n;
    n = 0;
    for (int k = 0; k < TAPS; k++) if (reuses(k)) n++;
    return n;
  endfunction

  function automatic longint sum_abs();
    longint s;
    s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(iabs(KERNEL[k]));
    return s;
  endfunction

  // Unit counts, visible to testbenches and reports.
  localparam int N_ZS    = count_kind(MK_ZERO, 1'b1);
  localparam int N_SHIFT = count_kind(MK_SHIFT, 1'b0);
  localparam int N_MULT  = count_kind(MK_MULT, 1'b0);
  localparam int N_REUSE = count_reuse();
  localparam int NEED_W  = signed_width(in_mag(IN_W, IN_SIGNED) * sum_abs());

  if (N_OUT != TAPS - N_ZS) begin : g_chk_n
    $error("mult_array: N_OUT must equal the number of non-zero coefficients");
  end
  if (W < NEED_W) begin : g_chk_w
    $error("mult_array: W is too narrow for this kernel");
  end

  logic signed [W-1:0] prod_q [N_OUT];

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    if (KERNEL[i] != 0) begin : g_nz
      localparam int SLOT = slot_of(i);
      if (reuses(i)) begin : g_reuse
        always_ff @(posedge clk) begin
          if (!rst_n)        prod_q[SLOT] <= '0;
          else if (in_valid) prod_q[SLOT] <= prod_q[SLOT + 1];
        end
      end else begin : g_unit
        logic signed [W-1:0] x_ext;
        logic signed [W-1:0] p;
        if (IN_SIGNED) begin : g_sext
          assign x_ext = W'(signed'(win[i]));
        end else begin : g_zext
          assign x_ext = signed'(W'(win[i]));
        end
        const_mult #(.W(W), .COEF(KERNEL[i])) u_mul (.x(x_ext), .p(p));
        always_ff @(posedge clk) begin
          if (!rst_n)        prod_q[SLOT] <= '0;
          else if (in_valid) prod_q[SLOT] <= p;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  assign prod = prod_q;

endmodule
