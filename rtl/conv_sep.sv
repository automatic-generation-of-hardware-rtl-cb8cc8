// conv_sep: separable fixed-kernel 2D convolver.
//
// A kernel that factors as K[r][c] = KV[r] * KH[c] is applied in two 1D
// passes: a vertical M x 1 convolver reduces each incoming pixel column to
// one value, a shift register keeps the last M such values, and a horizontal
// 1 x M convolver weights them with KH. Per output this needs 2M coefficient
// units and 2(M-1) adders instead of M*M and M*M-1, and both passes get the
// same zero skipping, shift units and pipelined adder trees as the direct
// convolver (they are instances of conv2d_direct).
//
// Because the column shift register slides by exactly one column per beat
// and is cleared at reset, the horizontal pass can always use pre-computed
// products (PRECOMP): where KH has equal neighbours, one of them is a
// register fed from the other instead of a multiplier.
//
// Interface: each in_valid beat delivers one column of M pixels, col[0] at
// the top (kernel row 0). After M columns the result equals the direct
// convolution of the last M columns with KV * KH, column M-1 of the window
// being the newest. Results are signed, full precision, sign-extended to
// OUT_W. Earlier results include the zero columns the shift register starts
// with.
// Timing: res/out_valid follow the in_valid beat of the newest column by
// (1 + ceil(log2(nz(KV)))) + 1 + (1 + ceil(log2(nz(KH)))) clocks; one column
// per clock, no back-pressure; active-low synchronous reset.
//
// Origin: splitting a separable kernel into a vertical and a horizontal pass
// with 2M units follows the original convolver generator; the column-stream
// interface and the shift register between the passes are this design's
// choices.
module conv_sep
  import conv_pkg::*;
#(
  parameter int M       = 5,
  parameter int IN_W    = PIX_W_DEFAULT,
  parameter int KV [M]  = SOBEL5_V,
  parameter int KH [M]  = SOBEL5_H,
  parameter bit PRECOMP = 1'b1,
  parameter int OUT_W   = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         col [M],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] res
);

  function automatic longint sum_abs_v();
    longint s;
    s = 0;
    for (int k = 0; k < M; k++) s += longint'(iabs(KV[k]));
    return s;
  endfunction

  // Full-precision width of the vertical pass result.
  localparam int V_W = signed_width(in_mag(IN_W, 1'b0) * sum_abs_v());

  logic                  v_valid;
  logic signed [V_W-1:0] v;

  conv2d_direct #(
    .ROWS(M), .COLS(1), .IN_W(IN_W), .IN_SIGNED(1'b0),
    .KERNEL(KV), .PRECOMP(1'b0), .OUT_W(V_W)
  ) u_vert (
    .clk, .rst_n, .in_valid, .win(col),
    .out_valid(v_valid), .res(v)
  );

  // Column shift register: sr[M-1] newest, sr[0] oldest.
  logic [V_W-1:0] sr [M];
  logic           h_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr      <= '{default: '0};
      h_valid <= 1'b0;
    end else begin
      h_valid <= v_valid;
      if (v_valid) begin
        for (int k = 0; k < M - 1; k++) sr[k] <= sr[k+1];
        sr[M-1] <= v;
      end
    end
  end

  conv2d_direct #(
    .ROWS(1), .COLS(M), .IN_W(V_W), .IN_SIGNED(1'b1),
    .KERNEL(KH), .PRECOMP(PRECOMP), .OUT_W(OUT_W)
  ) u_horz (
    .clk, .rst_n, .in_valid(h_valid), .win(sr),
    .out_valid, .res
  );

endmodule
