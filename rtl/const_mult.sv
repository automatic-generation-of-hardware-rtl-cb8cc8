// const_mult: multiply a signed operand by one fixed kernel coefficient.
//
// The unit is chosen at elaboration from the coefficient value, following the
// coefficient analysis of the convolver generator:
//   * +-2^n  -> the operand shifted left by n bits, negated when the
//               coefficient is negative (a coefficient of +-1 is just a wire
//               or a negation). No multiplier is built.
//   * other  -> a constant multiplier (x * COEF); synthesis reduces it to
//               shift-and-add terms or maps it to a hard multiplier.
// A zero coefficient is never given to this module: the multiplier array
// skips that position altogether, and an elaboration check rejects COEF = 0.
//
// Interface: x and p are signed and W bits wide. W must be wide enough for
// the largest product; the enclosing array sizes it from the whole kernel, so
// no product here can overflow.
// Timing: purely combinational; the multiplier array registers the result.
//
// Origin: replacing multipliers by shifts for power-of-two coefficients
// follows the original convolver generator; the handling of negative
// coefficients (negation) and leaving other constants to synthesis are this
// design's choices.
module const_mult
  import conv_pkg::*;
#(
  parameter int W    = 16,
  parameter int COEF = 3
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] p
);

  localparam mult_kind_e KIND  = classify(COEF);
  localparam int         SHIFT = log2_exact(COEF);

  if (KIND == MK_ZERO) begin : g_bad
    $error("const_mult: a zero coefficient must be skipped, not instantiated");
  end

  if (KIND == MK_SHIFT) begin : g_shift
    logic signed [W-1:0] shifted;
    assign shifted = x <<< SHIFT;
    if (COEF < 0) begin : g_neg
      assign p = -shifted;
    end else begin : g_pos
      assign p = shifted;
    end
  end else begin : g_mult
    localparam logic signed [W-1:0] C = W'(COEF);
    assign p = x * C;
  end

endmodule
