// tb_const_mult: self-checking test of the constant-coefficient unit.
//
// Eight instances cover every unit kind: +1 and -1 (wire and negation),
// +4 and -8 (shifts), and 3, -5, 41, 26 (constant multipliers). Random
// signed operands, with the extremes of the safe range, are applied and each
// product is compared with operand * coefficient computed here in 64-bit
// integer arithmetic.
module tb_const_mult;
  localparam int W = 20;
  localparam int NC = 8;
  localparam int COEFS [NC] = '{1, -1, 4, -8, 3, -5, 41, 26};

  logic signed [W-1:0] x;
  logic signed [W-1:0] p [NC];

  int checks = 0;
  int failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    const_mult #(.W(W), .COEF(COEFS[i])) u_dut (.x(x), .p(p[i]));
  end

  // Operands stay within +-2^13 so every product fits in W bits.
  task automatic apply(longint v);
    x = W'(v);
    #1;
    for (int i = 0; i < NC; i++) begin
      longint exp_v;
      exp_v = v * longint'(COEFS[i]);
      checks++;
      if (longint'(p[i]) != exp_v) begin
        failures++;
        $display("FAIL coef=%0d x=%0d got=%0d exp=%0d", COEFS[i], v, p[i], exp_v);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0);
    apply(1);
    apply(-1);
    apply(8191);
    apply(-8192);
    for (int n = 0; n < 500; n++) apply(longint'($signed($urandom_range(16383, 0))) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
