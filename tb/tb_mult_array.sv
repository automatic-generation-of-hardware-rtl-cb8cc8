// tb_mult_array: self-checking test of the multiplier array.
//
// Two arrays run side by side:
//   A - the 5x5 Sobel y kernel with pre-computed products enabled. Its input
//       is a sliding window: each valid beat shifts every row left by one
//       column and a random column enters on the right, starting from an
//       all-zero window after reset. Row 2 is all zero (five skipped
//       positions) and rows 0, 1, 3, 4 have equal neighbours, so eight
//       positions take their product from a register.
//   B - the 5x5 Gaussian (scale 1/273) with pre-computing disabled, fed with
//       unrelated random windows; it has shifts for 1/4/16 and constant
//       multipliers for 7/26/41.
// Valid is random. One clock after each valid beat every product must equal
// coefficient * pixel, computed here, in row-major order with zero positions
// left out; between valid beats the products must hold.
module tb_mult_array;
  import conv_pkg::*;

  localparam int W = 20;
  localparam int NA = 20;
  localparam int NB = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  logic [7:0]          win_a [25];
  logic [7:0]          win_b [25];
  logic                ov_a, ov_b;
  logic signed [W-1:0] prod_a [NA];
  logic signed [W-1:0] prod_b [NB];

  mult_array #(.ROWS(5), .COLS(5), .IN_W(8), .IN_SIGNED(1'b0), .KERNEL(SOBEL5_Y),
               .PRECOMP(1'b1), .W(W), .N_OUT(NA))
    u_a (.clk, .rst_n, .in_valid, .win(win_a), .out_valid(ov_a), .prod(prod_a));
  mult_array #(.ROWS(5), .COLS(5), .IN_W(8), .IN_SIGNED(1'b0), .KERNEL(GAUSS5_273),
               .PRECOMP(1'b0), .W(W), .N_OUT(NB))
    u_b (.clk, .rst_n, .in_valid, .win(win_b), .out_valid(ov_b), .prod(prod_b));

  int checks = 0;
  int failures = 0;
  longint exp_a [NA];
  longint exp_b [NB];
  logic   was_valid;

  // Expected compacted product list for one kernel and window.
  task automatic expect_products(input int k [25], input logic [7:0] w [25],
                                 output longint e [25], output int n);
    n = 0;
    for (int i = 0; i < 25; i++)
      if (k[i] != 0) begin
        e[n] = longint'(k[i]) * longint'(w[i]);
        n++;
      end
  endtask

  task automatic compare();
    checks++;
    if (ov_a != was_valid || ov_b != was_valid) begin
      failures++;
      $display("FAIL out_valid %b %b exp %b", ov_a, ov_b, was_valid);
    end
    for (int i = 0; i < NA; i++) begin
      checks++;
      if (longint'(prod_a[i]) != exp_a[i]) begin
        failures++;
        $display("FAIL A slot %0d got %0d exp %0d", i, prod_a[i], exp_a[i]);
      end
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (longint'(prod_b[i]) != exp_b[i]) begin
        failures++;
        $display("FAIL B slot %0d got %0d exp %0d", i, prod_b[i], exp_b[i]);
      end
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [25];
    int n;
    in_valid = 1'b0;
    was_valid = 1'b0;
    for (int i = 0; i < 25; i++) begin
      win_a[i] = '0;
      win_b[i] = '0;
    end
    for (int i = 0; i < NA; i++) exp_a[i] = 0;
    for (int i = 0; i < NB; i++) exp_b[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      compare();
      in_valid = ($urandom_range(4, 0) != 0);
      for (int i = 0; i < 25; i++) win_b[i] = 8'($urandom);
      if (in_valid) begin
        for (int r = 0; r < 5; r++) begin
          for (int c = 0; c < 4; c++) win_a[r*5+c] = win_a[r*5+c+1];
          win_a[r*5+4] = (t % 97 == 0) ? 8'hff : 8'($urandom);
        end
        expect_products(SOBEL5_Y, win_a, e, n);
        for (int i = 0; i < NA; i++) exp_a[i] = e[i];
        expect_products(GAUSS5_273, win_b, e, n);
        for (int i = 0; i < NB; i++) exp_b[i] = e[i];
      end
      was_valid = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
