// tb_conv_gen_top: end-to-end test of the generated convolver pair at the
// default parameters (5x5 Gaussian, scale 1/273, on the parallel path; 5x5
// Sobel y factored as [2 1 0 -1 -2]^T x [1 1 2 1 1] on the separable path).
//
// A random 8-bit image (IMG_W x IMG_H, with a saturated block and a dark
// block so that extremes and sign changes occur) is scanned the way a
// line-buffer front end would: for each band of five rows the columns are
// sent left to right, one per valid beat, with random idle beats in between.
// The testbench keeps the 5x5 window those columns form (zero after reset)
// and offers it to the parallel path while the same column goes to the
// separable path. Each result is compared with the direct sum over the
// window of coefficient * pixel computed here, the separable one with the
// full 5x5 Sobel kernel rather than its factors, and must arrive 6 (parallel)
// or 8 (separable) clocks after its input.
//
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: idle beats (pipeline bubbles), zero-skipped
// positions, shift units, constant multipliers, products shared through the
// pre-computed register, adder-tree levels that carry an odd value, negative
// results, and windows lying wholly inside the image (real output pixels).
module tb_conv_gen_top;
  import conv_pkg::*;

  localparam int IMG_W = 32;
  localparam int IMG_H = 12;
  localparam int K = 5;
  localparam int LAT_2D = 6;
  localparam int LAT_SEP = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               win_valid;
  logic [7:0]         win [K*K];
  logic               res2d_valid;
  logic signed [31:0] res2d;
  logic               col_valid;
  logic [7:0]         col [K];
  logic               ressep_valid;
  logic signed [31:0] ressep;

  conv_gen_top dut (
    .clk, .rst_n,
    .win_valid, .win, .res2d_valid, .res2d,
    .col_valid, .col, .ressep_valid, .ressep
  );

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint v; int due; } exp_t;
  exp_t q2d[$], qsep[$];

  // Mechanism counters.
  int n_bubble = 0, n_zs = 0, n_shift = 0, n_mult = 0, n_reuse = 0;
  int n_odd = 0, n_neg = 0, n_inside = 0;

  logic [7:0] img [IMG_H][IMG_W];

  // Shared products observed in the separable path: on a horizontal beat the
  // first product register (KH[0] = KH[1]) must take over the value that the
  // second one held, without a unit of its own.
  logic signed [31:0] shared_prev;
  logic               shared_chk = 1'b0;
  always @(posedge clk) begin
    shared_chk <= rst_n && dut.u_sep.h_valid;
    shared_prev <= 32'(dut.u_sep.u_horz.u_mul.prod_q[1]);
    if (shared_chk && shared_prev != 0) begin
      if (32'(dut.u_sep.u_horz.u_mul.prod_q[0]) == shared_prev) n_reuse++;
      else begin
        failures++;
        $display("FAIL: shared product register did not follow its neighbour");
      end
    end
  end

  function automatic int count_if(input int k [], input int kind);
    int n;
    n = 0;
    foreach (k[i]) begin
      int a;
      a = (k[i] < 0) ? -k[i] : k[i];
      case (kind)
        0: if (a == 0) n++;
        1: if (a != 0 && (a & (a - 1)) == 0) n++;
        default: if (a != 0 && (a & (a - 1)) != 0) n++;
      endcase
    end
    return n;
  endfunction

  task automatic check(string name, logic v, logic signed [31:0] r, ref exp_t q[$]);
    if (v) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL %s: unexpected result %0d", name, r);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (longint'(r) != e.v || cycle != e.due) begin
          failures++;
          $display("FAIL %s: got %0d at %0d, exp %0d at %0d", name, r, cycle, e.v, e.due);
        end
        if (r < 0) n_neg++;
      end
    end
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-26s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k2d [];
    int kv [];
    int kh [];
    int ksep [];
    k2d  = new[K*K];
    ksep = new[K*K];
    kv   = new[K];
    kh   = new[K];
    foreach (k2d[i]) k2d[i] = GAUSS5_273[i];
    foreach (ksep[i]) ksep[i] = SOBEL5_Y[i];
    foreach (kv[i]) kv[i] = SOBEL5_V[i];
    foreach (kh[i]) kh[i] = SOBEL5_H[i];

    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        if (x >= 8 && x < 14 && y >= 2 && y < 9)       img[y][x] = 8'hff;
        else if (x >= 20 && x < 26 && y >= 4 && y < 11) img[y][x] = 8'h00;
        else                                            img[y][x] = 8'($urandom);

    win_valid = 1'b0;
    col_valid = 1'b0;
    for (int i = 0; i < K*K; i++) win[i] = '0;
    for (int i = 0; i < K; i++) col[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int y0 = 0; y0 + K <= IMG_H; y0++) begin
      for (int x = 0; x < IMG_W; x++) begin
        // Idle beats before this column.
        while ($urandom_range(3, 0) == 0) begin
          @(negedge clk);
          check("2d", res2d_valid, res2d, q2d);
          check("sep", ressep_valid, ressep, qsep);
          win_valid = 1'b0;
          col_valid = 1'b0;
          n_bubble++;
        end
        @(negedge clk);
        check("2d", res2d_valid, res2d, q2d);
        check("sep", ressep_valid, ressep, qsep);
        win_valid = 1'b1;
        col_valid = 1'b1;
        for (int r = 0; r < K; r++) begin
          for (int c = 0; c < K - 1; c++) win[r*K+c] = win[r*K+c+1];
          win[r*K+K-1] = img[y0+r][x];
          col[r] = img[y0+r][x];
        end
        begin
          longint s2, ss;
          s2 = 0;
          ss = 0;
          for (int i = 0; i < K*K; i++) begin
            s2 += longint'(k2d[i]) * longint'(win[i]);
            ss += longint'(ksep[i]) * longint'(win[i]);
          end
          q2d.push_back('{v: s2, due: cycle + LAT_2D});
          qsep.push_back('{v: ss, due: cycle + LAT_SEP});
        end
        if (x >= K - 1) n_inside++;
        // Units exercised by this beat, as the kernels dictate.
        n_zs    += count_if(k2d, 0) + count_if(kv, 0) + count_if(kh, 0);
        n_shift += count_if(k2d, 1) + count_if(kv, 1) + count_if(kh, 1);
        n_mult  += count_if(k2d, 2) + count_if(kv, 2) + count_if(kh, 2);
        // 25 products: levels hold 25, 13, 7, 4 values, odd at three levels.
        n_odd += 3;
      end
    end
    @(negedge clk);
    win_valid = 1'b0;
    col_valid = 1'b0;
    repeat (LAT_SEP + 2) begin
      check("2d", res2d_valid, res2d, q2d);
      check("sep", ressep_valid, ressep, qsep);
      @(negedge clk);
    end
    checks++;
    if (q2d.size() != 0 || qsep.size() != 0) begin
      failures++;
      $display("FAIL: %0d / %0d results never appeared", q2d.size(), qsep.size());
    end

    mech("idle beats", n_bubble);
    mech("zero-skipped positions", n_zs);
    mech("shift units", n_shift);
    mech("constant multipliers", n_mult);
    mech("pre-computed products", n_reuse);
    mech("odd adder-tree levels", n_odd);
    mech("negative results", n_neg);
    mech("windows inside image", n_inside);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
