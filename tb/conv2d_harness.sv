// conv2d_harness: drives one conv2d_direct instance and checks it.
//
// Windows are random (SLIDE = 0) or a sliding window in which every valid
// beat shifts each row left by one column and a random column enters on the
// right, starting from all zeros (SLIDE = 1, needed for PRECOMP = 1). Valid
// is random. For each valid window the expected result, the plain sum of
// coefficient * pixel, is queued with the clock at which it must appear:
// 1 + ceil(log2(non-zero coefficients)) clocks after the window. Every output
// is popped and compared, including its arrival clock. Counts are reported
// through the ports so that a testbench can run several harnesses.
module conv2d_harness
  import conv_pkg::*;
#(
  parameter int K = 3,
  parameter int KERNEL [K*K] = SOBEL3_X,
  parameter bit PRECOMP = 1'b0,
  parameter bit SLIDE = 1'b0,
  parameter int BEATS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int T = K * K;

  function automatic int nz_count();
    int n;
    n = 0;
    for (int i = 0; i < T; i++) if (KERNEL[i] != 0) n++;
    return n;
  endfunction

  localparam int LAT = 1 + $clog2(nz_count());

  logic              in_valid;
  logic [7:0]        win [T];
  logic              out_valid;
  logic signed [47:0] res;

  conv2d_direct #(.ROWS(K), .COLS(K), .IN_W(8), .IN_SIGNED(1'b0), .KERNEL(KERNEL),
                  .PRECOMP(PRECOMP), .OUT_W(48))
    u_dut (.clk, .rst_n, .in_valid, .win, .out_valid, .res);

  typedef struct { longint v; int due; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check_output();
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL K=%0d: unexpected result %0d", K, res);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (longint'(res) != e.v || cycle != e.due) begin
          failures++;
          $display("FAIL K=%0d: got %0d at %0d, exp %0d at %0d", K, res, cycle, e.v, e.due);
        end
      end
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < T; i++) win[i] = '0;
    @(posedge rst_n);
    for (int n = 0; n < BEATS; n++) begin
      @(negedge clk);
      check_output();
      in_valid = (n < BEATS - 1) && ($urandom_range(4, 0) != 0);
      if (!SLIDE) begin
        for (int i = 0; i < T; i++) win[i] = (n % 50 == 7) ? 8'hff : 8'($urandom);
      end else if (in_valid) begin
        for (int r = 0; r < K; r++) begin
          for (int c = 0; c < K - 1; c++) win[r*K+c] = win[r*K+c+1];
          win[r*K+K-1] = (n % 50 == 7) ? 8'hff : 8'($urandom);
        end
      end
      if (in_valid) begin
        longint s;
        s = 0;
        for (int i = 0; i < T; i++) s += longint'(KERNEL[i]) * longint'(win[i]);
        q.push_back('{v: s, due: cycle + LAT});
      end
    end
    repeat (LAT + 2) begin
      @(negedge clk);
      check_output();
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL K=%0d: %0d results never appeared", K, q.size());
    end
    done = 1'b1;
  end
endmodule
