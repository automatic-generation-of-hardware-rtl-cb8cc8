// tb_gauss_quant: quantisation study on a 5x5 Gaussian (sigma 1.2).
//
// One synthetic 8-bit image (a smooth gradient with ripples and noise) is
// filtered by three generated parallel convolvers that differ only in the
// coefficient precision: 16 bits (max 65535), 8 bits (max 255) and 4 bits
// (max 15, where the four corners quantise to zero and are skipped). The
// window stream slides one column per beat, band by band, so the convolvers
// run with pre-computed products enabled.
//
// Every result is checked exactly, value and arrival clock, against the
// integer sum computed here. For windows inside the image the testbench also
// normalises each result by the sum of its coefficients and compares it with
// a real-valued Gaussian filter, accumulating the mean squared error
//   Error = 1/(w*h) * sum (g - g_hat)^2
// over the output pixels. The error must shrink as the precision grows
// (4 bit > 8 bit > 16 bit) and stay below one grey level squared at 16 bits.
module tb_gauss_quant;
  import conv_pkg::*;

  localparam int IMG_W = 40;
  localparam int IMG_H = 20;
  localparam int K = 5;
  localparam int NQ = 3;
  localparam real SIGMA = 1.2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic [7:0]         win [K*K];
  logic               ov [NQ];
  logic signed [31:0] res [NQ];

  conv2d_direct #(.KERNEL(GAUSS5_S12_Q16)) u_q16 (.clk, .rst_n, .in_valid, .win, .out_valid(ov[0]), .res(res[0]));
  conv2d_direct #(.KERNEL(GAUSS5_S12_Q8))  u_q8  (.clk, .rst_n, .in_valid, .win, .out_valid(ov[1]), .res(res[1]));
  conv2d_direct #(.KERNEL(GAUSS5_S12_Q4))  u_q4  (.clk, .rst_n, .in_valid, .win, .out_valid(ov[2]), .res(res[2]));

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected result, arrival clock, and the real-valued reference (negative
  // when the window is not wholly inside the image).
  typedef struct { longint v; int due; real ref_v; } exp_t;
  exp_t q [NQ][$];

  int  kq [NQ][K*K];
  int  lat [NQ];
  real ksum [NQ];
  real kreal [K*K];
  real sq_err [NQ];
  int  n_px = 0;

  logic [7:0] img [IMG_H][IMG_W];

  task automatic check_all();
    for (int j = 0; j < NQ; j++) begin
      if (ov[j]) begin
        checks++;
        if (q[j].size() == 0) begin
          failures++;
          $display("FAIL q%0d: unexpected result", j);
        end else begin
          exp_t e;
          e = q[j].pop_front();
          if (longint'(res[j]) != e.v || cycle != e.due) begin
            failures++;
            $display("FAIL q%0d: got %0d at %0d, exp %0d at %0d", j, res[j], cycle, e.v, e.due);
          end
          if (e.ref_v >= 0.0) begin
            real d;
            d = e.ref_v - real'(res[j]) / ksum[j];
            sq_err[j] += d * d;
            if (j == 0) n_px++;
          end
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real norm;
    // Kernels, their sums and latencies.
    for (int i = 0; i < K*K; i++) begin
      kq[0][i] = GAUSS5_S12_Q16[i];
      kq[1][i] = GAUSS5_S12_Q8[i];
      kq[2][i] = GAUSS5_S12_Q4[i];
    end
    for (int j = 0; j < NQ; j++) begin
      int nz;
      ksum[j] = 0.0;
      nz = 0;
      sq_err[j] = 0.0;
      for (int i = 0; i < K*K; i++) begin
        ksum[j] += real'(kq[j][i]);
        if (kq[j][i] != 0) nz++;
      end
      lat[j] = 1 + $clog2(nz);
    end
    // Real-valued, unit-sum Gaussian.
    norm = 0.0;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) begin
        kreal[r*K+c] = $exp(-real'((r-2)*(r-2) + (c-2)*(c-2)) / (2.0 * SIGMA * SIGMA));
        norm += kreal[r*K+c];
      end
    for (int i = 0; i < K*K; i++) kreal[i] /= norm;

    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int v;
        v = 20 + 4 * x + 3 * y + ((x / 3 + y / 2) % 4) * 12 + int'($urandom_range(24, 0));
        img[y][x] = (v > 255) ? 8'd255 : 8'(v);
      end

    in_valid = 1'b0;
    for (int i = 0; i < K*K; i++) win[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int y0 = 0; y0 + K <= IMG_H; y0++) begin
      for (int x = 0; x < IMG_W; x++) begin
        @(negedge clk);
        check_all();
        in_valid = 1'b1;
        for (int r = 0; r < K; r++) begin
          for (int c = 0; c < K - 1; c++) win[r*K+c] = win[r*K+c+1];
          win[r*K+K-1] = img[y0+r][x];
        end
        begin
          real rv;
          rv = -1.0;
          if (x >= K - 1) begin
            rv = 0.0;
            for (int i = 0; i < K*K; i++) rv += kreal[i] * real'(win[i]);
          end
          for (int j = 0; j < NQ; j++) begin
            longint s;
            s = 0;
            for (int i = 0; i < K*K; i++) s += longint'(kq[j][i]) * longint'(win[i]);
            q[j].push_back('{v: s, due: cycle + lat[j], ref_v: rv});
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) begin
      check_all();
      @(negedge clk);
    end
    for (int j = 0; j < NQ; j++) begin
      checks++;
      if (q[j].size() != 0) begin
        failures++;
        $display("FAIL q%0d: %0d results never appeared", j, q[j].size());
      end
    end

    $display("output pixels compared: %0d", n_px);
    $display("Error 16 bit: %e", sq_err[0] / real'(n_px));
    $display("Error  8 bit: %e", sq_err[1] / real'(n_px));
    $display("Error  4 bit: %e", sq_err[2] / real'(n_px));
    checks++;
    if (!(sq_err[2] > sq_err[1] && sq_err[1] > sq_err[0])) begin
      failures++;
      $display("FAIL: error does not fall with precision");
    end
    checks++;
    if (sq_err[0] / real'(n_px) >= 1.0) begin
      failures++;
      $display("FAIL: 16-bit error too large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
