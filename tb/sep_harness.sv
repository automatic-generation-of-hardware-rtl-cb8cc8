// sep_harness: drives one conv_sep instance and checks it.
//
// A random pixel column is offered on random valid beats. The harness keeps
// its own copy of the last M columns (all zero after reset) and expects, for
// each column, the full 2D sum of KV[r] * KH[c] * pixel[r][c] over that
// window, i.e. the direct convolution with the outer-product kernel, at
// exactly (1 + ceil(log2 nz(KV))) + 1 + (1 + ceil(log2 nz(KH))) clocks after
// the column. Counts are reported through the ports.
module sep_harness
  import conv_pkg::*;
#(
  parameter int M = 3,
  parameter int KV [M] = BINOM3_1D,
  parameter int KH [M] = BINOM3_1D,
  parameter int BEATS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  function automatic int nz(input int k [M]);
    int n;
    n = 0;
    for (int i = 0; i < M; i++) if (k[i] != 0) n++;
    return n;
  endfunction

  localparam int LAT = (1 + $clog2(nz(KV))) + 1 + (1 + $clog2(nz(KH)));

  logic               in_valid;
  logic [7:0]         col [M];
  logic               out_valid;
  logic signed [47:0] res;
  int                 hist [M][M];

  conv_sep #(.M(M), .IN_W(8), .KV(KV), .KH(KH), .PRECOMP(1'b1), .OUT_W(48))
    u_dut (.clk, .rst_n, .in_valid, .col, .out_valid, .res);

  typedef struct { longint v; int due; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check_output();
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL M=%0d: unexpected result %0d", M, res);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (longint'(res) != e.v || cycle != e.due) begin
          failures++;
          $display("FAIL M=%0d: got %0d at %0d, exp %0d at %0d", M, res, cycle, e.v, e.due);
        end
      end
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    in_valid = 1'b0;
    for (int r = 0; r < M; r++) begin
      col[r] = '0;
      for (int c = 0; c < M; c++) hist[r][c] = 0;
    end
    @(posedge rst_n);
    for (int n = 0; n < BEATS; n++) begin
      @(negedge clk);
      check_output();
      in_valid = (n < BEATS - 1) && ($urandom_range(4, 0) != 0);
      for (int r = 0; r < M; r++) col[r] = (n % 40 == 5) ? 8'hff : 8'($urandom);
      if (in_valid) begin
        longint s;
        s = 0;
        for (int r = 0; r < M; r++) begin
          for (int c = 0; c < M - 1; c++) hist[r][c] = hist[r][c+1];
          hist[r][M-1] = int'(col[r]);
        end
        for (int r = 0; r < M; r++)
          for (int c = 0; c < M; c++)
            s += longint'(KV[r]) * longint'(KH[c]) * longint'(hist[r][c]);
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
      $display("FAIL M=%0d: %0d results never appeared", M, q.size());
    end
    done = 1'b1;
  end
endmodule
