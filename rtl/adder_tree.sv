// adder_tree: pipelined binary adder tree.
//
// Sums N signed W-bit operands. Level l pairs up the values left by level
// l-1 (operand 2i with operand 2i+1); an odd value at the end of a level is
// carried to the next level unchanged. Every level ends in a register, so a
// level only waits for the level before it and the clock period is one
// adder, whatever the kernel size. The number of operands is that of the
// non-zero kernel coefficients, so zero-skipped positions shrink the tree.
//
// Interface: in_valid qualifies in; sum and out_valid appear LEVELS =
// ceil(log2(N)) clocks later (zero clocks, a wire, when N = 1). W must hold
// the full sum; the parent sizes it from the kernel, so no adder overflows.
// The valid bit travels with the data; data registers run freely and are
// cleared by the active-low synchronous reset.
//
// Origin: the level-by-level pipelined tree, the pairing of neighbouring
// operands and the tree sized to the non-zero coefficients follow the
// original convolver generator; carrying odd values, the uniform width and
// the valid bit are this design's choices.
module adder_tree #(
  parameter int N = 25,
  parameter int W = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in [N],
  output logic                out_valid,
  output logic signed [W-1:0] sum
);

  localparam int LEVELS = $clog2(N);

  // Values present after level l.
  function automatic int count_at(int l);
    int c;
    c = N;
    for (int k = 0; k < l; k++) c = (c + 1) / 2;
    return c;
  endfunction

  // node[l][i]: value i after level l; node[0] is the input.
  logic signed [W-1:0] node  [LEVELS+1][N];
  logic                vld   [LEVELS+1];

  assign node[0] = in;
  assign vld[0]  = in_valid;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int PREV = count_at(l - 1);
    for (genvar i = 0; i < N; i++) begin : g_node
      if (2 * i + 1 < PREV) begin : g_add
        always_ff @(posedge clk) begin
          if (!rst_n) node[l][i] <= '0;
          else        node[l][i] <= node[l-1][2*i] + node[l-1][2*i+1];
        end
      end else if (2 * i < PREV) begin : g_pass
        always_ff @(posedge clk) begin
          if (!rst_n) node[l][i] <= '0;
          else        node[l][i] <= node[l-1][2*i];
        end
      end else begin : g_unused
        assign node[l][i] = '0;
      end
    end
    always_ff @(posedge clk) begin
      if (!rst_n) vld[l] <= 1'b0;
      else        vld[l] <= vld[l-1];
    end
  end

  assign sum       = node[LEVELS][0];
  assign out_valid = vld[LEVELS];

endmodule
