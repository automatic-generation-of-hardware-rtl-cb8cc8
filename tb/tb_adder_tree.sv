// tb_adder_tree: self-checking test of the pipelined adder tree.
//
// Three trees are driven in parallel from one random operand vector: N = 7
// (odd counts at two levels, so values are carried past a level), N = 8 (a
// full tree) and N = 1 (no level at all). Valid is random, so bubbles pass
// through the pipeline. Every output is matched against a queue of sums
// worked out here when the operands were applied, and must appear exactly
// ceil(log2(N)) clocks after its input.
module tb_adder_tree;
  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  logic signed [W-1:0] ops [8];
  logic signed [W-1:0] in7 [7];
  logic signed [W-1:0] in1 [1];
  logic                v7, v8, v1;
  logic signed [W-1:0] s7, s8, s1;

  for (genvar i = 0; i < 7; i++) begin : g_in7
    assign in7[i] = ops[i];
  end
  assign in1[0] = ops[0];

  adder_tree #(.N(7), .W(W)) u_t7 (.clk, .rst_n, .in_valid, .in(in7), .out_valid(v7), .sum(s7));
  adder_tree #(.N(8), .W(W)) u_t8 (.clk, .rst_n, .in_valid, .in(ops), .out_valid(v8), .sum(s8));
  adder_tree #(.N(1), .W(W)) u_t1 (.clk, .rst_n, .in_valid, .in(in1), .out_valid(v1), .sum(s1));

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  typedef struct { longint sum; int due; } exp_t;
  exp_t q7[$], q8[$], q1[$];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check_out(string name, logic v, logic signed [W-1:0] s, ref exp_t q[$]);
    if (v) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL %s: unexpected output", name);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (longint'(s) != e.sum || cycle != e.due) begin
          failures++;
          $display("FAIL %s: got %0d at %0d, exp %0d at %0d", name, s, cycle, e.sum, e.due);
        end
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
    in_valid = 1'b0;
    for (int i = 0; i < 8; i++) ops[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // outputs seen during this cycle
      check_out("N7", v7, s7, q7);
      check_out("N8", v8, s8, q8);
      check_out("N1", v1, s1, q1);
      in_valid = (n < 1999) && ($urandom_range(3, 0) != 0);
      for (int i = 0; i < 8; i++) ops[i] = W'(longint'($urandom_range(8191, 0)) - 4096);
      if (in_valid) begin
        longint a7, a8;
        a7 = 0;
        a8 = 0;
        for (int i = 0; i < 8; i++) begin
          if (i < 7) a7 += longint'(ops[i]);
          a8 += longint'(ops[i]);
        end
        q7.push_back('{sum: a7, due: cycle + 3});
        q8.push_back('{sum: a8, due: cycle + 3});
        // N = 1 is a wire: its output is sampled at the next check point.
        q1.push_back('{sum: longint'(ops[0]), due: cycle + 1});
      end
    end
    in_valid = 1'b0;
    repeat (6) begin
      @(negedge clk);
      check_out("N7", v7, s7, q7);
      check_out("N8", v8, s8, q8);
      check_out("N1", v1, s1, q1);
    end
    if (q7.size() != 0 || q8.size() != 0) begin
      failures++;
      $display("FAIL: outputs missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
