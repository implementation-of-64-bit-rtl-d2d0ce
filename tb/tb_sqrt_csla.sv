// tb_sqrt_csla: end-to-end test of the 64-bit square-root carry select
// adder at its default parameters.
//
// Drives hand-picked corner operands (zero, all ones, alternating bits,
// a carry that must ripple through every group) followed by random operand
// pairs whose bits are drawn with varying density, and compares {cout, sum}
// with a 65-bit addition done in the testbench. For each upper group it
// works out, from the operands alone, the carry that arrives at the group's
// mux and counts how often the carry-in-0 (ripple adder) result and the
// carry-in-1 (BEC) result was selected; every group must see both. It also
// counts carry-out overflows and full-length carry propagation, and fails
// if either never occurred. Combinational; a watchdog ends a hung run.
module tb_sqrt_csla;
  import csla_pkg::*;

  localparam int unsigned W  = 64;
  localparam int unsigned NG = num_groups(W);

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;
  int           n_sel0 [NG];
  int           n_sel1 [NG];
  int           n_overflow = 0, n_full_ripple = 0;

  sqrt_csla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one vector, check the result and update the mechanism counters.
  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0] expected;
    logic [W:0] low;
    int unsigned lsb;
    bit          all_carry;
    a   = ta;
    b   = tb;
    cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b -> %b_%h expected %b_%h",
                 ta, tb, tc, cout, sum, expected[W], expected[W-1:0]);
    end
    all_carry = 1'b1;
    for (int unsigned g = 1; g < NG; g++) begin
      lsb = group_lsb(W, g);
      // carry into bit lsb: add the bits below it only
      low = ({1'b0, ta} & ((({{W{1'b0}}, 1'b1}) << lsb) - 1))
          + ({1'b0, tb} & ((({{W{1'b0}}, 1'b1}) << lsb) - 1))
          + {{W{1'b0}}, tc};
      if (low[lsb]) n_sel1[g]++;
      else begin
        n_sel0[g]++;
        all_carry = 1'b0;
      end
    end
    if (expected[W]) n_overflow++;
    // a carry born at bit 0 that reaches the carry out through every group
    if (all_carry && expected[W] && ((ta ^ tb) == '1) && tc) n_full_ripple++;
  endtask

  function automatic logic [W-1:0] rand_word(input int density);
    logic [W-1:0] w;
    for (int i = 0; i < W; i++) w[i] = (($urandom % 8) < density);
    return w;
  endfunction

  initial begin
    foreach (n_sel0[g]) begin
      n_sel0[g] = 0;
      n_sel1[g] = 0;
    end
    // corner cases
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply({(W/2){2'b01}}, {(W/2){2'b10}}, 1'b1);
    apply({(W/2){2'b01}}, {(W/2){2'b01}}, 1'b0);
    apply({(W/2){2'b10}}, {(W/2){2'b10}}, 1'b1);
    // a carry injected at each group boundary
    for (int unsigned g = 0; g < NG; g++) begin
      apply(~(({{(W-1){1'b0}}, 1'b1} << group_lsb(W, g)) - 1), '0, 1'b0);
      apply({W{1'b1}} >> g, {{(W-1){1'b0}}, 1'b1}, 1'b0);
    end
    // walking ones
    for (int i = 0; i < W; i++) begin
      apply({{(W-1){1'b0}}, 1'b1} << i, ~({{(W-1){1'b0}}, 1'b1} << i), 1'b1);
      apply({{(W-1){1'b0}}, 1'b1} << i, {{(W-1){1'b0}}, 1'b1} << i, 1'b0);
    end
    // random operands with bit densities from sparse to dense
    for (int i = 0; i < 200000; i++)
      apply(rand_word(int'($urandom % 9)), rand_word(int'($urandom % 9)), 1'($urandom));

    for (int unsigned g = 1; g < NG; g++) begin
      $display("group %0d (bits %0d..%0d): rca result selected %0d, bec result selected %0d",
               g, group_lsb(W, g), group_lsb(W, g) + group_size(W, g) - 1, n_sel0[g], n_sel1[g]);
      if (n_sel0[g] == 0 || n_sel1[g] == 0) failures++;
    end
    $display("overflow=%0d full_ripple=%0d", n_overflow, n_full_ripple);
    if (n_overflow == 0) failures++;
    if (n_full_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
