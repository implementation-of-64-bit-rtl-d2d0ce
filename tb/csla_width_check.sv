// csla_width_check: test driver for one sqrt_csla of width W, used by
// tb_sqrt_csla_widths. When start rises it applies corner vectors and NVEC
// random operand pairs, compares {cout, sum} with a (W+1)-bit addition done
// here, and then raises done with its check and failure counts. It also
// counts vectors whose carry rippled from bit 0 to the carry out.
module csla_width_check #(
  parameter int unsigned W    = 16,
  parameter int unsigned NVEC = 1000
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   full_ripple
);
  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  sqrt_csla #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0] expected;
    a   = ta;
    b   = tb;
    cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=%0d a=%h b=%h cin=%b -> %b_%h", W, ta, tb, tc, cout, sum);
    end
    if (((ta ^ tb) == '1) && tc) full_ripple++;
  endtask

  function automatic logic [W-1:0] rand_word();
    logic [W+31:0] w;
    w = '0;
    for (int i = 0; i < W; i += 32) w = (w << 32) | (W + 32)'($urandom);
    return w[W-1:0];
  endfunction

  initial begin
    done        = 1'b0;
    checks      = 0;
    failures    = 0;
    full_ripple = 0;
    a           = '0;
    b           = '0;
    cin         = 1'b0;
    wait (start);
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    apply({W{1'b1}} >> 1, {{(W-1){1'b0}}, 1'b1}, 1'b0);
    for (int i = 0; i < NVEC; i++) begin
      logic [W-1:0] x;
      x = rand_word();
      if (i % 4 == 0) apply(x, ~x, 1'b1);
      else            apply(x, rand_word(), 1'($urandom));
    end
    done = 1'b1;
  end
endmodule
