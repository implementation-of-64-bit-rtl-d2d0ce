// rca: N-bit ripple carry adder with a carry input.
//
// A chain of N full adders; the carry of bit i feeds bit i+1, so the delay
// grows linearly with N. In the square-root carry select adder this is
// group 0: it adds the two least significant bits of the operands and the
// external carry in, and its carry out selects the result of group 1.
// Interface: sum/cout = a + b + cin. Purely combinational, no clock.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[N];
endmodule
