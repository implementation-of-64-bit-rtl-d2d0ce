// rca_c0: N-bit ripple carry adder for a carry input of 0.
//
// Each upper group of the carry select adder computes its slice once, with
// the carry in assumed 0; the BEC then derives the carry-in-1 result from
// it. Since that carry in is a constant, bit 0 is a half adder and bits 1 to
// N-1 are full adders in a ripple chain (the half adder is this design's
// choice). Interface: {cout, sum} = a + b. Purely combinational, no clock.
module rca_c0 #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(sum[0]), .c(c[1]));
  for (genvar i = 1; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign c[0] = 1'b0;
  assign cout = c[N];
endmodule
