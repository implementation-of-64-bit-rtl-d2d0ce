// bec: M-bit binary to excess-1 converter (BEC-1).
//
// Produces x = b + 1 modulo 2^M with far fewer gates than an adder:
//   x[0] = ~b[0]
//   x[i] = b[i] xor (b[0] & b[1] & ... & b[i-1])      for i >= 1
// The AND terms are formed by a rippling chain, one AND per bit. In the
// modified carry select adder an (N+1)-bit BEC takes the N sum bits and the
// carry of a group's carry-in-0 ripple adder and yields the group's result
// for a carry in of 1, replacing the second ripple adder. The result never
// wraps there, since a + b <= 2^(N+1) - 2. Purely combinational, no clock.
module bec #(
  parameter int unsigned M = 6
) (
  input  logic [M-1:0] b,
  output logic [M-1:0] x
);
  assign x[0] = ~b[0];

  if (M > 1) begin : g_upper
    // t[i] = b[0] & ... & b[i], the carry into bit i+1
    logic [M-2:0] t;

    assign t[0] = b[0];
    for (genvar i = 1; i < M; i++) begin : g_bit
      if (i < M - 1) begin : g_and
        assign t[i] = t[i-1] & b[i];
      end
      xor2_aoi u_xor (.a(b[i]), .b(t[i-1]), .y(x[i]));
    end
  end
endmodule
