// csla_group: one N-bit group of the BEC-based carry select adder.
//
// The group adds its operand slices once, in an N-bit ripple adder with a
// carry in of 0, giving an (N+1)-bit word {carry, sum}. An (N+1)-bit binary
// to excess-1 converter adds one to that word, which is exactly the result
// for a carry in of 1. A (2N+2):(N+1) multiplexer, selected by the carry
// from the group below, passes one of the two words on: its top bit is the
// carry to the next group. The slice addition does not wait for the carry,
// so the carry crosses the group through one 2:1 mux only.
// Interface: {cout, sum} = a + b + cin. Purely combinational, no clock.
module csla_group #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] r0;   // result for carry in 0: {carry, sum}
  logic [N:0] r1;   // result for carry in 1: r0 + 1

  rca_c0 #(.N(N)) u_rca (.a(a), .b(b), .sum(r0[N-1:0]), .cout(r0[N]));
  bec #(.M(N + 1)) u_bec (.b(r0), .x(r1));
  csla_mux #(.W(N + 1)) u_mux (.d0(r0), .d1(r1), .sel(cin), .y({cout, sum}));
endmodule
