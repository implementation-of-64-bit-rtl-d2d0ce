// half_adder: one-bit half adder.
//
// s = a xor b (an AOI XOR), c = a & b. It sits in the least significant bit
// of each carry-in-0 ripple adder, where the carry in is known to be zero
// and a full adder would waste gates; that placement is this design's
// choice. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  xor2_aoi u_xor (.a(a), .b(b), .y(s));
  assign c = a & b;
endmodule
