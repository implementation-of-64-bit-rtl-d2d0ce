// xor2_aoi: two-input exclusive OR built from AND, OR and inverter gates.
//
// y = (a & ~b) | (~a & b). In the unit-gate model used to compare carry
// select adders, every AND, OR and inverter counts one unit of delay and one
// of area, so this XOR is three gate levels deep (inverter, AND, OR). Using
// the AOI form, rather than the ^ operator, keeps the adder's netlist in the
// same gate vocabulary as that model. Purely combinational, no clock.
module xor2_aoi (
  input  logic a,
  input  logic b,
  output logic y
);
  logic na, nb, t0, t1;

  assign na = ~a;
  assign nb = ~b;
  assign t0 = a & nb;
  assign t1 = na & b;
  assign y  = t0 | t1;
endmodule
