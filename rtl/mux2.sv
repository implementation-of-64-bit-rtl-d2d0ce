// mux2: one-bit 2:1 multiplexer in AND/OR/inverter form.
//
// y = d0 when s = 0, d1 when s = 1, written as (d0 & ~s) | (d1 & s): one
// inverter, two ANDs and an OR in the unit-gate model. It is the cell from
// which the group multiplexers of the carry select adder are built.
// Purely combinational, no clock.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic s,
  output logic y
);
  logic ns;

  assign ns = ~s;
  assign y  = (d0 & ns) | (d1 & s);
endmodule
