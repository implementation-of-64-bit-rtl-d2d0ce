// full_adder: one-bit full adder, the cell of the ripple carry adders.
//
// p = a xor b, s = p xor ci, co = (a & b) | (p & ci). Both XORs are the AOI
// form so the cell stays in AND/OR/inverter gates. The gate arrangement is
// this design's choice; only the full adder's function is fixed.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;

  xor2_aoi u_xor_p (.a(a),  .b(b),  .y(p));
  xor2_aoi u_xor_s (.a(p),  .b(ci), .y(s));
  assign co = (a & b) | (p & ci);
endmodule
