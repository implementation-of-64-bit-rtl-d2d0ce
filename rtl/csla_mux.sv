// csla_mux: 2W:W multiplexer of a carry select group.
//
// Chooses between a group's two candidate results, the one computed for a
// carry in of 0 (d0) and the one for a carry in of 1 (d1), using the carry
// that arrives from the group below as the select. W is the group width
// plus one, as the carry out is selected along with the sum bits, so a
// 5-bit group uses a 12:6 multiplexer. Built from W one-bit 2:1 muxes that
// share the select. Purely combinational, no clock.
module csla_mux #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    mux2 u_mux (.d0(d0[i]), .d1(d1[i]), .s(sel), .y(y[i]));
  end
endmodule
