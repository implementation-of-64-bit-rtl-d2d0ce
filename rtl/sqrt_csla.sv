// sqrt_csla: square-root carry select adder with binary to excess-1
// converters, 64 bits by default.
//
// The operands are cut into groups whose widths grow by one bit per group
// (2,2,3,4,5,6,7,8,9,10,8 for 64 bits; see csla_pkg). Group 0 is a 2-bit
// ripple carry adder that takes the external carry in. Every higher group
// (csla_group) forms its result for a carry in of 0 with a ripple adder and
// its result for a carry in of 1 with a BEC, both before its carry in
// arrives; the carry out of the group below then selects one through the
// group's multiplexer. The carry therefore passes each upper group through
// a single 2:1 mux, while the ripple inside a group, which grows with the
// group's width, overlaps with the carry's travel through the groups below.
// Using a BEC in place of the second (carry-in-1) ripple adder of the
// regular carry select adder is the point of the design: it needs fewer
// gates for the same function.
//
// Interface: {cout, sum} = a + b + cin, unsigned. Purely combinational: no
// clock, no reset, the result settles after the adder's propagation delay.
// WIDTH may be changed (16, 32 and 128 bits partition by the same rule).
module sqrt_csla
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = num_groups(WIDTH);

  // c[g] is the carry into group g; c[NG] is the adder's carry out.
  logic [NG:0] c;

  if (WIDTH < G0_WIDTH) begin : g_bad_width
    $error("sqrt_csla: WIDTH must be at least %0d", G0_WIDTH);
  end

  assign c[0] = cin;

  rca #(.N(group_size(WIDTH, 0))) u_g0 (
    .a   (a[group_size(WIDTH, 0)-1:0]),
    .b   (b[group_size(WIDTH, 0)-1:0]),
    .cin (c[0]),
    .sum (sum[group_size(WIDTH, 0)-1:0]),
    .cout(c[1])
  );

  for (genvar g = 1; g < NG; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(WIDTH, g);
    localparam int unsigned GW  = group_size(WIDTH, g);
    csla_group #(.N(GW)) u_grp (
      .a   (a[LSB +: GW]),
      .b   (b[LSB +: GW]),
      .cin (c[g]),
      .sum (sum[LSB +: GW]),
      .cout(c[g+1])
    );
  end

  assign cout = c[NG];
endmodule
