// csla_pkg: group partitioning of the square-root carry select adder.
//
// A square-root carry select adder splits the operand into groups whose
// widths grow by one bit per group, so that the ripple delay inside a group
// keeps pace with the carry arriving at its multiplexer. Group 0 is a 2-bit
// ripple carry adder that takes the external carry in. Group 1 is again 2
// bits wide and every following group is one bit wider than the one below,
// until the remaining bits are too few; the last group takes what is left.
// For 64 bits this gives 2,2,3,4,5,6,7,8,9,10,8 (eleven groups, the widest
// needing a 22:11 multiplexer), and for 16 bits the classic 2,2,3,4,5.
// The growth rule and the 2-bit start follow the adder described; the way
// the leftover bits are folded into one last group is this design's choice.
package csla_pkg;

  // Width of group 0, the plain ripple carry adder with the external carry.
  localparam int unsigned G0_WIDTH = 2;

  // Width of group i (0-based) of a WIDTH-bit adder; 0 past the last group.
  function automatic int unsigned group_size(int unsigned width, int unsigned i);
    int unsigned rem;
    int unsigned k;
    int unsigned sz;
    if (width <= G0_WIDTH) return (i == 0) ? width : 0;
    if (i == 0) return G0_WIDTH;
    rem = width - G0_WIDTH;
    k   = G0_WIDTH;
    sz  = 0;
    for (int unsigned g = 1; g <= i; g++) begin
      sz  = (k < rem) ? k : rem;
      rem = rem - sz;
      k   = k + 1;
    end
    return sz;
  endfunction

  // Number of groups of a WIDTH-bit adder.
  function automatic int unsigned num_groups(int unsigned width);
    int unsigned n;
    n = 0;
    while (group_size(width, n) != 0) n++;
    return n;
  endfunction

  // Bit position of the least significant bit of group i.
  function automatic int unsigned group_lsb(int unsigned width, int unsigned i);
    int unsigned lsb;
    lsb = 0;
    for (int unsigned g = 0; g < i; g++) lsb += group_size(width, g);
    return lsb;
  endfunction

endpackage
