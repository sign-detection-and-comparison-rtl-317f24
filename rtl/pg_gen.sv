// pg_gen: bit-level propagate / generate for one k-bit group, with inhibit.
//
// For every bit of the group p = x xor y and g = x and y, as in a
// carry-lookahead adder.  When en is 0 the group is inhibited: both outputs are
// held at 0 whatever the operands do, so no transition reaches the PG module
// behind it.  An inhibited group therefore presents (P, G) = (0, 0) to the
// rest of the network; the networks that use the enable account for that.
//
// Interface: x, y and p, g are K bits wide, index K-1 being the most
// significant bit of the group.  Purely combinational, one gate level.
// The p/g functions and the enable input follow the networks described for the
// low-transition tree; gating both outputs with an AND is this design's choice.
module pg_gen #(
  parameter int unsigned K = 4
) (
  input  logic         en,
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  output logic [K-1:0] p,
  output logic [K-1:0] g
);

  always_comb begin
    p = {K{en}} & (x ^ y);
    g = {K{en}} & x & y;
  end

endmodule
