// sd_iter_lt: low-transition iterative sign detector for x + y.
//
// x = x0.x1...xn and y = y0.y1...yn are two's-complement fractions; the sign
// of their sum is x0 xor y0 xor c0, c0 being the carry out of fraction bit 1.
// Only the most significant carry-propagate chain decides c0, so instead of a
// ripple-carry chain this network runs a "chain" signal h from the most
// significant bit downwards:
//   h_0 = 1 (input h0),  h_i = h_{i-1} x_i y_i' + h_{i-1} x_i' y_i
// h_i = 1 means bits 1..i all propagate.  The first bit j where the chain stops
// decides the carry: q_i = h_{i-1} x_i y_i (q_1 = x_1 y_1) and
//   c0 = q_1 + q_2 + ... + q_n,
// a wired OR on which at most one q is 1.  Below the end of the chain the
// h_i and q_i stay at 0, so bits there cause no transitions.
//
// Interface: x_frac / y_frac hold x1..xn, x1 at index N-1 (x_i at N-i).
// h0 is the chain input: 1 to operate; driving it to 0 clears every h_i, which
// is how the chain is reset between operations.  Outputs: c0 and sign.
// Purely combinational; worst-case delay is N gate pairs.
//
// Follows the design's equations and gate structure (two AND terms and an OR
// per h_i, an AND per q_i).  The h0 port is this design's way of clearing the
// chain; the original scheme simply ties h_0 to 1.
module sd_iter_lt #(
  parameter int unsigned N = 53
) (
  input  logic         x0,
  input  logic         y0,
  input  logic [N-1:0] x_frac,
  input  logic [N-1:0] y_frac,
  input  logic         h0,
  output logic         c0,
  output logic         sign
);

  // h[b] holds h_{N-b}: h[N] = h_0, h[N-1] = h_1, ..., h[1] = h_{N-1}.
  logic [N:1]   h;
  logic [N-1:0] q;   // q[b] holds q_{N-b}

  always_comb begin
    h[N]   = h0;
    q[N-1] = x_frac[N-1] & y_frac[N-1];
    for (int b = int'(N) - 1; b >= 1; b--) begin
      h[b] = (h[b+1] & x_frac[b] & ~y_frac[b]) | (h[b+1] & ~x_frac[b] & y_frac[b]);
    end
    for (int b = int'(N) - 2; b >= 0; b--) begin
      q[b] = h[b+1] & x_frac[b] & y_frac[b];
    end
    c0   = |q;
    sign = x0 ^ y0 ^ c0;
  end

  // The chain stops at one bit, so at most one q can be 1 (a wired OR is safe).
  always_comb begin
    a_one_q : assert ((q & (q - 1'b1)) == '0)
      else $error("sd_iter_lt: more than one q_i is 1");
  end

endmodule
