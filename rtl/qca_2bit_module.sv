// qca_2bit_module: carry logic of two adjacent bit positions i and i+1.
//
// With p = a | b and g = a & b (an OR and an AND, i.e. majority gates with
// one input tied to 1 or 0), the carries out of the two positions are
//   c(i+1) = M(p_i, g_i, c_i)
//   c(i+2) = M( M(a_(i+1), b_(i+1), g_i), M(a_(i+1), b_(i+1), p_i), c_i )
// The second form equals the look-ahead expression
// g_(i+1) + p_(i+1) g_i + p_(i+1) p_i c_i, but the incoming carry c_i now
// crosses both positions through a single majority gate; everything else
// depends only on the operands and settles before the carry arrives.
// Combinational. Bit 0 of a/b is position i, bit 1 is position i+1.
module qca_2bit_module (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       ci,   // c_i
  output logic       c1,   // c_(i+1)
  output logic       c2    // c_(i+2)
);
  logic p0, g0, x_g, x_p;

  qca_maj u_p0 (.x({a[0], b[0], 1'b1}), .y(p0));   // OR
  qca_maj u_g0 (.x({a[0], b[0], 1'b0}), .y(g0));   // AND
  qca_maj u_xg (.x({a[1], b[1], g0}),   .y(x_g));  // g1 + p1 g0
  qca_maj u_xp (.x({a[1], b[1], p0}),   .y(x_p));  // g1 + p1 p0
  qca_maj u_c1 (.x({p0, g0, ci}),       .y(c1));
  qca_maj u_c2 (.x({x_g, x_p, ci}),     .y(c2));
endmodule
