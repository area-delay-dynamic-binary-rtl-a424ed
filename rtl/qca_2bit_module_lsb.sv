// qca_2bit_module_lsb: the 2-bit module at bit positions 0 and 1.
//
// The adder has no carry-in (c0 = 0), so the general module simplifies:
// p0 is not needed, c1 = g0 = a0 & b0, and with c0 = 0 the final majority
// M(X_g, X_p, 0) = X_g & X_p reduces to X_g, so c2 = M(a1, b1, g0).
// Two cascaded majority gates from the operands to c2. Combinational.
module qca_2bit_module_lsb (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       c1,   // c1
  output logic       c2    // c2
);
  logic g0;

  qca_maj u_g0 (.x({a[0], b[0], 1'b0}), .y(g0));   // AND
  qca_maj u_c2 (.x({a[1], b[1], g0}),   .y(c2));
  assign c1 = g0;
endmodule
