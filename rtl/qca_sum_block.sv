// qca_sum_block: sum bit of one position from two majority gates.
//
//   s_i = M( ~c_(i+1), M(a_i, b_i, ~c_i), c_i )
// Together with the carry gate c_(i+1) = M(a_i, b_i, c_i) this is a full
// adder of three majority gates and two inverters. Once c_(i+1) is known
// the sum needs one inverter and two cascaded majority gates (the ~c_i
// inverter works in parallel). The exact gate arrangement of the sum is
// this design's choice; it uses the carries the chain already produces.
// Combinational.
module qca_sum_block (
  input  logic a,
  input  logic b,
  input  logic ci,  // c_i
  input  logic co,  // c_(i+1)
  output logic s
);
  logic ci_n, co_n, t;

  qca_inv u_ici (.x(ci), .y(ci_n));
  qca_inv u_ico (.x(co), .y(co_n));
  qca_maj u_t   (.x({a, b, ci_n}),  .y(t));
  qca_maj u_s   (.x({co_n, t, ci}), .y(s));
endmodule
