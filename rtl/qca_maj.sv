// qca_maj: three-input majority gate, the basic QCA logic element.
//
// y = m(x0, x1, x2) = x0 x1 + x1 x2 + x0 x2. Holding one input at 0 turns
// it into an AND gate, holding one at 1 into an OR gate; the adders in this
// library use it in all three roles. Purely combinational.
//
// The equivalent form x1 x2 + x0 (x1 + x2) is used so that x0 appears only
// once: the adders feed their incoming carry into x0 (the last element of
// the {.., .., carry} concatenation), and a simulator that flattens a long
// carry chain into one expression then keeps it linear in length.
module qca_maj (
  input  logic [2:0] x,
  output logic       y
);
  always_comb y = (x[1] & x[2]) | (x[0] & (x[1] | x[2]));
endmodule
