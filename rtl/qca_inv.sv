// qca_inv: QCA inverter, the second basic element next to the majority
// gate. y = ~x, combinational. Kept as its own module so that the adder
// netlists show the inverters the QCA layout needs.
module qca_inv (
  input  logic x,
  output logic y
);
  always_comb y = ~x;
endmodule
