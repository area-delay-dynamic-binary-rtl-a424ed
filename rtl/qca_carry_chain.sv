// qca_carry_chain: carry chain of the novel n-bit adder.
//
// N/2 2-bit modules in cascade. The least significant one is the simplified
// module for carry-in 0; each of the others takes c(2k) from its neighbour
// and returns c(2k+1) and c(2k+2). The carry therefore crosses two bit
// positions per majority gate: a carry generated at bit 0 reaches the top
// after 2 + (N-2)/2 cascaded gates. Output c[i] is the carry into bit i,
// c[0] = 0 (there is no carry-in) and c[N] is the carry-out.
//
// Clock zones (ZONED = 1, the default): as in a clocked QCA layout, every
// module output passes one clock zone (a register on clk, one QCA phase)
// before the next module sees it. Counting the edge that presents a and b
// as edge 0, c[1] and c[2] are valid after edge 2 (the least significant
// module spans two phases, one for g0 and one for c2), and c[2k+1],
// c[2k+2] after edge 2+k; c[N] after edge N/2+1. The operands reach module
// k through k+1 zones so that they meet the carry in the same phase. New
// operands may be presented on every edge: the chain is a pipeline.
// ZONED = 0 removes every zone and leaves the combinational chain; clk is
// then unused.
module qca_carry_chain #(
  parameter int unsigned N     = 128,
  parameter bit          ZONED = 1'b1
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   c
);
  if (N < 2 || N % 2 != 0) begin : g_bad_n
    $error("qca_carry_chain: N must be even and at least 2");
  end

  localparam int unsigned Z = ZONED ? 1 : 0;

  logic [1:0] lsb_c;

  assign c[0] = 1'b0;

  qca_2bit_module_lsb u_lsb (
    .a (a[1:0]),
    .b (b[1:0]),
    .c1(lsb_c[0]),
    .c2(lsb_c[1])
  );

  qca_phase_delay #(.W(2), .DEPTH(2*Z)) u_lsb_zones (
    .clk(clk),
    .d  (lsb_c),
    .q  (c[2:1])
  );

  for (genvar k = 1; k < N / 2; k++) begin : g_mod
    logic [1:0] ak, bk, ck;

    // Operands wait k+1 zones for the carry from the modules below.
    qca_phase_delay #(.W(4), .DEPTH((k+1)*Z)) u_opnd (
      .clk(clk),
      .d  ({a[2*k+1:2*k], b[2*k+1:2*k]}),
      .q  ({ak, bk})
    );

    qca_2bit_module u_mod (
      .a (ak),
      .b (bk),
      .ci(c[2*k]),
      .c1(ck[0]),
      .c2(ck[1])
    );

    qca_phase_delay #(.W(2), .DEPTH(Z)) u_zone (
      .clk(clk),
      .d  (ck),
      .q  (c[2*k+2:2*k+1])
    );
  end
endmodule
