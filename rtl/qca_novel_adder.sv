// qca_novel_adder: the novel n-bit QCA adder.
//
// The carry chain (N/2 cascaded 2-bit modules, two bit positions per
// majority gate) produces every carry; one sum block per bit then forms
// s_i from a_i, b_i, c_i and c(i+1). The adder has no carry-in. The
// result is N+1 bits wide with the carry-out as its top bit, as on the
// output bus of the QCA layout. Worst-case path: a carry generated at bit
// 0 and propagated to the top, N/2 + 3 majority gates and one inverter.
//
// Clock zones (ZONED = 1, the default): the carry chain advances one 2-bit
// module per clock phase (see qca_carry_chain). The sum of bits 2k and
// 2k+1 is formed in the phase after c(2k+2) is ready and held one more zone
// for the second sum gate; then it waits in further zones so that all sum
// bits and the carry-out leave together. Counting the edge that presents a
// and b as edge 0, sum is valid after edge N/2+3; with the acquisition zone
// in front (qca_adder_top) that is N/2+4 phases. A new operand pair may be
// presented on every edge. ZONED = 0 gives the combinational adder; clk is
// then unused.
module qca_novel_adder #(
  parameter int unsigned N     = 128,
  parameter bit          ZONED = 1'b1
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  localparam int unsigned Z = ZONED ? 1 : 0;

  logic [N:0] c;

  qca_carry_chain #(.N(N), .ZONED(ZONED)) u_chain (
    .clk(clk),
    .a  (a),
    .b  (b),
    .c  (c)
  );

  for (genvar k = 0; k < N / 2; k++) begin : g_pair
    logic [1:0] ak, bk, sk;
    logic       c_lo;   // c(2k), aligned with c(2k+1) and c(2k+2)

    // Operands meet the carries of their pair after edge k+2.
    qca_phase_delay #(.W(4), .DEPTH((k+2)*Z)) u_opnd (
      .clk(clk),
      .d  ({a[2*k+1:2*k], b[2*k+1:2*k]}),
      .q  ({ak, bk})
    );

    if (k == 0) begin : g_c0
      assign c_lo = c[0];
    end else begin : g_ck
      qca_phase_delay #(.W(1), .DEPTH(Z)) u_clo (
        .clk(clk),
        .d  (c[2*k]),
        .q  (c_lo)
      );
    end

    qca_sum_block u_s0 (.a(ak[0]), .b(bk[0]), .ci(c_lo),     .co(c[2*k+1]), .s(sk[0]));
    qca_sum_block u_s1 (.a(ak[1]), .b(bk[1]), .ci(c[2*k+1]), .co(c[2*k+2]), .s(sk[1]));

    // Two zones for the sum gates, then wait for the most significant pair.
    qca_phase_delay #(.W(2), .DEPTH((N/2 + 1 - k)*Z)) u_szones (
      .clk(clk),
      .d  (sk),
      .q  (sum[2*k+1:2*k])
    );
  end

  // Carry-out: ready after edge N/2+1, held through the two sum phases.
  qca_phase_delay #(.W(1), .DEPTH(2*Z)) u_cout (
    .clk(clk),
    .d  (c[N]),
    .q  (sum[N])
  );
endmodule
