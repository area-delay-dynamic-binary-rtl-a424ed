// qca_adder_top: the novel N-bit QCA adder as a clocked unit.
//
// One rising edge of clk stands for one QCA clock phase (four phases make
// one QCA clock cycle). The operands are acquired in the first clock zone,
// added by the majority-gate netlist of qca_novel_adder, and the N+1-bit
// result (carry-out on the top bit) leaves the last zone
// LATENCY = N/2 + 4 phases after acquisition: one phase for acquisition,
// two for the least significant 2-bit module, one per further 2-bit module
// and two for the sum gates. That is 20 phases (5 cycles) at N = 32 and 36
// phases (9 cycles) at N = 64; at the default N = 128 it is 68 phases
// (17 cycles).
//
// Timing model: each clock zone of the QCA layout is a register on clk.
// The acquisition zone holds the operands; inside qca_novel_adder every
// 2-bit module of the carry chain occupies one zone, the least significant
// one two, and the sum gates two more, with the operands and early sums
// held in zones of their own so that everything meets in the right phase.
// A register pipeline accepts a new operand pair on every phase; a QCA
// layout takes one per clock cycle, which a driver obtains by asserting
// in_valid every fourth phase. in_valid/out_valid mark which waves carry
// data; rst_n (synchronous, active low) clears only the valid bits, so a
// reset discards every pair in flight.
module qca_adder_top
  import qca_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N:0]   sum
);
  localparam int unsigned LATENCY = latency_phases(N);

  logic [N-1:0] a_z, b_z;        // operands held in the acquisition zone
  logic [LATENCY-1:0] vld;       // valid bit of each zone

  // Clock zone 1: input acquisition.
  qca_phase_delay #(.W(2*N), .DEPTH(1)) u_acq (
    .clk(clk),
    .d  ({a, b}),
    .q  ({a_z, b_z})
  );

  // Zones 2 .. LATENCY: 2-bit modules one per phase, then the sum gates.
  qca_novel_adder #(.N(N), .ZONED(1'b1)) u_adder (
    .clk(clk),
    .a  (a_z),
    .b  (b_z),
    .sum(sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  assign out_valid = vld[LATENCY-1];

  if (N < 2 || N % 2 != 0) begin : g_bad_n
    $error("qca_adder_top: N must be even and at least 2");
  end
endmodule
