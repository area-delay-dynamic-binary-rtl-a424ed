// qca_phase_delay: a word held through DEPTH QCA clock zones.
//
// In a QCA layout a signal advances from one clock zone to the next once
// per clock phase, and each zone holds its value while the next one
// settles. This module models that as DEPTH registers in series on the
// phase clock: q equals d from DEPTH rising edges earlier. No reset: the
// zones carry whatever wave entered them; a companion valid bit, delayed
// the same way, tells which waves are meaningful. DEPTH = 0 is a wire.
module qca_phase_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_zones
    logic [W-1:0] zone [DEPTH];

    always_ff @(posedge clk) begin
      zone[0] <= d;
      for (int unsigned k = 1; k < DEPTH; k++) zone[k] <= zone[k-1];
    end

    assign q = zone[DEPTH-1];
  end
endmodule
