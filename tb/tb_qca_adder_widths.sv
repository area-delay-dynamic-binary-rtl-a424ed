// tb_qca_adder_widths: the novel adder at the operand widths it is compared
// at, 8, 16, 32 and 64 bits. For each width a worst-case addition (a carry
// born at bit 0 and carried to the carry-out) and random pairs are summed,
// and the latency is compared with the expected count of clock phases:
// 20 phases (five QCA cycles) at 32 bits and 36 phases (nine cycles) at 64
// bits, and n/2 + 4 phases for the smaller widths.
module tb_qca_adder_widths;
  logic clk = 1'b0, start = 1'b0;
  logic [3:0] done;
  int lat [4], chk [4], fl [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_adder_latency_probe #(.N(8),  .EXP_LAT(8))  p8  (.clk(clk), .start(start), .done(done[0]), .lat(lat[0]), .checks(chk[0]), .failures(fl[0]));
  tb_adder_latency_probe #(.N(16), .EXP_LAT(12)) p16 (.clk(clk), .start(start), .done(done[1]), .lat(lat[1]), .checks(chk[1]), .failures(fl[1]));
  tb_adder_latency_probe #(.N(32), .EXP_LAT(20)) p32 (.clk(clk), .start(start), .done(done[2]), .lat(lat[2]), .checks(chk[2]), .failures(fl[2]));
  tb_adder_latency_probe #(.N(64), .EXP_LAT(36)) p64 (.clk(clk), .start(start), .done(done[3]), .lat(lat[3]), .checks(chk[3]), .failures(fl[3]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    start = 1'b1;
    wait (done == 4'hF);
    for (int i = 0; i < 4; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("latency in phases: 8b=%0d 16b=%0d 32b=%0d (%0d cycles) 64b=%0d (%0d cycles)",
             lat[0], lat[1], lat[2], lat[2] / 4, lat[3], lat[3] / 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
