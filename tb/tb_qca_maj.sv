// tb_qca_maj: exhaustive check of the three-input majority gate, plus the
// AND/OR behaviour obtained by tying one input to 0 or 1. The expected
// value is the count of ones compared with two.
module tb_qca_maj;
  logic [2:0] x;
  logic       y;
  int checks = 0, failures = 0;

  qca_maj dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      x = 3'(v);
      #1;
      ones = int'(x[0]) + int'(x[1]) + int'(x[2]);
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("FAIL x=%b y=%b", x, y);
      end
      // tied input: 0 gives AND, 1 gives OR of the other two
      checks++;
      if (x[2] == 1'b0 && y !== (x[0] & x[1])) failures++;
      if (x[2] == 1'b1 && y !== (x[0] | x[1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
