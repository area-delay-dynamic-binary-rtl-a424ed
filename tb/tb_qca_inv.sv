// tb_qca_inv: checks the inverter on both input values.
module tb_qca_inv;
  logic x, y;
  int checks = 0, failures = 0;

  qca_inv dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      x = 1'(v);
      #1;
      checks++;
      if (y !== (v == 0)) begin
        failures++;
        $display("FAIL x=%b y=%b", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
