// tb_qca_2bit_module_lsb: exhaustive check of the least significant 2-bit
// module (no carry-in) against integer addition of the two 2-bit operands.
module tb_qca_2bit_module_lsb;
  logic [1:0] a, b;
  logic c1, c2;
  int checks = 0, failures = 0;

  qca_2bit_module_lsb dut (.a(a), .b(b), .c1(c1), .c2(c2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int lo, full;
      {a, b} = 4'(v);
      #1;
      lo   = int'(a[0]) + int'(b[0]);
      full = int'(a) + int'(b);
      checks += 2;
      if (c1 !== lo[1]) begin
        failures++;
        $display("FAIL c1 a=%b b=%b got %b", a, b, c1);
      end
      if (c2 !== full[2]) begin
        failures++;
        $display("FAIL c2 a=%b b=%b got %b", a, b, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
