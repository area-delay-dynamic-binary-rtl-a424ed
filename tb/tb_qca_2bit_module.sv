// tb_qca_2bit_module: exhaustive check of the 2-bit carry module over all
// 32 combinations of a[1:0], b[1:0] and the incoming carry. The expected
// carries come from integer addition: c(i+1) is bit 1 of a0+b0+ci and
// c(i+2) is bit 2 of a+b+ci.
module tb_qca_2bit_module;
  logic [1:0] a, b;
  logic ci, c1, c2;
  int checks = 0, failures = 0;

  qca_2bit_module dut (.a(a), .b(b), .ci(ci), .c1(c1), .c2(c2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int lo, full;
      {ci, a, b} = 5'(v);
      #1;
      lo   = int'(a[0]) + int'(b[0]) + int'(ci);
      full = int'(a) + int'(b) + int'(ci);
      checks += 2;
      if (c1 !== lo[1]) begin
        failures++;
        $display("FAIL c1 a=%b b=%b ci=%b got %b", a, b, ci, c1);
      end
      if (c2 !== full[2]) begin
        failures++;
        $display("FAIL c2 a=%b b=%b ci=%b got %b", a, b, ci, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
