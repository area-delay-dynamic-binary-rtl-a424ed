// tb_qca_sum_block: checks the sum block for every a, b, c_i, feeding it
// the carry-out c_(i+1) a correct carry chain would deliver. The expected
// sum bit is bit 0 of a + b + c_i.
module tb_qca_sum_block;
  logic a, b, ci, co, s;
  int checks = 0, failures = 0;

  qca_sum_block dut (.a(a), .b(b), .ci(ci), .co(co), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      co = total[1];
      #1;
      checks++;
      if (s !== total[0]) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b s=%b", a, b, ci, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
