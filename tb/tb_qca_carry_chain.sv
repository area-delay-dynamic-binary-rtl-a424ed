// tb_qca_carry_chain: checks the carries of the 128-bit chain against
// integer addition. With s = a + b, the carry into bit i is s_i ^ a_i ^ b_i,
// so the expected carry vector is s ^ a ^ b (bit N is the carry-out).
//
// Two instances are tested. The combinational one (ZONED = 0) is checked
// right after each new pair. The clocked one (the default) receives a new
// pair on every clock edge; carries c(2k+1), c(2k+2) of a pair must appear
// exactly k+2 edges after it was presented, so each carry pair is compared
// with the reference of the operand pair from k+2 edges earlier.
// Directed patterns cover the worst case (carry born at bit 0 and
// propagated to the top), all-propagate with no carry, all-ones and
// all-zeros; random pairs, half with long propagate runs, cover the rest.
module tb_qca_carry_chain;
  localparam int unsigned N = 128;
  localparam int NTEST = 1500;
  logic clk = 1'b0;
  logic [N-1:0] a, b;
  logic [N:0]   c_comb, c_zone, cref;
  logic [N:0]   ref_hist [$];
  int checks = 0, failures = 0;

  qca_carry_chain #(.N(N), .ZONED(1'b0)) dut_comb (.clk(clk), .a(a), .b(b), .c(c_comb));
  qca_carry_chain #(.N(N))               dut     (.clk(clk), .a(a), .b(b), .c(c_zone));

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int w = 0; w < N / 32; w++) r[w*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NTEST; t++) begin
      case (t % 500)
        0:       begin a = '1;           b = N'(1);        end
        1:       begin a = '1;           b = '1;           end
        2:       begin a = '0;           b = '0;           end
        3:       begin a = {N/2{2'b01}}; b = {N/2{2'b10}}; end
        default: begin a = rnd();        b = (t % 2 == 1) ? ~a ^ N'(t) : rnd(); end
      endcase
      #1;
      cref = ({1'b0, a} + {1'b0, b}) ^ {1'b0, a} ^ {1'b0, b};
      checks++;
      if (c_comb !== cref) begin
        failures++;
        if (failures < 10) $display("FAIL comb a=%h b=%h c=%h expected %h", a, b, c_comb, cref);
      end
      ref_hist.push_back(cref);
      // clocked chain: carry pair k belongs to the pair presented k+2 edges ago
      if (ref_hist.size() > N / 2 + 1) begin
        int last;
        last = ref_hist.size() - 1;
        checks++;
        for (int k = 0; k < N / 2; k++) begin
          logic [N:0] r;
          r = ref_hist[last - (k + 2)];
          if (c_zone[2*k+1 +: 2] !== r[2*k+1 +: 2]) begin
            failures++;
            if (failures < 10) $display("FAIL zoned t=%0d pair %0d", t, k);
          end
        end
      end
      #4 clk = 1'b1;
      #5 clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
