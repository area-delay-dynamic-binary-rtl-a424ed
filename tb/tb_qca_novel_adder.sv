// tb_qca_novel_adder: checks the novel adder in both forms.
// The combinational 8-bit adder (ZONED = 0) is checked exhaustively over
// all 65536 operand pairs. The clocked 128-bit adder (the default) gets a
// new operand pair on every clock edge, directed worst cases among random
// pairs (half with long propagate runs); each sum must equal the integer
// sum of the pair presented N/2+3 = 67 edges earlier.
module tb_qca_novel_adder;
  localparam int unsigned N = 128;
  localparam int unsigned LAT = N / 2 + 3;
  localparam int NTEST = 2000;
  logic clk = 1'b0;
  logic [N-1:0] a, b;
  logic [N:0]   sum;
  logic [N:0]   exp_hist [$];
  logic [7:0]   a8, b8;
  logic [8:0]   sum8;
  int checks = 0, failures = 0;

  qca_novel_adder #(.N(N))               dut  (.clk(clk), .a(a),  .b(b),  .sum(sum));
  qca_novel_adder #(.N(8), .ZONED(1'b0)) dut8 (.clk(clk), .a(a8), .b(b8), .sum(sum8));

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int w = 0; w < N / 32; w++) r[w*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (sum8 !== {1'b0, a8} + {1'b0, b8}) begin
        failures++;
        if (failures < 10) $display("FAIL8 a=%h b=%h sum=%h", a8, b8, sum8);
      end
    end
    for (int t = 0; t < NTEST; t++) begin
      case (t % 400)
        0:       begin a = '1;           b = N'(1);        end
        1:       begin a = '1;           b = '1;           end
        2:       begin a = '0;           b = '0;           end
        3:       begin a = {N/2{2'b01}}; b = {N/2{2'b10}}; end
        default: begin a = rnd();        b = (t % 2 == 1) ? ~a ^ N'($urandom_range(0, 255)) : rnd(); end
      endcase
      #1;
      exp_hist.push_back({1'b0, a} + {1'b0, b});
      if (exp_hist.size() > LAT) begin
        checks++;
        if (sum !== exp_hist[exp_hist.size() - 1 - LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d sum=%h expected %h", t, sum,
                                      exp_hist[exp_hist.size() - 1 - LAT]);
        end
      end
      #4 clk = 1'b1;
      #5 clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
