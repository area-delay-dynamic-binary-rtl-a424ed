// tb_qca_phase_delay: drives random words into a 5-zone delay and checks
// that each leaves exactly 5 clock edges later, using a history kept by
// the testbench. Also checks the DEPTH = 0 (wire) form.
module tb_qca_phase_delay;
  localparam int unsigned W = 8, DEPTH = 5;
  logic clk = 1'b0;
  logic [W-1:0] d, q, q0;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  qca_phase_delay #(.W(W), .DEPTH(DEPTH)) dut (.clk(clk), .d(d), .q(q));
  qca_phase_delay #(.W(W), .DEPTH(0))     dut0 (.clk(clk), .d(d), .q(q0));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (hist.size() >= DEPTH) begin
        checks++;
        if (q !== hist[hist.size()-DEPTH]) begin
          failures++;
          $display("FAIL t=%0d q=%h expected %h", t, q, hist[hist.size()-DEPTH]);
        end
      end
      d = W'($urandom);
      #1;
      checks++;
      if (q0 !== d) failures++;
      @(posedge clk);
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
