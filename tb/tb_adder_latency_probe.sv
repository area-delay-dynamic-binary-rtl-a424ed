// tb_adder_latency_probe: drives one qca_adder_top of width N with a
// worst-case addition (all ones + 1) followed by random pairs, one per QCA
// clock cycle, and reports the measured latency of the worst-case pair in
// clock phases together with its own check and failure counts. Used by
// tb_qca_adder_widths to compare several widths with expected latencies.
module tb_adder_latency_probe #(
  parameter int unsigned N       = 32,
  parameter int unsigned EXP_LAT = 20
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   lat,
  output int   checks,
  output int   failures
);
  logic rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [N-1:0] a = '0, b = '0;
  logic [N:0]   sum;
  logic [N:0]   exp_q [$];
  int phase = 0, t_first = -1;

  qca_adder_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .sum(sum)
  );

  always @(posedge clk) phase <= phase + 1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) failures++;
      else if (sum !== exp_q.pop_front()) begin
        failures++;
        $display("FAIL N=%0d sum=%h", N, sum);
      end
      if (lat < 0) lat = phase - t_first;
    end
  end

  initial begin
    done = 1'b0; lat = -1; checks = 0; failures = 0;
    wait (start);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      a = (t == 0) ? '1 : N'({$urandom, $urandom});
      b = (t == 0) ? N'(1) : N'({$urandom, $urandom});
      in_valid = 1'b1;
      exp_q.push_back({1'b0, a} + {1'b0, b});
      if (t == 0) t_first = phase;
      repeat (3) @(negedge clk) in_valid = 1'b0;  // one pair per cycle
    end
    @(negedge clk) in_valid = 1'b0;
    wait (exp_q.size() == 0);
    @(negedge clk);
    checks++;
    if (lat != int'(EXP_LAT)) begin
      failures++;
      $display("FAIL N=%0d latency %0d phases, expected %0d", N, lat, EXP_LAT);
    end
    done = 1'b1;
  end
endmodule
