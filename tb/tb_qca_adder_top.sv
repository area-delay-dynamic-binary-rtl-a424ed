// tb_qca_adder_top: end-to-end test of the clocked novel adder at its
// default width (128 bits, latency 68 clock phases = 17 QCA cycles).
//
// The driver applies operand pairs on the falling edge; a scoreboard
// remembers each pair with the phase in which it was acquired and checks,
// for every result, the sum, the carry-out and that exactly 68 phases
// passed. The run is made of: single additions with idle gaps, a burst
// with a new pair on every phase, a stream at the QCA rate of one pair per
// clock cycle (every fourth phase), and a reset in the middle of a burst
// that must discard the pairs in flight. The testbench counts how often
// each situation the design must handle occurred (worst-case carry
// propagation from bit 0 to the carry-out, carry-out set, no carry at all,
// back-to-back pairs, one-per-cycle stream, reset flush) and counts a
// failure for any that never did.
module tb_qca_adder_top;
  localparam int unsigned N = 128;
  localparam int unsigned LAT = N / 2 + 4;     // 68 phases
  localparam int unsigned LAT_CYCLES = 17;     // four phases per cycle

  typedef struct {
    logic [N-1:0] a, b;
    longint       t_acq;
  } op_t;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [N-1:0] a = '0, b = '0;
  logic [N:0]   sum;
  longint phase = 0;
  op_t    pending [$];
  int checks = 0, failures = 0;
  int n_worst = 0, n_cout = 0, n_nocarry = 0, n_b2b = 0, n_qca_rate = 0, n_flush = 0;
  bit last_in_valid = 0;

  qca_adder_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .sum(sum)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    phase <= phase + 1;
    if (rst_n && in_valid) begin
      pending.push_back('{a: a, b: b, t_acq: phase});
      if (last_in_valid) n_b2b++;
    end
    last_in_valid <= rst_n && in_valid;
  end

  // Scoreboard: compare on the falling edge, after the outputs settled.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      op_t op;
      logic [N:0] exp_sum;
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at phase %0d", phase);
      end else begin
        op = pending.pop_front();
        exp_sum = {1'b0, op.a} + {1'b0, op.b};
        if (sum !== exp_sum) begin
          failures++;
          $display("FAIL a=%h b=%h sum=%h expected %h", op.a, op.b, sum, exp_sum);
        end
        checks++;
        if (phase - op.t_acq != longint'(LAT)) begin
          failures++;
          $display("FAIL latency %0d phases, expected %0d", phase - op.t_acq, LAT);
        end
        if (op.a == '1 && op.b == N'(1)) n_worst++;
        if (exp_sum[N]) n_cout++;
        if ((op.a & op.b) == '0) n_nocarry++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic [N-1:0] x, input logic [N-1:0] y);
    @(negedge clk);
    a = x; b = y; in_valid = 1'b1;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      a = N'($urandom); b = N'($urandom);     // junk on idle phases
    end
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int w = 0; w < N / 32; w++) r[w*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    int drained;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Single additions, separated by idle phases.
    drive('1, N'(1));                      // worst-case carry propagation
    idle(LAT + 2);
    drive({N/2{2'b01}}, {N/2{2'b10}});     // all propagate, no carry
    idle(5);
    drive('1, '1);
    idle(LAT + 2);

    // Burst: a new pair on every phase.
    for (int t = 0; t < 100; t++) begin
      if (t % 10 == 0) drive('1, N'(1));
      else             drive(rnd(), rnd());
    end
    idle(LAT + 2);

    // One pair per QCA clock cycle (every fourth phase).
    for (int t = 0; t < 60; t++) begin
      drive(rnd(), (t % 2 == 1) ? ~rnd() : rnd());
      idle(3);
      n_qca_rate++;
    end
    idle(LAT + 2);

    // Reset while a burst is in flight: those pairs must never appear.
    for (int t = 0; t < 20; t++) drive(rnd(), rnd());
    idle(10);
    @(negedge clk);
    rst_n = 1'b0;
    drained = pending.size();
    idle(2);
    pending.delete();
    @(negedge clk);
    rst_n = 1'b1;
    idle(LAT + 5);
    if (drained > 0 && pending.size() == 0) n_flush++;
    checks++;
    if (out_valid !== 1'b0) failures++;

    // After reset the adder works again.
    for (int t = 0; t < 10; t++) drive(rnd(), rnd());
    idle(LAT + 2);

    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", pending.size());
    end

    $display("worst=%0d cout=%0d nocarry=%0d back_to_back=%0d qca_rate=%0d flush=%0d",
             n_worst, n_cout, n_nocarry, n_b2b, n_qca_rate, n_flush);
    checks += 6;
    if (n_worst == 0)    begin failures++; $display("FAIL no worst-case propagation"); end
    if (n_cout == 0)     begin failures++; $display("FAIL no carry-out"); end
    if (n_nocarry == 0)  begin failures++; $display("FAIL no carry-free addition"); end
    if (n_b2b == 0)      begin failures++; $display("FAIL no back-to-back pairs"); end
    if (n_qca_rate == 0) begin failures++; $display("FAIL no one-per-cycle stream"); end
    if (n_flush == 0)    begin failures++; $display("FAIL reset flush not exercised"); end
    checks++;
    if (LAT_CYCLES * 4 != LAT) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
