// tb_net_ctrl: five model neurons answer each start with a done pulse after
// a random 3..40 clocks. Checks that start comes once per step and never
// while a neuron is busy, that tick comes exactly one clock after the last
// done, that the next start follows the tick, and the step and wait counts
// (wait clocks per step = last done - first done - 1).
module tb_net_ctrl;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [N-1:0] n_done;
  logic start, tick, busy;
  logic [31:0] step_count, wait_count;
  int checks = 0, failures = 0;

  net_ctrl #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .run(run), .n_done(n_done),
                         .start(start), .tick(tick), .busy(busy),
                         .step_count(step_count), .wait_count(wait_count));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [N];
  logic [N-1:0] running = '0;
  int cyc = 0, first_done, last_done, steps = 0, waits = 0, start_at = -10;
  logic any_done;

  // model neurons, driven on the falling edge
  always @(negedge clk) begin
    cyc++;
    n_done = '0;
    for (int k = 0; k < N; k++)
      if (running[k]) begin
        cnt[k]--;
        if (cnt[k] == 0) begin n_done[k] = 1'b1; running[k] = 1'b0; end
      end
  end

  always @(posedge clk) if (rst_n) begin
    if (n_done != '0) begin
      if (!any_done) first_done = cyc;
      any_done = 1'b1;
      last_done = cyc;
    end
    if (start) begin
      checks++;
      if (running != '0) begin failures++; $display("FAIL start while busy"); end
      for (int k = 0; k < N; k++) begin cnt[k] = int'($urandom_range(37)) + 3; end
      running = '1;
      any_done = 1'b0;
      if (steps > 0) begin
        checks++;
        if (cyc != start_at) begin failures++; $display("FAIL start not right after tick"); end
      end
    end
    if (tick) begin
      checks++;
      if (running != '0 || cyc != last_done + 1) begin
        failures++; $display("FAIL tick at %0d, last done %0d", cyc, last_done);
      end
      waits += (last_done - first_done - 1 > 0) ? last_done - first_done - 1 : 0;
      steps++;
      start_at = cyc + 1;
    end
  end

  initial begin
    n_done = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (start || busy) failures++;             // idle until run
    run = 1'b1;
    wait (steps == 200);
    run = 1'b0;
    repeat (100) @(negedge clk);
    checks++;
    if (step_count != 32'(steps)) begin failures++; $display("FAIL steps %0d vs %0d", step_count, steps); end
    checks++;
    if (wait_count != 32'(waits)) begin failures++; $display("FAIL waits %0d vs %0d", wait_count, waits); end
    checks++;
    if (busy) failures++;
    $display("steps %0d wait clocks %0d", steps, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
