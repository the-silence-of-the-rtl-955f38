// tb_sample_streamer: offers random samples on most clocks while the byte
// sink accepts at random; every packet must be A5 followed by the
// sign-extended sample captured when the streamer was idle, MSB first.
// Samples offered while busy must be dropped.
module tb_sample_streamer;
  import izh_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sample_valid = 1'b0, busy, byte_valid, byte_ready = 1'b0;
  fix_t sample;
  logic [7:0] byte_data;
  logic [31:0] sent_count;
  int checks = 0, failures = 0;

  sample_streamer dut (.clk(clk), .rst_n(rst_n), .sample_valid(sample_valid),
                       .sample(sample), .busy(busy), .byte_valid(byte_valid),
                       .byte_data(byte_data), .byte_ready(byte_ready),
                       .sent_count(sent_count));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expq [$];
  logic [7:0]  got [$];
  int packets = 0, dropped = 0;

  always @(posedge clk) if (rst_n) begin
    if (sample_valid) begin
      if (!busy) expq.push_back({{2{sample[29]}}, sample});
      else dropped++;
    end
    if (byte_valid && byte_ready) begin
      got.push_back(byte_data);
      if (got.size() == 5) begin
        logic [31:0] w;
        w = expq.pop_front();
        checks++;
        if (got[0] != 8'hA5 || {got[1], got[2], got[3], got[4]} != w) begin
          failures++;
          $display("FAIL packet %h %h%h%h%h want %h", got[0], got[1], got[2], got[3], got[4], w);
        end
        got.delete();
        packets++;
      end
    end
  end

  initial begin
    sample = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      sample_valid = ($urandom_range(3) != 0);
      sample = fix_t'($urandom);
      byte_ready = ($urandom_range(2) == 0);
    end
    sample_valid = 1'b0;
    byte_ready = 1'b1;
    repeat (20) @(negedge clk);
    checks++;
    if (sent_count != 32'(packets) || packets < 100) begin
      failures++; $display("FAIL sent_count %0d packets %0d", sent_count, packets);
    end
    checks++;
    if (dropped == 0) failures++;
    $display("packets %0d, dropped samples %0d", packets, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
