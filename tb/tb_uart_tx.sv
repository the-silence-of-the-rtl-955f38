// tb_uart_tx: sends random bytes, some back to back, through the
// transmitter with 8 clocks per bit and decodes the line in the middle of
// each bit: checks start bit, the 8 data bits LSB first, the stop bit, the
// idle level and that a frame lasts 10 bit times.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 1'b0, rst_n = 1'b0, tx_valid = 1'b0, tx_ready, txd;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst_n(rst_n), .tx_valid(tx_valid),
                                     .tx_data(tx_data), .tx_ready(tx_ready), .txd(txd));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: wait for a falling edge, sample at bit centres
  logic [7:0] q [$];
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      repeat (CPB/2) @(posedge clk);
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (q.size() == 0 || q[0] != b) begin failures++; $display("FAIL byte %h", b); end
      else void'(q.pop_front());
    end
  end

  initial begin
    int t0;
    tx_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (txd !== 1'b1 || !tx_ready) failures++;
    for (int n = 0; n < 60; n++) begin
      tx_data = 8'($urandom);
      tx_valid = 1'b1;
      q.push_back(tx_data);
      @(posedge clk); #1;
      tx_valid = 1'b0;
      t0 = 0;
      do begin @(negedge clk); t0++; end while (!tx_ready);
      checks++;
      if (t0 - 1 != 10 * CPB) begin   // t0 counts the falling edge after the accept edge too
        failures++; $display("FAIL frame %0d clocks", t0);
      end
      if (n % 3 == 0) repeat ($urandom_range(30)) @(posedge clk);
      @(negedge clk);
    end
    repeat (3 * CPB) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d bytes lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
