// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, one
// stop bit (8N1), least significant bit first, line idle high.
//
// A byte is accepted when tx_valid and tx_ready are both high; tx_ready is
// low while the 10-bit frame is being shifted out. Each bit lasts
// CLKS_PER_BIT clocks (434 gives 115200 baud from a 50 MHz clock).
// A serial port is how this design sends samples to a PC; the frame format
// and bit rate are this design's own choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd
);

  logic [9:0]  shreg;                      // stop, data[7:0], start
  logic [3:0]  bits_left;
  logic [$clog2(CLKS_PER_BIT)-1:0] baud;

  assign tx_ready = (bits_left == '0);
  assign txd      = tx_ready ? 1'b1 : shreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      baud      <= '0;
    end else if (bits_left == '0) begin
      if (tx_valid) begin
        shreg     <= {1'b1, tx_data, 1'b0};
        bits_left <= 4'd10;
        baud      <= '0;
      end
    end else if (int'(baud) == CLKS_PER_BIT - 1) begin
      baud      <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      baud <= baud + 1'b1;
    end
  end

endmodule
