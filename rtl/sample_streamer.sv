// sample_streamer: turns membrane-potential samples into a byte stream for
// the serial port.
//
// When `sample_valid` is high and no packet is in flight, the 30-bit
// sample is captured, sign-extended to 32 bits and sent as a 5-byte packet:
// the marker byte 8'hA5, then the four sample bytes, most significant
// first. Samples that arrive while a packet is in flight are dropped, so
// the stream is the state sampled at the rate the serial line allows.
// Bytes are handed over with a valid/ready handshake (byte_valid held with
// byte_data stable until byte_ready).
// Sending samples to a PC follows the design; the packet format and the
// drop policy are this design's own choices.
module sample_streamer
  import izh_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_valid,
  input  fix_t       sample,
  output logic       busy,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  input  logic       byte_ready,
  output logic [31:0] sent_count      // packets sent
);

  localparam logic [7:0] MARKER = 8'hA5;

  logic [31:0] word;
  logic [2:0]  idx;                    // 0 marker, 1..4 data bytes

  assign byte_valid = busy;
  always_comb begin
    unique case (idx)
      3'd0:    byte_data = MARKER;
      3'd1:    byte_data = word[31:24];
      3'd2:    byte_data = word[23:16];
      3'd3:    byte_data = word[15:8];
      default: byte_data = word[7:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      word       <= '0;
      idx        <= '0;
      sent_count <= '0;
    end else if (!busy) begin
      if (sample_valid) begin
        word <= 32'(signed'(sample));
        idx  <= '0;
        busy <= 1'b1;
      end
    end else if (byte_ready) begin
      if (idx == 3'd4) begin
        busy       <= 1'b0;
        sent_count <= sent_count + 1;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

  // the byte on offer may not change before it is taken
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             byte_valid && !byte_ready |=> byte_valid && $stable(byte_data));

endmodule
