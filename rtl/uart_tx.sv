// uart_tx: 8N1 UART transmitter for the host link (results going to the PC).
//
// Valid/ready handshake: a byte is taken when valid and ready are both high;
// ready is high only while the transmitter is idle. The frame is one start
// bit (0), eight data bits LSB first and one stop bit (1), each held for
// CLKS_PER_BIT clocks, so a byte takes 10 x CLKS_PER_BIT cycles and ready
// returns in the cycle after the stop bit ends. txd idles high. The default
// 868 clocks per bit is 115200 baud at 100 MHz. The source names the UART
// link only; frame format and baud rate are this design's choices.
module uart_tx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;     // stop, data[7:0]; shifted out from bit 0
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign ready = (bits_left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (valid) begin
        frame     <= {1'b1, data};
        bits_left <= 4'd10;
        cnt       <= CW'(CLKS_PER_BIT - 1);
        txd       <= 1'b0;
      end
    end else if (cnt == '0) begin
      frame     <= {1'b1, frame[8:1]};
      bits_left <= bits_left - 1'b1;
      cnt       <= CW'(CLKS_PER_BIT - 1);
      txd       <= (bits_left == 4'd1) ? 1'b1 : frame[0];
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

endmodule
