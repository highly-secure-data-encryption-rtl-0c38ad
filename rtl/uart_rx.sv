// uart_rx: 8N1 UART receiver for the host link (configuration and data
// bytes coming from the PC).
//
// The rxd line is brought into the clock domain by two flip-flops. A falling
// edge on the idle-high line starts a frame; the start bit is re-checked half
// a bit later, then the eight data bits (LSB first) and the stop bit are each
// sampled in the middle of their bit time, CLKS_PER_BIT clocks apart.
// Interface: valid pulses one cycle with the byte on data when a frame with a
// good stop bit ends; a bad stop bit pulses frame_err instead and the byte is
// dropped. The default CLKS_PER_BIT = 868 is 115200 baud at a 100 MHz clock.
// The source names the UART link only; frame format, baud rate and clock are
// this design's choices.
module uart_rx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} state_t;

  state_t        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: if (!rx) begin
          state <= R_START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        R_START: if (cnt == '0) begin
          if (!rx) begin
            state   <= R_DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else begin
            state <= R_IDLE;           // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        R_DATA: if (cnt == '0) begin
          shreg <= {rx, shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= R_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        R_STOP: if (cnt == '0) begin
          state <= R_IDLE;
          if (rx) begin
            valid <= 1'b1;
            data  <= shreg;
          end else begin
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
