// host_ctrl: command controller between the UART link and the AES engines.
//
// It decodes the byte protocol of host_cmd_pkg: a mode command sets which
// engine(s) a data block goes through, a key command restarts PUF key
// generation, and a block command collects 16 bytes into a 128-bit block,
// waits until a key is in use (key_ready), runs the block through the
// encryption engine, the decryption engine or both in series, and sends the
// 16 result bytes back, most significant first. Bytes arriving while a
// command is being processed are dropped.
// Interface: rx_valid/rx_data from uart_rx; tx_valid/tx_data/tx_ready form a
// valid/ready handshake to uart_tx; enc_* and dec_* are one-cycle start
// pulses and done pulses of the engines; key_regen is a one-cycle request to
// the key generator; mode shows the current mode (MODE_ENC after reset).
// The source only says the host software sets the mode of operation and
// moves data; the protocol and the three modes are this design's choices,
// modelled on its demonstration (encrypt, decrypt with a possibly different
// key, and encryption followed by decryption).
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the assertions' disable condition.
module host_ctrl
  import aes_pkg::block_t;
  import host_cmd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  output logic       tx_valid,
  output logic [7:0] tx_data,
  input  logic       tx_ready,
  input  logic       key_ready,
  output logic       key_regen,
  output logic       enc_start,
  output block_t     enc_din,
  input  logic       enc_done,
  input  block_t     enc_dout,
  output logic       dec_start,
  output block_t     dec_din,
  input  logic       dec_done,
  input  block_t     dec_dout,
  output mode_t      mode
);

  typedef enum logic [3:0] {
    H_IDLE, H_GET_MODE, H_GET_DATA, H_REGEN_LOW, H_REGEN_HIGH,
    H_WAIT_KEY, H_RUN_ENC, H_RUN_DEC, H_SEND_BLOCK, H_SEND_BYTE
  } state_t;

  state_t     state;
  block_t     data_buf;
  block_t     result;
  logic [3:0] byte_cnt;
  logic [7:0] reply;

  assign enc_din = data_buf;
  assign dec_din = (mode == MODE_LOOP) ? enc_dout : data_buf;

  always_comb begin
    tx_valid = (state == H_SEND_BLOCK) || (state == H_SEND_BYTE);
    tx_data  = (state == H_SEND_BLOCK) ? result[127:120] : reply;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= H_IDLE;
      mode      <= MODE_ENC;
      data_buf  <= '0;
      result    <= '0;
      byte_cnt  <= '0;
      reply     <= '0;
      key_regen <= 1'b0;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
    end else begin
      key_regen <= 1'b0;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
      unique case (state)
        H_IDLE: if (rx_valid) begin
          unique case (rx_data)
            CMD_MODE:  state <= H_GET_MODE;
            CMD_KEY: begin
              key_regen <= 1'b1;
              state     <= H_REGEN_LOW;
            end
            CMD_BLOCK: begin
              byte_cnt <= '0;
              state    <= H_GET_DATA;
            end
            default: ;                  // unknown byte: ignore
          endcase
        end
        H_GET_MODE: if (rx_valid) begin
          if (rx_data <= 8'(MODE_LOOP)) begin
            mode  <= mode_t'(rx_data[1:0]);
            reply <= ACK;
          end else begin
            reply <= NAK;
          end
          state <= H_SEND_BYTE;
        end
        H_REGEN_LOW:  if (!key_ready) state <= H_REGEN_HIGH;
        H_REGEN_HIGH: if (key_ready) begin
          reply <= ACK;
          state <= H_SEND_BYTE;
        end
        H_GET_DATA: if (rx_valid) begin
          data_buf <= {data_buf[119:0], rx_data};
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == 4'd15) state <= H_WAIT_KEY;
        end
        H_WAIT_KEY: if (key_ready) begin
          if (mode == MODE_DEC) begin
            dec_start <= 1'b1;
            state     <= H_RUN_DEC;
          end else begin
            enc_start <= 1'b1;
            state     <= H_RUN_ENC;
          end
        end
        H_RUN_ENC: if (enc_done) begin
          if (mode == MODE_LOOP) begin
            dec_start <= 1'b1;
            state     <= H_RUN_DEC;
          end else begin
            result   <= enc_dout;
            byte_cnt <= '0;
            state    <= H_SEND_BLOCK;
          end
        end
        H_RUN_DEC: if (dec_done) begin
          result   <= dec_dout;
          byte_cnt <= '0;
          state    <= H_SEND_BLOCK;
        end
        H_SEND_BLOCK: if (tx_ready) begin
          result   <= {result[119:0], 8'h00};
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == 4'd15) state <= H_IDLE;
        end
        H_SEND_BYTE: if (tx_ready) state <= H_IDLE;
        default: state <= H_IDLE;
      endcase
    end
  end

  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              tx_valid && !tx_ready |=> tx_valid && $stable(tx_data))
    else $error("host_ctrl: tx byte changed before it was taken");

endmodule
