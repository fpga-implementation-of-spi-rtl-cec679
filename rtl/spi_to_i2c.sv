// spi_to_i2c: controller that turns SPI command words into I2C transactions.
//
// It sits between the SPI slave and the I2C master and runs the four-state
// machine of the bridge:
//   READY       wait while spi_busy is high or spi_rdy is low; when the SPI
//               slave is idle and holds a new word, latch it, pulse
//               spi_rx_req (the word is taken) and go to SPI_RX.
//   SPI_RX      look at bit 24 of the latched word, the I2C transaction
//               enable bit: 1 goes to I2C, 0 drops the word and returns to READY.
//   I2C         raise i2c_ena with the address, R/W bit and data byte of the
//               word until the I2C master shows busy, then lower it; when busy
//               falls again the transaction is finished.
//   SPI_LOAD_TX wait until the SPI slave is not busy, then write the result
//               word into its transmit buffer (spi_tx_ena pulse) and return
//               to READY. The SPI master reads it out with its next word.
// The states, their two-bit encoding and the enable bit position follow the
// original bridge; the other fields of the command and response words are
// this design's own and are listed in spi_i2c_pkg. For a write the response
// carries the written byte, for a read the byte read; bit 8 is the I2C
// acknowledge error and bit 9 flags a transfer lost to another I2C master.
// One command word gives one single-byte I2C transfer.
// All outputs are registered or decoded from registers; reset_n is
// asynchronous, active low.
module spi_to_i2c
  import spi_i2c_pkg::*;
(
  input  logic            clk,
  input  logic            reset_n,
  // SPI slave side
  input  spi_word_t       spi_rx_data,
  input  logic            spi_busy,
  input  logic            spi_rdy,
  output logic            spi_rx_req,
  output spi_word_t       spi_tx_data,
  output logic            spi_tx_ena,
  // I2C master side
  input  logic            i2c_busy,
  input  logic [7:0]      i2c_data_rd,
  input  logic            i2c_ack_err,
  input  logic            i2c_arb_lost,
  output logic            i2c_ena,
  output logic [6:0]      i2c_addr,
  output logic            i2c_rw,
  output logic [7:0]      i2c_data_wr,
  // state, for observation
  output bridge_state_t   state
);

  spi_word_t rx_word;
  logic      i2c_started;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state       <= BR_READY;
      rx_word     <= '0;
      i2c_started <= 1'b0;
      i2c_ena     <= 1'b0;
      spi_rx_req  <= 1'b0;
      spi_tx_ena  <= 1'b0;
      spi_tx_data <= '0;
    end else begin
      spi_rx_req <= 1'b0;
      spi_tx_ena <= 1'b0;
      unique case (state)
        BR_READY: begin
          if (!spi_busy && spi_rdy) begin
            rx_word    <= spi_rx_data;
            spi_rx_req <= 1'b1;
            state      <= BR_SPI_RX;
          end
        end
        BR_SPI_RX: begin
          if (rx_word[EN_BIT]) begin
            i2c_ena     <= 1'b1;
            i2c_started <= 1'b0;
            state       <= BR_I2C;
          end else begin
            state <= BR_READY;
          end
        end
        BR_I2C: begin
          if (!i2c_started) begin
            if (i2c_busy) begin
              i2c_started <= 1'b1;
              i2c_ena     <= 1'b0;
            end
          end else if (!i2c_busy) begin
            spi_tx_data <= make_resp(rx_word[23:17], rx_word[16], i2c_ack_err,
                                     rx_word[16] ? i2c_data_rd : rx_word[7:0],
                                     i2c_arb_lost);
            state       <= BR_SPI_LOAD_TX;
          end
        end
        BR_SPI_LOAD_TX: begin
          if (!spi_busy) begin
            spi_tx_ena <= 1'b1;
            state      <= BR_READY;
          end
        end
        default: state <= BR_READY;
      endcase
    end
  end

  assign i2c_addr    = rx_word[23:17];
  assign i2c_rw      = rx_word[16];
  assign i2c_data_wr = rx_word[7:0];

endmodule
