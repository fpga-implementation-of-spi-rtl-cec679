// spi_to_i2c_bridge: SPI to I2C interface module.
//
// Lets an SPI master drive I2C slaves. The module holds three parts, wired as
// in the bridge's block diagram:
//   spi_slave   receives 32-bit words from the SPI master (sclk, ss_n, mosi)
//               and shifts the transmit buffer out on miso;
//   spi_to_i2c  the bridge controller: takes each received word, and when its
//               bit 24 (I2C transaction enable) is set, runs one I2C transfer
//               and loads the result into the SPI transmit buffer;
//   i2c_master  generates the I2C frames on SCL and SDA.
// Word formats are in spi_i2c_pkg. A full exchange is: the SPI master sends a
// command word; the bridge performs the I2C transfer (about 20 SCL periods,
// 50 us at 400 kHz); the response is read back with the next SPI word, which
// may itself be a new command.
//
// Pins: the I2C lines are open drain, so each is split into the level seen on
// the bus (scl_i, sda_i) and a pull-low enable (scl_oe, sda_oe); a pad outside
// drives the line low when the enable is 1 and lets the pull-up raise it
// otherwise. miso is driven only while miso_oe is 1 (slave selected); the pad
// tri-states it otherwise. The status-load inputs of the SPI slave are not
// used here and are tied off, and three internal signals are left without a
// load: the SPI slave's transmit-ready and overrun flags (the controller
// needs only its receive-ready flag) and the controller's state output, which
// is there for observation. clk must be at least 8 times the sclk rate.
// The default clock (50 MHz) and SPI mode (CPOL = 0, CPHA = 0) are this
// design's choices; 400 kHz is the I2C fast-mode rate.
module spi_to_i2c_bridge
  import spi_i2c_pkg::*;
#(
  parameter int unsigned CLK_FREQ = 50_000_000,
  parameter int unsigned I2C_FREQ = 400_000,
  parameter bit          CPOL     = 1'b0,
  parameter bit          CPHA     = 1'b0
) (
  input  logic clk,
  input  logic reset_n,
  // SPI
  input  logic sclk,
  input  logic ss_n,
  input  logic mosi,
  output logic miso,
  output logic miso_oe,
  // I2C
  input  logic scl_i,
  output logic scl_oe,
  input  logic sda_i,
  output logic sda_oe
);

  spi_word_t     spi_rx_data, spi_tx_data;
  logic          spi_busy, spi_rdy, spi_rx_req, spi_tx_ena;
  logic          spi_trdy, spi_roe;
  logic          i2c_ena, i2c_rw, i2c_busy, i2c_ack_err, i2c_arb_lost;
  logic [6:0]    i2c_addr;
  logic [7:0]    i2c_data_wr, i2c_data_rd;
  bridge_state_t bridge_state;

  spi_slave #(
    .WIDTH (SPI_WIDTH),
    .CPOL  (CPOL),
    .CPHA  (CPHA)
  ) spi_slave_0 (
    .clk          (clk),
    .reset_n      (reset_n),
    .sclk         (sclk),
    .ss_n         (ss_n),
    .mosi         (mosi),
    .miso         (miso),
    .miso_oe      (miso_oe),
    .rx_req       (spi_rx_req),
    .rx_data      (spi_rx_data),
    .tx_load_en   (spi_tx_ena),
    .tx_load_data (spi_tx_data),
    .st_load_en   (1'b0),
    .st_load_trdy (1'b0),
    .st_load_rrdy (1'b0),
    .st_load_roe  (1'b0),
    .busy         (spi_busy),
    .trdy         (spi_trdy),
    .rrdy         (spi_rdy),
    .roe          (spi_roe)
  );

  spi_to_i2c spi_to_i2c_0 (
    .clk         (clk),
    .reset_n     (reset_n),
    .spi_rx_data (spi_rx_data),
    .spi_busy    (spi_busy),
    .spi_rdy     (spi_rdy),
    .spi_rx_req  (spi_rx_req),
    .spi_tx_data (spi_tx_data),
    .spi_tx_ena  (spi_tx_ena),
    .i2c_busy    (i2c_busy),
    .i2c_data_rd (i2c_data_rd),
    .i2c_ack_err (i2c_ack_err),
    .i2c_arb_lost(i2c_arb_lost),
    .i2c_ena     (i2c_ena),
    .i2c_addr    (i2c_addr),
    .i2c_rw      (i2c_rw),
    .i2c_data_wr (i2c_data_wr),
    .state       (bridge_state)
  );

  i2c_master #(
    .CLK_FREQ (CLK_FREQ),
    .BUS_FREQ (I2C_FREQ)
  ) i2c_master_0 (
    .clk       (clk),
    .reset_n   (reset_n),
    .ena       (i2c_ena),
    .addr      (i2c_addr),
    .rw        (i2c_rw),
    .data_wr   (i2c_data_wr),
    .busy      (i2c_busy),
    .data_rd   (i2c_data_rd),
    .ack_error (i2c_ack_err),
    .arb_lost  (i2c_arb_lost),
    .scl_i     (scl_i),
    .scl_oe    (scl_oe),
    .sda_i     (sda_i),
    .sda_oe    (sda_oe)
  );

endmodule
