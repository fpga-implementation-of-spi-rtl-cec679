// spi_i2c_pkg: types and constants shared by the SPI to I2C interface module.
//
// The SPI side moves 32-bit words. Bit 24 of a received word is the I2C
// transaction enable bit; that position is the one given for the bridge.
// The positions of the other fields are this design's own choice:
//
//   command word (SPI master -> bridge)
//     [31:25] unused (ignored)
//     [24]    I2C transaction enable
//     [23:17] 7-bit I2C slave address
//     [16]    R/W bit, 0 = write to the slave, 1 = read from the slave
//     [15:8]  unused (ignored)
//     [7:0]   data byte to write (ignored for a read)
//
//   response word (bridge -> SPI master, shifted out on the next SPI word)
//     [31:25] zero
//     [24]    1: the word holds the result of an I2C transaction
//     [23:16] echo of the address and R/W bit of the command
//     [15:10] zero
//     [9]     arbitration lost to another I2C master (transfer not done)
//     [8]     acknowledge error (a slave answered NACK)
//     [7:0]   byte read from the slave (the last written byte for a write)
package spi_i2c_pkg;

  localparam int unsigned SPI_WIDTH = 32;
  localparam int unsigned EN_BIT    = 24;

  typedef logic [SPI_WIDTH-1:0] spi_word_t;

  // Bridge controller states, with the two-bit encoding of the synthesized design.
  typedef enum logic [1:0] {
    BR_READY       = 2'b00,
    BR_SPI_RX      = 2'b01,
    BR_I2C         = 2'b10,
    BR_SPI_LOAD_TX = 2'b11
  } bridge_state_t;

  // I2C master states, one-hot.
  typedef enum logic [8:0] {
    I2C_READY    = 9'b000000001,
    I2C_START    = 9'b000000010,
    I2C_COMMAND  = 9'b000000100,
    I2C_SLV_ACK1 = 9'b000001000,
    I2C_WR       = 9'b000010000,
    I2C_RD       = 9'b000100000,
    I2C_SLV_ACK2 = 9'b001000000,
    I2C_MSTR_ACK = 9'b010000000,
    I2C_STOP     = 9'b100000000
  } i2c_state_t;

  // Build a command word.
  function automatic spi_word_t make_cmd(logic en, logic [6:0] addr, logic rw, logic [7:0] data);
    spi_word_t w;
    w         = '0;
    w[EN_BIT] = en;
    w[23:17]  = addr;
    w[16]     = rw;
    w[7:0]    = data;
    return w;
  endfunction

  // Build a response word.
  function automatic spi_word_t make_resp(logic [6:0] addr, logic rw, logic ack_err, logic [7:0] data,
                                          logic arb_lost = 1'b0);
    spi_word_t w;
    w         = '0;
    w[EN_BIT] = 1'b1;
    w[23:17]  = addr;
    w[16]     = rw;
    w[9]      = arb_lost;
    w[8]      = ack_err;
    w[7:0]    = data;
    return w;
  endfunction

endpackage
