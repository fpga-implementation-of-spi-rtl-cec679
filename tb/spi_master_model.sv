// spi_master_model: behavioural SPI master for the testbenches. Task xfer
// selects the slave, exchanges one WIDTH-bit word MSB first in the SPI mode
// given by CPOL and CPHA, with sclk half periods of HALF clk cycles, and
// deselects the slave again. CPHA = 0: data are set before the leading edge
// and sampled on it; CPHA = 1: set on the leading edge, sampled on the
// trailing edge.
module spi_master_model #(
  parameter int unsigned WIDTH = 32,
  parameter bit          CPOL  = 1'b0,
  parameter bit          CPHA  = 1'b0,
  parameter int unsigned HALF  = 4
) (
  input  logic clk,
  output logic sclk,
  output logic ss_n,
  output logic mosi,
  input  logic miso
);
  initial begin
    sclk = CPOL;
    ss_n = 1'b1;
    mosi = 1'b0;
  end

  task automatic wait_clk(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic xfer(input logic [WIDTH-1:0] tx, output logic [WIDTH-1:0] rx);
    rx = '0;
    @(negedge clk);
    ss_n = 1'b0;
    if (!CPHA) mosi = tx[WIDTH-1];
    wait_clk(HALF);
    for (int i = WIDTH - 1; i >= 0; i--) begin
      sclk = !CPOL;                              // leading edge
      if (!CPHA) rx[i] = miso;
      else       mosi  = tx[i];
      wait_clk(HALF);
      sclk = CPOL;                               // trailing edge
      if (CPHA)  rx[i] = miso;
      else if (i > 0) mosi = tx[i-1];
      wait_clk(HALF);
    end
    ss_n = 1'b1;
    wait_clk(2 * HALF);
  endtask
endmodule
