// spi_slave: SPI slave with a shift register, a receive buffer and a transmit buffer.
//
// An external SPI master selects the slave with ss_n (active low) and clocks
// WIDTH bits per word on sclk, most significant bit first, on mosi and miso at
// the same time, as the data register of an SPI device is a shift register
// that exchanges its contents with the master's. CPOL gives the idle level of
// sclk and CPHA the edge on which data are sampled: CPHA = 0 samples on the
// leading edge, CPHA = 1 on the trailing edge; master and slave must use the
// same values. miso is only driven while the slave is selected (miso_oe = 1);
// outside a selection the pin is to be tri-stated.
//
// Structure (this design's own): sclk, ss_n and mosi are brought into the clk
// domain by two-flop synchronizers and sclk edges are found by comparing
// successive samples, so clk must be at least 8 times the sclk rate. When the
// slave is selected, the transmit buffer is copied into the output shift
// register and trdy rises (the buffer may be loaded again). When WIDTH bits
// have been received, the word is copied to rx_data and rrdy rises; if rrdy
// was still set, the earlier word is lost and roe (receive overrun error)
// rises. The user side, in the clk domain:
//   rx_req        1-cycle pulse: rx_data has been taken, clear rrdy
//   tx_load_en    1-cycle pulse: load tx_load_data into the transmit buffer, clear trdy
//   st_load_en    write trdy, rrdy and roe from st_load_trdy/rrdy/roe
//   busy          the slave is selected (a transfer may be in progress)
// Latency: rrdy rises 3 clk cycles after the last sampling sclk edge.
// reset_n is asynchronous, active low; it empties both buffers.
module spi_slave #(
  parameter int unsigned WIDTH = 32,
  parameter bit          CPOL  = 1'b0,
  parameter bit          CPHA  = 1'b0
) (
  input  logic             clk,
  input  logic             reset_n,
  // SPI pins
  input  logic             sclk,
  input  logic             ss_n,
  input  logic             mosi,
  output logic             miso,
  output logic             miso_oe,
  // user side
  input  logic             rx_req,
  output logic [WIDTH-1:0] rx_data,
  input  logic             tx_load_en,
  input  logic [WIDTH-1:0] tx_load_data,
  input  logic             st_load_en,
  input  logic             st_load_trdy,
  input  logic             st_load_rrdy,
  input  logic             st_load_roe,
  output logic             busy,
  output logic             trdy,
  output logic             rrdy,
  output logic             roe
);

  localparam int unsigned CW = $clog2(WIDTH);

  logic [2:0]       sclk_s;
  logic [2:0]       ss_s;
  logic [1:0]       mosi_s;
  logic             selected, sel_start;
  logic             lead_edge, trail_edge, sample_edge, shift_edge;
  logic [WIDTH-2:0] rx_shift;   // the first WIDTH-1 bits of a word
  logic [WIDTH-1:0] tx_shift, tx_buf;
  logic [CW-1:0]    bit_cnt;
  logic             miso_bit;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      sclk_s <= {3{CPOL}};
      ss_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      ss_s   <= {ss_s[1:0], ss_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  assign selected  = ~ss_s[1];
  assign sel_start = ss_s[2] & ~ss_s[1];
  // Leading edge: sclk leaves its idle level; trailing edge: it returns to it.
  assign lead_edge   = selected && (sclk_s[2] == CPOL) && (sclk_s[1] != CPOL);
  assign trail_edge  = selected && (sclk_s[2] != CPOL) && (sclk_s[1] == CPOL);
  assign sample_edge = CPHA ? trail_edge : lead_edge;
  assign shift_edge  = CPHA ? lead_edge  : trail_edge;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      rx_shift <= '0;
      tx_shift <= '0;
      tx_buf   <= '0;
      rx_data  <= '0;
      bit_cnt  <= '0;
      miso_bit <= 1'b0;
      trdy     <= 1'b1;
      rrdy     <= 1'b0;
      roe      <= 1'b0;
    end else begin
      // user side writes, lowest priority
      if (st_load_en) begin
        trdy <= st_load_trdy;
        rrdy <= st_load_rrdy;
        roe  <= st_load_roe;
      end
      if (rx_req) rrdy <= 1'b0;
      if (tx_load_en) begin
        tx_buf <= tx_load_data;
        trdy   <= 1'b0;
      end
      // bus side
      if (sel_start) begin
        bit_cnt  <= '0;
        trdy     <= 1'b1;
        miso_bit <= tx_buf[WIDTH-1];
        // CPHA = 0: the first bit is on miso before the first edge
        tx_shift <= CPHA ? tx_buf : {tx_buf[WIDTH-2:0], 1'b0};
      end else begin
        if (shift_edge) begin
          miso_bit <= tx_shift[WIDTH-1];
          tx_shift <= {tx_shift[WIDTH-2:0], 1'b0};
        end
        if (sample_edge) begin
          rx_shift <= {rx_shift[WIDTH-3:0], mosi_s[1]};
          if (bit_cnt == CW'(WIDTH - 1)) begin
            bit_cnt <= '0;
            rx_data <= {rx_shift, mosi_s[1]};
            rrdy    <= 1'b1;
            if (rrdy && !rx_req) roe <= 1'b1;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
      end
    end
  end

  assign miso    = miso_bit;
  assign miso_oe = selected;
  assign busy    = selected;

endmodule
