// i2c_master: I2C bus master for one slave address per command.
//
// A command is {addr (7-bit slave address), rw (0 write, 1 read), data_wr}.
// The master frames it as START, address byte (address, then the R/W bit as
// the eighth bit), slave acknowledge, then one data byte, most significant
// bit first, each followed by an acknowledge bit, and ends with STOP:
//   write: S addr 0 A data A P        read: S addr 1 A data N P
// The master releases SDA for the slave's acknowledge; a NACK (SDA left high)
// sets ack_error and the master ends with STOP. As receiver it acknowledges
// every byte it wants more of and answers the last one with NACK.
//
// Handshake (eewiki-style, with this design's own timing): hold ena high with
// a command in place. busy rises when the command has been taken. It falls,
// with data_rd and ack_error valid, once the byte's acknowledge bit has been
// sampled, a quarter SCL period before the end of that bit. If ena is still
// high at the end of the acknowledge bit, the command then on the inputs is
// taken: the same addr/rw continues the transfer with one more byte (no new
// START), another addr/rw produces a repeated START. For reads, whether the
// byte is acknowledged is decided from ena and addr/rw a quarter period into
// the acknowledge bit. If ena is low at the end of the bit, STOP follows.
//
// Timing: every bit is four quarter periods of QDIV clk cycles, QDIV =
// ceil(CLK_FREQ / (4 * BUS_FREQ)): SCL is low in quarters 0 and 1, SDA
// changes at the start of quarter 1, SCL is released for quarters 2 and 3 and
// SDA is sampled at the end of quarter 2. A slave may hold SCL low (clock
// stretching): quarter 2 does not start counting until SCL is seen high, so
// the master waits. scl_i and sda_i pass two-flop synchronizers, which adds
// 3 clk cycles to each bit. The pins are open drain: scl_oe/sda_oe = 1 pulls
// the line low, 0 releases it.
//
// Several masters may share the bus. The master watches for START and STOP
// conditions and does not begin a transfer while another master holds the
// bus; if another master's START appears while this one is still preparing
// its own, it gives up as if it had lost arbitration. Clock synchronization:
// the SCL high time ends early when another device pulls SCL low (in quarter
// 2 SDA is then sampled at once), so the shared clock has the longest low and
// the shortest high period of all masters. Arbitration: whenever the master
// releases SDA to send a 1 (address, data, or a NACK as receiver) and samples
// SDA low, it has lost; it releases both lines at once, drops busy, sets
// arb_lost (valid with busy low, cleared by the next command) and returns to
// READY, where it waits for the winner's STOP.
// State names and their one-hot encoding follow the synthesized design;
// the quarter-period scheme, handshake and pin split are this design's own.
module i2c_master
  import spi_i2c_pkg::*;
#(
  parameter int unsigned CLK_FREQ = 50_000_000,
  parameter int unsigned BUS_FREQ = 400_000
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       ena,
  input  logic [6:0] addr,
  input  logic       rw,
  input  logic [7:0] data_wr,
  output logic       busy,
  output logic [7:0] data_rd,
  output logic       ack_error,
  output logic       arb_lost,
  input  logic       scl_i,
  output logic       scl_oe,
  input  logic       sda_i,
  output logic       sda_oe
);

  localparam int unsigned QDIV = (CLK_FREQ + 4 * BUS_FREQ - 1) / (4 * BUS_FREQ);
  localparam int unsigned QW   = (QDIV > 1) ? $clog2(QDIV) : 1;

  initial assert (QDIV >= 2) else $error("i2c_master: CLK_FREQ too low for BUS_FREQ");

  i2c_state_t  state;
  logic [1:0]  q;          // quarter of the current bit
  logic [QW-1:0] qcnt;
  logic [2:0]  scl_s, sda_s;
  logic        q_done;
  logic        bus_busy;   // a START has been seen on the bus and no STOP since
  logic        start_det, stop_det;
  logic [2:0]  bit_cnt;
  logic [7:0]  shift;      // byte being sent
  logic [7:0]  rx_shift;   // byte being received
  logic [7:0]  addr_rw;    // address byte of the current transfer
  logic [7:0]  data_tx;    // data byte of the current command
  logic        mack;       // master acknowledges the byte it reads
  logic        nack_seen;  // acknowledge bit of the current slot was NACK
  logic        same_cmd;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl_i};
      sda_s <= {sda_s[1:0], sda_i};
    end
  end

  // START: SDA falls while SCL is high; STOP: SDA rises while SCL is high.
  assign start_det = scl_s[1] && scl_s[2] && sda_s[2] && !sda_s[1];
  assign stop_det  = scl_s[1] && scl_s[2] && !sda_s[2] && sda_s[1];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)
      bus_busy <= 1'b0;
    else if (start_det)
      bus_busy <= 1'b1;
    else if (stop_det)
      bus_busy <= 1'b0;
  end

  // The high phase (quarters 2 and 3) also ends when another device pulls
  // SCL low after it has been seen high: quarter 2 then samples at once.
  assign q_done   = (qcnt == QW'(QDIV - 1)) || (q[1] && !scl_s[1]);
  assign same_cmd = ena && ({addr, rw} == addr_rw);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= I2C_READY;
      q         <= '0;
      qcnt      <= '0;
      bit_cnt   <= '0;
      shift     <= '0;
      rx_shift  <= '0;
      addr_rw   <= '0;
      data_tx   <= '0;
      mack      <= 1'b0;
      nack_seen <= 1'b0;
      busy      <= 1'b0;
      data_rd   <= '0;
      ack_error <= 1'b0;
      arb_lost  <= 1'b0;
      scl_oe    <= 1'b0;
      sda_oe    <= 1'b0;
    end else if (state == I2C_READY) begin
      q      <= '0;
      qcnt   <= '0;
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
      if (ena && !bus_busy) begin
        addr_rw   <= {addr, rw};
        data_tx   <= data_wr;
        busy      <= 1'b1;
        ack_error <= 1'b0;
        arb_lost  <= 1'b0;
        state     <= I2C_START;
      end
    end else if (state == I2C_START && q != 2'd3 && start_det) begin
      // another master's START came before ours: lost before starting
      arb_lost <= 1'b1;
      busy     <= 1'b0;
      scl_oe   <= 1'b0;
      sda_oe   <= 1'b0;
      state    <= I2C_READY;
    end else if (q == 2'd2 && !scl_s[1] && qcnt == '0) begin
      // SCL released but not yet high: a slave stretches the clock, or
      // another master is still in its low phase
      qcnt <= '0;
    end else if (!q_done) begin
      qcnt <= qcnt + 1'b1;
    end else if (q == 2'd2 && !sda_s[1] && !sda_oe &&
                 (state == I2C_COMMAND || state == I2C_WR || state == I2C_MSTR_ACK)) begin
      // sent a 1 but the bus shows 0: arbitration lost, leave the bus
      arb_lost <= 1'b1;
      busy     <= 1'b0;
      scl_oe   <= 1'b0;
      sda_oe   <= 1'b0;
      state    <= I2C_READY;
    end else begin
      qcnt <= '0;
      q    <= q + 1'b1;
      // ---- end of quarter q, start of quarter q+1 ----
      unique case (q)
        2'd0: begin
          // SDA changes at the start of quarter 1, half way through SCL low
          unique case (state)
            I2C_START:    sda_oe <= 1'b0;
            I2C_COMMAND,
            I2C_WR:       sda_oe <= ~shift[7];
            I2C_MSTR_ACK: begin
              mack   <= same_cmd;
              sda_oe <= same_cmd;
            end
            I2C_STOP:     sda_oe <= 1'b1;
            default:      sda_oe <= 1'b0;  // slave drives SDA
          endcase
        end
        2'd1: scl_oe <= 1'b0;              // release SCL
        2'd2: begin
          // sample SDA half way through SCL high
          unique case (state)
            I2C_START: sda_oe <= 1'b1;     // START: SDA falls while SCL is high
            I2C_STOP:  sda_oe <= 1'b0;     // STOP: SDA rises while SCL is high
            I2C_RD:    rx_shift <= {rx_shift[6:0], sda_s[1]};
            I2C_SLV_ACK1,
            I2C_SLV_ACK2: begin
              nack_seen <= sda_s[1];
              if (sda_s[1]) begin
                ack_error <= 1'b1;
                busy      <= 1'b0;
              end else if (state == I2C_SLV_ACK2) begin
                busy <= 1'b0;
              end
            end
            I2C_MSTR_ACK: busy <= 1'b0;
            default: ;
          endcase
        end
        2'd3: begin
          // end of the bit: SCL is pulled low again, next state
          scl_oe <= (state != I2C_STOP);
          unique case (state)
            I2C_START: begin
              shift   <= addr_rw;
              bit_cnt <= 3'd7;
              state   <= I2C_COMMAND;
            end
            I2C_COMMAND, I2C_WR: begin
              shift   <= {shift[6:0], 1'b0};
              bit_cnt <= bit_cnt - 1'b1;
              if (bit_cnt == 3'd0)
                state <= (state == I2C_COMMAND) ? I2C_SLV_ACK1 : I2C_SLV_ACK2;
            end
            I2C_SLV_ACK1: begin
              bit_cnt <= 3'd7;
              shift   <= data_tx;
              if (nack_seen)       state <= I2C_STOP;
              else if (addr_rw[0]) state <= I2C_RD;
              else                 state <= I2C_WR;
            end
            I2C_RD: begin
              bit_cnt <= bit_cnt - 1'b1;
              if (bit_cnt == 3'd0) begin
                data_rd <= rx_shift;
                state   <= I2C_MSTR_ACK;
              end
            end
            I2C_SLV_ACK2, I2C_MSTR_ACK: begin
              bit_cnt <= 3'd7;
              if ((state == I2C_SLV_ACK2) ? nack_seen : !mack && !ena) begin
                state <= I2C_STOP;
              end else if ((state == I2C_MSTR_ACK) ? mack : same_cmd) begin
                // one more byte of the same transfer
                data_tx <= data_wr;
                shift   <= data_wr;
                busy    <= 1'b1;
                state   <= addr_rw[0] ? I2C_RD : I2C_WR;
              end else if (ena) begin
                // another slave or direction: repeated START
                addr_rw   <= {addr, rw};
                data_tx   <= data_wr;
                busy      <= 1'b1;
                ack_error <= 1'b0;
                state     <= I2C_START;
              end else begin
                state <= I2C_STOP;
              end
            end
            I2C_STOP: state <= I2C_READY;
            default:  state <= I2C_READY;
          endcase
        end
      endcase
    end
  end

endmodule
