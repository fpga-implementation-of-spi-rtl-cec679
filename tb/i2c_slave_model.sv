// i2c_slave_model: behavioural I2C slave for the testbenches (not synthesizable
// intent, no timing beyond clk). It answers to ADDR, acknowledges every byte
// written to it and stores it in a 16-byte memory at a write pointer that
// advances by one; reads return the memory at a separate read pointer, so
// bytes come back in the order they were written. The memory starts as
// mem[i] = {ADDR[3:0], i[3:0]}. It samples the bus on clk: data on rising
// SCL, its own SDA changes one clk after falling SCL. With STRETCH > 0 it
// holds SCL low for STRETCH clk cycles after each acknowledge bit (clock
// stretching). Counters: n_start, n_stop, n_wr, n_rd, n_stretch.
module i2c_slave_model #(
  parameter logic [6:0] ADDR    = 7'h50,
  parameter int         STRETCH = 0
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  output logic scl_oe,
  output logic sda_oe
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_AACK, S_RX, S_RACK, S_TX, S_TACK} st_t;
  st_t        st = S_IDLE;
  logic       scl_d = 1'b1, sda_d = 1'b1;
  logic [7:0] sh = '0, txb = '0;
  logic [3:0] bitn = '0;
  logic       rw = 1'b0, mack = 1'b0;
  logic [7:0] mem [16];
  logic [3:0] wptr = '0, rptr = '0;
  int         hold = 0;
  int         n_start = 0, n_stop = 0, n_wr = 0, n_rd = 0, n_stretch = 0;

  initial begin
    scl_oe = 1'b0;
    sda_oe = 1'b0;
    for (int i = 0; i < 16; i++) mem[i] = {ADDR[3:0], 4'(i)};
  end

  task automatic start_stretch();
    if (STRETCH > 0) begin
      hold   = STRETCH;
      scl_oe = 1'b1;
      n_stretch++;
    end
  endtask

  always @(posedge clk) begin
    if (hold > 0) begin
      hold--;
      if (hold == 0) scl_oe = 1'b0;
    end
    if (scl && scl_d && sda_d && !sda) begin          // START or repeated START
      st = S_ADDR; bitn = 0; sda_oe = 1'b0; n_start++;
    end else if (scl && scl_d && !sda_d && sda) begin // STOP
      st = S_IDLE; sda_oe = 1'b0; n_stop++;
    end else if (scl && !scl_d) begin                 // rising SCL: sample
      case (st)
        S_ADDR, S_RX: begin sh = {sh[6:0], sda}; bitn++; end
        S_TX:         bitn++;
        S_TACK:       mack = !sda;
        default: ;
      endcase
    end else if (!scl && scl_d) begin                 // falling SCL: drive
      case (st)
        S_ADDR: if (bitn == 8) begin
          if (sh[7:1] == ADDR) begin
            rw = sh[0]; sda_oe = 1'b1; st = S_AACK;
          end else st = S_IDLE;
        end
        S_AACK: begin
          sda_oe = 1'b0; bitn = 0;
          if (rw) begin
            txb = mem[rptr]; rptr++; n_rd++; st = S_TX; sda_oe = !txb[7];
          end else st = S_RX;
          start_stretch();
        end
        S_RX: if (bitn == 8) begin
          mem[wptr] = sh; wptr++; n_wr++; sda_oe = 1'b1; st = S_RACK;
        end
        S_RACK: begin sda_oe = 1'b0; bitn = 0; st = S_RX; start_stretch(); end
        S_TX: begin
          if (bitn == 8) begin sda_oe = 1'b0; st = S_TACK; end
          else sda_oe = !txb[7 - bitn[2:0]];
        end
        S_TACK: begin
          if (mack) begin
            txb = mem[rptr]; rptr++; n_rd++; bitn = 0; st = S_TX; sda_oe = !txb[7];
          end else begin
            sda_oe = 1'b0; st = S_IDLE;
          end
          start_stretch();
        end
        default: ;
      endcase
    end
    scl_d = scl;
    sda_d = sda;
  end
endmodule
