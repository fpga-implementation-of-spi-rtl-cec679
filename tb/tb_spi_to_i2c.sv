// tb_spi_to_i2c: self-checking testbench of the bridge controller alone. The
// SPI slave side is driven directly; the I2C master is replaced by a small
// responder that raises busy a few cycles after ena and drops it a fixed
// time later with a byte and an acknowledge error. It checks that the
// controller waits in READY while the SPI slave is busy or has no word, drops
// a word whose enable bit (bit 24) is clear, holds i2c_ena until busy, waits
// in SPI_LOAD_TX while the SPI slave is busy, and writes the expected
// response word, for writes, reads, a NACKed transfer and one lost in
// arbitration. It also checks the
// number of cycles from a new word to i2c_ena (2) and from the end of the I2C
// transfer to the response load (2 when the SPI slave is idle).
module tb_spi_to_i2c;
  import spi_i2c_pkg::*;
  logic clk = 1'b0, reset_n = 1'b0;
  spi_word_t spi_rx_data = '0, spi_tx_data;
  logic spi_busy = 1'b0, spi_rdy = 1'b0, spi_rx_req, spi_tx_ena;
  logic i2c_busy = 1'b0, i2c_ack_err = 1'b0, i2c_arb_lost = 1'b0;
  logic [7:0] i2c_data_rd = '0;
  logic i2c_ena, i2c_rw;
  logic [6:0] i2c_addr;
  logic [7:0] i2c_data_wr;
  bridge_state_t state;
  int checks = 0, failures = 0;
  int n_req = 0, n_tx = 0, n_ena_cycles = 0, n_i2c = 0;
  logic [7:0] rsp_byte = '0;
  logic rsp_err = 1'b0, rsp_arb = 1'b0;

  always #5 clk = ~clk;

  spi_to_i2c dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // I2C master stand-in
  initial begin
    wait (reset_n);
    forever begin
      @(posedge clk);
      if (i2c_ena && !i2c_busy) begin
        repeat (3) @(posedge clk);
        i2c_busy <= 1'b1;
        n_i2c++;
        repeat (40) @(posedge clk);
        i2c_data_rd <= rsp_byte;
        i2c_ack_err <= rsp_err;
        i2c_arb_lost <= rsp_arb;
        i2c_busy    <= 1'b0;
        @(posedge clk);
      end
    end
  end

  always @(posedge clk) if (reset_n) begin
    if (spi_rx_req) begin
      n_req++;
      spi_rdy <= 1'b0;
    end
    if (spi_tx_ena) n_tx++;
    if (i2c_ena && i2c_busy) n_ena_cycles++;
  end

  // One command through the controller; returns the response word.
  task automatic run_cmd(input spi_word_t cmd, input bit hold_spi, output spi_word_t rsp);
    int t0, t;
    @(negedge clk);
    spi_rx_data = cmd;
    spi_rdy     = 1'b1;
    t0 = 0;
    while (!i2c_ena) begin @(negedge clk); t0++; end
    check(t0 == 2, $sformatf("i2c_ena %0d cycles after new word, expected 2", t0));
    check(i2c_addr == cmd[23:17] && i2c_rw == cmd[16] && i2c_data_wr == cmd[7:0],
          "command fields on the I2C master inputs");
    check(state == BR_I2C, "state I2C");
    if (hold_spi) spi_busy = 1'b1;
    @(negedge i2c_busy);
    t = 0;
    if (hold_spi) begin
      repeat (20) @(negedge clk);
      check(state == BR_SPI_LOAD_TX && !spi_tx_ena, "waits in SPI_LOAD_TX while SPI is busy");
      spi_busy = 1'b0;
    end
    while (!spi_tx_ena) begin @(posedge clk); #1; t++; end
    if (!hold_spi) check(t == 2, $sformatf("response loaded %0d cycles after I2C end, expected 2", t));
    rsp = spi_tx_data;
    @(negedge clk);
    check(state == BR_READY, "back to READY");
  endtask

  initial begin
    spi_word_t rsp;
    int req0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    @(negedge clk);
    check(state == BR_READY && !i2c_ena && !spi_tx_ena && !spi_rx_req, "READY after reset");

    // waits while the SPI slave is busy
    spi_rx_data = make_cmd(1'b1, 7'h50, 1'b0, 8'h11);
    spi_busy = 1'b1; spi_rdy = 1'b1;
    repeat (10) @(negedge clk);
    check(state == BR_READY && n_req == 0, "stays in READY while spi_busy");
    spi_rdy = 1'b0; spi_busy = 1'b0;
    repeat (5) @(negedge clk);
    check(state == BR_READY && n_req == 0, "stays in READY without spi_rdy");

    // word with the enable bit clear is dropped
    spi_rx_data = make_cmd(1'b0, 7'h50, 1'b0, 8'h22);
    spi_rdy = 1'b1;
    repeat (6) @(negedge clk);
    check(n_req == 1 && !spi_rdy, "disabled word taken");
    check(state == BR_READY && n_i2c == 0 && n_tx == 0 && !i2c_ena, $sformatf("disabled word starts no I2C transfer %0d %0d %0d %0d", state, n_i2c, n_tx, i2c_ena));

    // write
    rsp_byte = 8'hEE; rsp_err = 1'b0;
    run_cmd(make_cmd(1'b1, 7'h50, 1'b0, 8'h3C), 1'b0, rsp);
    check(rsp == make_resp(7'h50, 1'b0, 1'b0, 8'h3C), $sformatf("write response %h", rsp));
    check(n_ena_cycles == 1, "i2c_ena dropped on the first cycle busy is seen");

    // read, with the SPI slave busy at the end
    rsp_byte = 8'h9D; rsp_err = 1'b0;
    run_cmd(make_cmd(1'b1, 7'h21, 1'b1, 8'h00), 1'b1, rsp);
    check(rsp == make_resp(7'h21, 1'b1, 1'b0, 8'h9D), $sformatf("read response %h", rsp));

    // NACKed read
    rsp_byte = 8'hFF; rsp_err = 1'b1;
    run_cmd(make_cmd(1'b1, 7'h33, 1'b1, 8'h00), 1'b0, rsp);
    check(rsp == make_resp(7'h33, 1'b1, 1'b1, 8'hFF), $sformatf("NACK response %h", rsp));
    repeat (2) @(negedge clk);
    // arbitration lost
    rsp_byte = 8'h00; rsp_err = 1'b0; rsp_arb = 1'b1;
    run_cmd(make_cmd(1'b1, 7'h21, 1'b1, 8'h00), 1'b0, rsp);
    check(rsp == make_resp(7'h21, 1'b1, 1'b0, 8'h00, 1'b1), $sformatf("arbitration-lost response %h", rsp));
    repeat (2) @(negedge clk);
    check(n_req == 5 && n_tx == 4 && n_i2c == 4, $sformatf("counts of words, responses and transfers %0d %0d %0d", n_req, n_tx, n_i2c));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
