// tb_bridge_spi_modes: runs the whole SPI to I2C interface module in each of
// the four SPI modes (CPOL, CPHA = 00, 01, 10, 11). Four copies of the bridge
// run side by side, each with its own SPI host in the matching mode and its
// own I2C bus with one behavioural slave. In every mode the host writes a
// byte to the slave, reads it back, and then sends a word with the enable bit
// clear to collect the last response. The test checks the response words,
// which carry the written and the read byte, and the slave's memory. The I2C
// side keeps its default 400 kHz at a 50 MHz clock; SCLK runs at clk/8.
module tb_bridge_spi_modes;
  import spi_i2c_pkg::*;
  logic clk = 1'b0, reset_n = 1'b0;
  int checks = 0, failures = 0;
  int n_done = 0;

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  for (genvar m = 0; m < 4; m++) begin : g_mode
    localparam bit CPOL = m[1];
    localparam bit CPHA = m[0];
    localparam logic [6:0] ADDR = 7'h50 + 7'(m);
    logic sclk, ss_n, mosi, miso, miso_oe;
    logic scl_oe, sda_oe, s_scl_oe, s_sda_oe;
    logic scl, sda;

    assign scl = !(scl_oe | s_scl_oe);
    assign sda = !(sda_oe | s_sda_oe);

    spi_to_i2c_bridge #(.CPOL(CPOL), .CPHA(CPHA)) dut (
      .clk, .reset_n, .sclk, .ss_n, .mosi, .miso, .miso_oe,
      .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe);

    spi_master_model #(.WIDTH(32), .CPOL(CPOL), .CPHA(CPHA), .HALF(4)) host (
      .clk, .sclk, .ss_n, .mosi, .miso(miso_oe ? miso : 1'b1));

    i2c_slave_model #(.ADDR(ADDR), .STRETCH(0)) slave (
      .clk, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe));

    initial begin
      spi_word_t cmd [3];
      spi_word_t rsp [3];
      logic [7:0] d;
      int s0;
      d = 8'h3C ^ 8'(m * 8'h55);
      cmd[0] = make_cmd(1'b1, ADDR, 1'b0, d);       // write d
      cmd[1] = make_cmd(1'b1, ADDR, 1'b1, 8'h00);   // read it back
      cmd[2] = make_cmd(1'b0, ADDR, 1'b0, 8'h00);   // no transfer, fetch response
      wait (reset_n);
      repeat (20) @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        s0 = slave.n_stop;
        host.xfer(cmd[i], rsp[i]);
        if (cmd[i][EN_BIT]) begin
          wait (slave.n_stop != s0);
          repeat (200) @(negedge clk);
        end
      end
      check(rsp[1] == make_resp(ADDR, 1'b0, 1'b0, d),
            $sformatf("mode %0d: write response %h expected %h", m, rsp[1], make_resp(ADDR, 1'b0, 1'b0, d)));
      check(rsp[2] == make_resp(ADDR, 1'b1, 1'b0, d),
            $sformatf("mode %0d: read response %h expected %h", m, rsp[2], make_resp(ADDR, 1'b1, 1'b0, d)));
      check(slave.mem[0] == d, $sformatf("mode %0d: slave memory %h expected %h", m, slave.mem[0], d));
      check(slave.n_wr == 1 && slave.n_rd == 1 && slave.n_start == 2,
            $sformatf("mode %0d: slave saw %0d writes, %0d reads, %0d STARTs", m, slave.n_wr, slave.n_rd, slave.n_start));
      n_done++;
    end
  end

  initial begin
    repeat (5) @(negedge clk);
    reset_n = 1'b1;
    wait (n_done == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
