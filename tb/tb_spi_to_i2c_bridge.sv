// tb_spi_to_i2c_bridge: end-to-end testbench of the SPI to I2C interface module
// at its default parameters (50 MHz clock, 400 kHz I2C, SPI mode 0). A
// behavioural SPI master sends command words; three behavioural I2C slaves
// (0x50, 0x21 which stretches the clock, 0x68) sit on an open-drain bus.
// Every response word is read back with the following SPI word and compared
// with the expected one, and the slaves' memories are compared with the bytes
// written. A second I2C master on the bus competes with the bridge. Mechanisms
// counted (each must occur): I2C write, I2C read, word dropped because its
// enable bit is clear, clock stretching, NACK from an absent address, the
// bridge waiting to load its response while the SPI master holds the slave
// selected, arbitration lost by the bridge, and the bridge waiting for a bus
// held by the other master. It also checks that SCL never runs faster than
// 400 kHz (125 clk cycles per period) during the transfers to slave 0x50.
module tb_spi_to_i2c_bridge;
  import spi_i2c_pkg::*;
  logic clk = 1'b0, reset_n = 1'b0;
  logic sclk, ss_m, mosi, miso, miso_oe;
  logic ss_hold = 1'b0;
  logic ss_n;
  logic scl_oe, sda_oe;
  logic [2:0] s_scl_oe, s_sda_oe;
  logic scl, sda;
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_drop = 0, n_nack = 0, n_load_wait = 0;
  int n_arb_lost = 0, n_arb_won = 0, n_bus_wait = 0;
  logic r_ena = 1'b0, r_busy, r_ack_error, r_arb_lost, r_scl_oe, r_sda_oe;
  logic [6:0] r_addr = '0;
  logic [7:0] r_data_wr = '0, r_data_rd;

  always #10 clk = ~clk;   // 50 MHz

  assign ss_n = ss_m & !ss_hold;
  assign scl  = !(scl_oe | r_scl_oe | (|s_scl_oe));
  assign sda  = !(sda_oe | r_sda_oe | (|s_sda_oe));

  spi_to_i2c_bridge dut (
    .clk, .reset_n, .sclk, .ss_n, .mosi, .miso, .miso_oe,
    .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe);

  // another master sharing the I2C bus
  i2c_master rival (
    .clk, .reset_n, .ena(r_ena), .addr(r_addr), .rw(1'b0), .data_wr(r_data_wr), .busy(r_busy),
    .data_rd(r_data_rd), .ack_error(r_ack_error), .arb_lost(r_arb_lost),
    .scl_i(scl), .scl_oe(r_scl_oe), .sda_i(sda), .sda_oe(r_sda_oe));

  spi_master_model #(.WIDTH(32), .CPOL(1'b0), .CPHA(1'b0), .HALF(4)) host (
    .clk, .sclk, .ss_n(ss_m), .mosi, .miso(miso_oe ? miso : 1'b1));

  i2c_slave_model #(.ADDR(7'h50), .STRETCH(0))  slave0 (.clk, .scl, .sda, .scl_oe(s_scl_oe[0]), .sda_oe(s_sda_oe[0]));
  i2c_slave_model #(.ADDR(7'h21), .STRETCH(60)) slave1 (.clk, .scl, .sda, .scl_oe(s_scl_oe[1]), .sda_oe(s_sda_oe[1]));
  i2c_slave_model #(.ADDR(7'h68), .STRETCH(0))  slave2 (.clk, .scl, .sda, .scl_oe(s_scl_oe[2]), .sda_oe(s_sda_oe[2]));

  // Wait until SDA and SCL have both been high for 400 cycles (three bit times).
  task automatic wait_bus_idle();
    int n = 0;
    while (n < 400) begin
      @(negedge clk);
      n = (scl && sda) ? n + 1 : 0;
    end
    repeat (50) @(negedge clk);
  endtask

  // SCL period, measured while `measure` is set (transfers without stretching
  // or contention); gaps over two bit times span an idle bus and are skipped
  bit measure = 1'b0;
  int cyc = 0, last_rise = -1, min_per = 1 << 30, n_per = 0;
  logic scl_q = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (scl && !scl_q) begin
      if (measure && last_rise >= 0 && cyc - last_rise < 250) begin
        n_per++;
        if (cyc - last_rise < min_per) min_per = cyc - last_rise;
      end
      last_rise = cyc;
    end
    scl_q = scl;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected response of the previous SPI word, and whether one is pending.
  spi_word_t expect_rsp = '0;

  // Send one command word, check the word read back, and wait for the
  // I2C transfer the command starts (if any).
  task automatic send(input spi_word_t cmd, input spi_word_t next_rsp, input bit hold);
    spi_word_t got;
    int s0;
    s0 = slave0.n_stop;   // every slave sees every STOP
    host.xfer(cmd, got);
    check(got == expect_rsp, $sformatf("response %h expected %h", got, expect_rsp));
    if (cmd[EN_BIT]) begin
      if (hold) ss_hold = 1'b1;   // keep the slave selected across the end of the transfer
      wait (slave0.n_stop != s0);
      repeat (200) @(negedge clk);
      if (hold) begin
        n_load_wait++;
        ss_hold = 1'b0;
        repeat (20) @(negedge clk);
      end
      expect_rsp = next_rsp;
    end else begin
      repeat (3000) @(negedge clk);
      check(slave0.n_stop == s0, "disabled word leaves the I2C bus alone");
      n_drop++;
    end
  endtask

  initial begin
    logic [7:0] d;
    logic [7:0] model [3][16];
    logic [3:0] wp [3], rp [3];
    logic [6:0] adr [3];
    int k;
    adr = '{7'h50, 7'h21, 7'h68};
    for (int s = 0; s < 3; s++) begin
      wp[s] = 0; rp[s] = 0;
      for (int i = 0; i < 16; i++) model[s][i] = {adr[s][3:0], 4'(i)};
    end
    repeat (5) @(negedge clk);
    reset_n = 1'b1;
    repeat (10) @(negedge clk);
    check(scl && sda && !miso_oe, "buses idle after reset");

    // fixed sequence
    measure = 1'b1;
    send(make_cmd(1'b1, 7'h50, 1'b0, 8'hA5), make_resp(7'h50, 1'b0, 1'b0, 8'hA5), 1'b0);
    model[0][wp[0]] = 8'hA5; wp[0]++; n_write++;
    send(make_cmd(1'b1, 7'h50, 1'b1, 8'h00), make_resp(7'h50, 1'b1, 1'b0, model[0][rp[0]]), 1'b0);
    rp[0]++; n_read++;
    measure = 1'b0;
    check(n_per >= 30 && min_per >= 125, $sformatf("SCL period %0d clk over %0d periods, at least 125", min_per, n_per));
    send(make_cmd(1'b0, 7'h50, 1'b0, 8'h99), '0, 1'b0);
    send(make_cmd(1'b1, 7'h21, 1'b0, 8'h77), make_resp(7'h21, 1'b0, 1'b0, 8'h77), 1'b1);
    model[1][wp[1]] = 8'h77; wp[1]++; n_write++;
    send(make_cmd(1'b1, 7'h21, 1'b1, 8'h00), make_resp(7'h21, 1'b1, 1'b0, model[1][rp[1]]), 1'b0);
    rp[1]++; n_read++;
    send(make_cmd(1'b1, 7'h33, 1'b0, 8'h12), make_resp(7'h33, 1'b0, 1'b1, 8'h12), 1'b0);
    n_nack++;
    // contention: the bridge and the rival write 0xFF and 0x00 (swapped on
    // odd rounds) to 0x68; the rival starts D cycles after the SPI word ends.
    // Three outcomes are possible: the bridge wins (the rival's arb_lost is
    // set), the bridge loses (bit 9 of the response), or the bridge's master
    // found the bus already busy and wrote after the rival's STOP.
    for (int dly = 0; dly < 12; dly++) begin
      spi_word_t got;
      int w0;
      logic [7:0] bd;
      bd = dly[0] ? 8'h00 : 8'hFF;
      w0 = slave2.n_wr;
      fork
        host.xfer(make_cmd(1'b1, 7'h68, 1'b0, bd), got);
        begin
          @(posedge ss_m);
          repeat (dly) @(negedge clk);
          r_addr = 7'h68; r_data_wr = ~bd; r_ena = 1'b1;
          @(posedge r_busy);
          @(negedge clk);
          r_ena = 1'b0;
        end
      join
      check(got == expect_rsp, $sformatf("response %h expected %h", got, expect_rsp));
      wait_bus_idle();
      check(!r_busy && !r_ack_error, "rival finished");
      if (slave2.n_wr == w0 + 2) begin
        n_bus_wait++;
        model[2][wp[2]] = ~bd; wp[2]++;
        model[2][wp[2]] = bd;  wp[2]++;
        expect_rsp = make_resp(7'h68, 1'b0, 1'b0, bd);
      end else if (r_arb_lost) begin
        n_arb_won++;
        check(bd == 8'h00 || dly > 4, "bridge wins only with the lower byte or an earlier START");
        model[2][wp[2]] = bd; wp[2]++;
        expect_rsp = make_resp(7'h68, 1'b0, 1'b0, bd);
      end else begin
        n_arb_lost++;
        model[2][wp[2]] = ~bd; wp[2]++;
        expect_rsp = make_resp(7'h68, 1'b0, 1'b0, bd, 1'b1);
      end
      check(slave2.n_wr == int'(wp[2]), "bytes written per contest");
      $display("round %0d: bridge byte %h: %s", dly, bd,
               (slave2.n_wr == w0 + 2) ? "waited for bus" : r_arb_lost ? "won" : "lost");
    end

    // bus held by the rival (three bytes to the stretching slave) when a
    // command arrives: the bridge must wait for the rival's STOP
    begin
      spi_word_t got;
      int sp;
      @(negedge clk);
      r_addr = 7'h21; r_data_wr = 8'h3A; r_ena = 1'b1;
      @(posedge r_busy);
      @(negedge clk); r_data_wr = 8'h3B;
      @(posedge r_busy);
      @(negedge clk); r_data_wr = 8'h3C;
      @(posedge r_busy);
      @(negedge clk); r_ena = 1'b0;
      model[1][wp[1]] = 8'h3A; wp[1]++;
      model[1][wp[1]] = 8'h3B; wp[1]++;
      sp = slave0.n_stop;
      host.xfer(make_cmd(1'b1, 7'h50, 1'b0, 8'h44), got);
      check(got == expect_rsp, $sformatf("response %h expected %h", got, expect_rsp));
      check(slave0.n_stop == sp && r_busy, "command arrived while the rival holds the bus");
      wait (slave0.n_stop == sp + 1);
      model[1][wp[1]] = 8'h3C; wp[1]++;
      wait (slave0.n_stop == sp + 2);
      repeat (300) @(negedge clk);
      check(!r_ack_error && !r_arb_lost, "rival transfer undisturbed");
      n_bus_wait++; n_write++;
      model[0][wp[0]] = 8'h44; wp[0]++;
      expect_rsp = make_resp(7'h50, 1'b0, 1'b0, 8'h44);
    end

    // random mix over the three slaves
    for (int i = 0; i < 10; i++) begin
      k = $urandom_range(0, 2);
      d = 8'($urandom);
      if ($urandom_range(0, 1) == 0) begin
        send(make_cmd(1'b1, adr[k], 1'b0, d), make_resp(adr[k], 1'b0, 1'b0, d), 1'b0);
        model[k][wp[k]] = d; wp[k]++; n_write++;
      end else begin
        send(make_cmd(1'b1, adr[k], 1'b1, d), make_resp(adr[k], 1'b1, 1'b0, model[k][rp[k]]), 1'b0);
        rp[k]++; n_read++;
      end
    end
    // last word only reads back the final response
    send(make_cmd(1'b0, 7'h00, 1'b0, 8'h00), '0, 1'b0);

    for (int i = 0; i < 16; i++) begin
      check(slave0.mem[i] == model[0][i] && slave1.mem[i] == model[1][i] && slave2.mem[i] == model[2][i],
            $sformatf("slave memories at %0d", i));
    end
    check(slave1.n_stretch > 0, "clock stretching happened");
    check(n_write > 0 && n_read > 0 && n_drop > 0 && n_nack > 0 && n_load_wait > 0,
          $sformatf("mechanisms: write %0d read %0d drop %0d nack %0d load_wait %0d",
                    n_write, n_read, n_drop, n_nack, n_load_wait));
    check(n_arb_lost > 0 && n_arb_won > 0, "bridge lost and won arbitration");
    check(n_bus_wait > 0, "bridge waited for a busy bus");
    $display("mechanisms: write %0d read %0d dropped %0d nack %0d stretch %0d load_wait %0d",
             n_write, n_read, n_drop, n_nack, slave1.n_stretch, n_load_wait);
    $display("arbitration: bridge lost %0d won %0d; bus-busy waits %0d", n_arb_lost, n_arb_won, n_bus_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
