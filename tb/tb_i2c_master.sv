// tb_i2c_master: self-checking testbench of i2c_master at its default 50 MHz
// clock and 400 kHz bus rate, with two behavioural I2C slaves on an
// open-drain bus: 0x50, and 0x21 which stretches the clock after every
// acknowledge. It checks single-byte write and read, multi-byte write and
// read (master ACKs all but the last byte read), a repeated START from write
// to read, a NACKed address (ack_error, STOP), START/STOP counts, and that the
// SCL period is at least 125 clk cycles (at most 400 kHz) and at most four
// quarter periods plus the synchronizer delay. A second master, four times
// slower (100 kHz), shares the bus. Both write to one slave with their START
// conditions at the same moment: the one sending a 1 where the other sends a 0
// must lose arbitration, with the clocks synchronized on the wired-AND SCL.
// Given commands at the same moment, the slower master sees the faster one's
// START first and must back off. A master given a command while the other
// holds the bus must wait for its STOP.
module tb_i2c_master;
  import spi_i2c_pkg::*;
  localparam int CLK_FREQ = 50_000_000;
  localparam int BUS_FREQ = 400_000;
  localparam int QDIV     = (CLK_FREQ + 4 * BUS_FREQ - 1) / (4 * BUS_FREQ);
  localparam int RIVAL_FREQ = 100_000;
  localparam int RQDIV      = (CLK_FREQ + 4 * RIVAL_FREQ - 1) / (4 * RIVAL_FREQ);

  logic clk = 1'b0, reset_n = 1'b0;
  logic ena = 1'b0, rw = 1'b0;
  logic [6:0] addr = '0;
  logic [7:0] data_wr = '0, data_rd;
  logic busy, ack_error, arb_lost;
  logic r_ena = 1'b0, r_busy, r_ack_error, r_arb_lost, r_scl_oe, r_sda_oe;
  logic [6:0] r_addr = '0;
  logic [7:0] r_data_wr = '0, r_data_rd;
  logic scl_oe, sda_oe, s0_scl_oe, s0_sda_oe, s1_scl_oe, s1_sda_oe;
  logic scl, sda;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  assign scl = !(scl_oe | r_scl_oe | s0_scl_oe | s1_scl_oe);
  assign sda = !(sda_oe | r_sda_oe | s0_sda_oe | s1_sda_oe);

  i2c_master dut (
    .clk, .reset_n, .ena, .addr, .rw, .data_wr, .busy, .data_rd, .ack_error, .arb_lost,
    .scl_i(scl), .scl_oe, .sda_i(sda), .sda_oe);

  // second master on the same bus
  i2c_master #(.CLK_FREQ(CLK_FREQ), .BUS_FREQ(RIVAL_FREQ)) rival (
    .clk, .reset_n, .ena(r_ena), .addr(r_addr), .rw(1'b0), .data_wr(r_data_wr), .busy(r_busy),
    .data_rd(r_data_rd), .ack_error(r_ack_error), .arb_lost(r_arb_lost),
    .scl_i(scl), .scl_oe(r_scl_oe), .sda_i(sda), .sda_oe(r_sda_oe));

  i2c_slave_model #(.ADDR(7'h50), .STRETCH(0))  s0 (.clk, .scl, .sda, .scl_oe(s0_scl_oe), .sda_oe(s0_sda_oe));
  i2c_slave_model #(.ADDR(7'h21), .STRETCH(40)) s1 (.clk, .scl, .sda, .scl_oe(s1_scl_oe), .sda_oe(s1_sda_oe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // SCL period measurement on the unstretched slave's transfers
  int last_rise = -1, cyc = 0, min_per = 1 << 30, max_per = 0;
  bit measure = 1'b0;
  logic scl_q = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (scl && !scl_q) begin
      // gaps longer than two bit times span an idle bus between transfers
      if (measure && last_rise >= 0 && cyc - last_rise < 8 * QDIV) begin
        if (cyc - last_rise < min_per) min_per = cyc - last_rise;
        if (cyc - last_rise > max_per) max_per = cyc - last_rise;
      end
      last_rise = cyc;
    end
    scl_q = scl;
  end

  // Wait until the bus has been idle (both lines high) for two bit times.
  task automatic wait_idle();
    int n = 0;
    while (n < 8 * QDIV) begin
      @(negedge clk);
      n = (scl && sda && !busy) ? n + 1 : 0;
    end
  endtask

  // Transfer of n bytes to/from one slave with the busy handshake.
  task automatic xfer(input logic [6:0] a, input logic r, input logic [7:0] wd[4], input int n,
                      output logic [7:0] rd[4], output logic err);
    @(negedge clk);
    addr = a; rw = r; data_wr = wd[0]; ena = 1'b1;
    for (int i = 0; i < n; i++) begin
      @(posedge busy);
      @(negedge clk);
      if (i < n - 1) data_wr = wd[i+1];
      else ena = 1'b0;
      @(negedge busy);
      rd[i] = data_rd;
      err   = ack_error;
      if (err) begin
        ena = 1'b0;
        break;
      end
    end
    wait_idle();
  endtask

  initial begin
    logic [7:0] wd[4], rd[4];
    logic err;
    int st0, sp0;
    repeat (5) @(negedge clk);
    reset_n = 1'b1;
    repeat (5) @(negedge clk);
    check(scl && sda && !busy, "bus idle after reset");

    // 1. single-byte write to 0x50
    last_rise = -1;
    measure = 1'b1;
    wd = '{8'h3C, 8'h00, 8'h00, 8'h00};
    st0 = s0.n_start; sp0 = s0.n_stop;
    xfer(7'h50, 1'b0, wd, 1, rd, err);
    check(!err, "write 0x50 acknowledged");
    check(s0.mem[0] == 8'h3C && s0.n_wr == 1, "slave 0x50 got 0x3C");
    check(s0.n_start == st0 + 1 && s0.n_stop == sp0 + 1, "one START and one STOP");

    // 2. single-byte read from 0x50 returns the byte written
    xfer(7'h50, 1'b1, wd, 1, rd, err);
    check(!err && rd[0] == 8'h3C, $sformatf("read 0x50 got %h", rd[0]));
    check(s0.n_rd == 1, "one byte sent by slave");
    measure = 1'b0;
    check(min_per >= CLK_FREQ / BUS_FREQ, $sformatf("SCL period %0d >= %0d", min_per, CLK_FREQ / BUS_FREQ));
    check(max_per <= 4 * QDIV + 4, $sformatf("SCL period %0d <= %0d", max_per, 4 * QDIV + 4));

    // 3. three-byte write to the stretching slave 0x21
    wd = '{8'hA1, 8'hB2, 8'hC3, 8'h00};
    st0 = s1.n_start;
    xfer(7'h21, 1'b0, wd, 3, rd, err);
    check(!err, "3-byte write acknowledged");
    check(s1.mem[0] == 8'hA1 && s1.mem[1] == 8'hB2 && s1.mem[2] == 8'hC3 && s1.n_wr == 3,
          "slave 0x21 got A1 B2 C3");
    check(s1.n_start == st0 + 1, "multi-byte write uses one START");
    check(s1.n_stretch >= 4, $sformatf("clock stretched %0d times", s1.n_stretch));

    // 4. three-byte read from 0x21
    st0 = s1.n_start;
    xfer(7'h21, 1'b1, wd, 3, rd, err);
    check(s1.n_start == st0 + 1, "multi-byte read uses one START");
    check(!err && rd[0] == 8'hA1 && rd[1] == 8'hB2 && rd[2] == 8'hC3,
          $sformatf("3-byte read got %h %h %h", rd[0], rd[1], rd[2]));
    check(s1.n_rd == 3, $sformatf("slave sent %0d bytes, expected 3 (last NACKed)", s1.n_rd));

    // 5. repeated START: write 0x5A to 0x50, then read from 0x50 without STOP
    st0 = s0.n_start; sp0 = s0.n_stop;
    @(negedge clk);
    addr = 7'h50; rw = 1'b0; data_wr = 8'h5A; ena = 1'b1;
    @(posedge busy);
    @(negedge clk); rw = 1'b1;
    @(negedge busy);
    check(!ack_error, "write before repeated START acknowledged");
    @(posedge busy);
    @(negedge clk); ena = 1'b0;
    @(negedge busy);
    check(!ack_error && data_rd == 8'h5A, $sformatf("read after repeated START got %h", data_rd));
    wait_idle();
    check(s0.n_start == st0 + 2 && s0.n_stop == sp0 + 1, "repeated START: two STARTs, one STOP");

    // 6. address nobody answers
    sp0 = s0.n_stop;
    xfer(7'h33, 1'b0, wd, 1, rd, err);
    check(err, "NACK on absent address sets ack_error");
    check(s0.n_stop == sp0 + 1 && scl && sda, "STOP after NACK, bus released");
    check(s0.n_wr == 2 && s1.n_wr == 3, "no byte written after NACK");

    // 7. arbitration: both masters write to 0x50, 0xF0 against 0x0F; this
    // master is started later so that both START conditions coincide
    // (START falls at the end of the third quarter)
    @(negedge clk);
    r_addr = 7'h50; r_data_wr = 8'h0F; r_ena = 1'b1;
    @(posedge r_busy);
    @(negedge clk); r_ena = 1'b0;
    repeat (3 * (RQDIV - QDIV) - 2) @(negedge clk);
    addr = 7'h50; rw = 1'b0; data_wr = 8'hF0; ena = 1'b1;
    @(posedge busy);
    @(negedge clk); ena = 1'b0;
    wait (!busy && !r_busy);
    check(arb_lost && !r_arb_lost && !r_ack_error, $sformatf("arbitration: lost %b rival lost %b", arb_lost, r_arb_lost));
    wait_idle();
    check(s0.n_wr == 3 && s0.mem[2] == 8'h0F, $sformatf("winner's byte written: %h", s0.mem[2]));

    // 7b. commands at the same moment: the rival's START would come later,
    // so it backs off when it sees this master's START
    @(negedge clk);
    r_addr = 7'h21; r_data_wr = 8'h55; r_ena = 1'b1;
    addr = 7'h21; rw = 1'b0; data_wr = 8'h99; ena = 1'b1;
    fork
      begin @(posedge busy); @(negedge clk); ena = 1'b0; end
      begin @(posedge r_busy); @(negedge clk); r_ena = 1'b0; end
    join
    fork
      @(negedge busy);
      @(negedge r_busy);
    join
    check(!arb_lost && !ack_error && r_arb_lost, "slower master backs off at START");
    wait_idle();
    check(s1.n_wr == 4 && s1.mem[3] == 8'h99, $sformatf("faster master's byte written: %h", s1.mem[3]));

    // 8. the rival holds the bus; a command to this master waits for its STOP
    @(negedge clk);
    r_addr = 7'h21; r_data_wr = 8'h66; r_ena = 1'b1;
    @(posedge r_busy);
    @(negedge clk); r_ena = 1'b0;
    sp0 = s1.n_stop;
    repeat (20 * QDIV) @(negedge clk);
    addr = 7'h50; rw = 1'b1; ena = 1'b1;
    @(posedge busy);
    check(s1.n_stop == sp0 + 1, "START only after the other master's STOP");
    @(negedge clk); ena = 1'b0;
    @(negedge busy);
    check(!ack_error && !arb_lost && s1.mem[4] == 8'h66 && data_rd == 8'h0F,
          $sformatf("both transfers completed, read %h", data_rd));
    wait_idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
