// tb_spi_slave: self-checking testbench of spi_slave in all four SPI modes.
// For each (CPOL, CPHA) one slave is driven by a behavioural SPI master. It
// checks that the received word and the word shifted out match what was sent
// and loaded, the rrdy/trdy/roe flags (including an overrun when a word is not
// taken), status loading, busy and the MISO enable.
module tb_spi_slave;
  localparam int W = 32;
  logic clk = 1'b0;
  logic reset_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [3:0] done = '0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar m = 0; m < 4; m++) begin : g_mode
    localparam bit CPOL = m[1];
    localparam bit CPHA = m[0];
    logic sclk, ss_n, mosi, miso, miso_oe;
    logic rx_req = 1'b0, tx_load_en = 1'b0;
    logic [W-1:0] tx_load_data = '0, rx_data;
    logic st_load_en = 1'b0, st_load_trdy = 1'b0, st_load_rrdy = 1'b0, st_load_roe = 1'b0;
    logic busy, trdy, rrdy, roe;

    spi_master_model #(.WIDTH(W), .CPOL(CPOL), .CPHA(CPHA), .HALF(4 + m)) master (
      .clk(clk), .sclk(sclk), .ss_n(ss_n), .mosi(mosi), .miso(miso_oe ? miso : 1'b1));

    spi_slave #(.WIDTH(W), .CPOL(CPOL), .CPHA(CPHA)) dut (.*);

    task automatic load_tx(input logic [W-1:0] d);
      @(negedge clk); tx_load_data = d; tx_load_en = 1'b1;
      @(negedge clk); tx_load_en = 1'b0;
    endtask

    task automatic take_rx();
      @(negedge clk); rx_req = 1'b1;
      @(negedge clk); rx_req = 1'b0;
    endtask

    initial begin : run
      logic [W-1:0] got, t, r;
      string tag;
      tag = $sformatf("mode %0d", m);
      wait (reset_n);
      repeat (3) @(negedge clk);
      check(!busy && !miso_oe && trdy && !rrdy && !roe, {tag, " idle flags after reset"});
      for (int k = 0; k < 6; k++) begin
        t = $urandom; r = $urandom;
        if (k == 0) begin t = 32'h8000_0001; r = 32'h1234_5678; end
        load_tx(t);
        check(!trdy, {tag, " trdy low after load"});
        fork
          master.xfer(r, got);
          begin
            repeat (4 * (4 + m)) @(negedge clk);
            check(busy && miso_oe, {tag, " busy and miso_oe while selected"});
          end
        join
        repeat (3) @(negedge clk);
        check(got == t, $sformatf("%s word out %h expected %h", tag, got, t));
        check(rx_data == r, $sformatf("%s word in %h expected %h", tag, rx_data, r));
        check(rrdy && trdy && !roe, {tag, " rrdy/trdy after word"});
        check(!busy && !miso_oe, {tag, " released after word"});
        take_rx();
        check(!rrdy, {tag, " rrdy cleared by rx_req"});
      end
      // overrun: two words without rx_req
      master.xfer(32'hAAAA_5555, got);
      check(rrdy && !roe, {tag, " first word no overrun"});
      master.xfer(32'h0F0F_F0F0, got);
      repeat (3) @(negedge clk);
      check(roe && rrdy && rx_data == 32'h0F0F_F0F0, {tag, " overrun flagged"});
      // status load clears the flags
      @(negedge clk); st_load_en = 1'b1; st_load_trdy = 1'b0; st_load_rrdy = 1'b0; st_load_roe = 1'b0;
      @(negedge clk); st_load_en = 1'b0;
      check(!roe && !rrdy && !trdy, {tag, " status load"});
      done[m] = 1'b1;
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    reset_n = 1'b1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
