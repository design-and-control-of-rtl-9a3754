// tb_i2c_slave_byte: drives i2c_slave_byte with a behavioural I2C master and
// checks address matching, acknowledge, received bytes, the byte-by-byte read
// with tx_load, the master's NACK ending a read, and STOP detection.
module tb_i2c_slave_byte;
  import awm_pkg::*;

  localparam int BFM_QTR = 6;
  localparam logic [6:0] ADDR = 7'h2A;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bfm_scl_oe = 1'b0, bfm_sda_oe = 1'b0;
  logic bus_scl, bus_sda;
  logic sda_oe, addr_hit, addr_rw, rx_valid, tx_load, stop_det;
  logic [7:0] rx_data, tx_data;
  int checks = 0, failures = 0;
  int hits, nrx, nload, nstop;
  logic [7:0] rx_log [8];
  logic last_rw;
  logic [7:0] tx_tab [4] = '{8'hA5, 8'h3C, 8'h81, 8'h7E};

  always #5 clk = !clk;

  assign bus_scl = !bfm_scl_oe;
  assign bus_sda = !(bfm_sda_oe || sda_oe);

  i2c_slave_byte dut (
    .clk, .rst_n, .own_addr (ADDR),
    .bus_i ('{scl: bus_scl, sda: bus_sda}),
    .sda_oe, .addr_hit, .addr_rw, .rx_valid, .rx_data, .tx_data, .tx_load, .stop_det
  );

  assign tx_data = tx_tab[nload % 4];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hits <= 0; nrx <= 0; nload <= 0; nstop <= 0; last_rw <= 1'b0;
    end else begin
      if (addr_hit) begin hits <= hits + 1; last_rw <= addr_rw; end
      if (rx_valid) begin rx_log[nrx % 8] <= rx_data; nrx <= nrx + 1; end
      if (tx_load)  nload <= nload + 1;
      if (stop_det) nstop <= nstop + 1;
    end
  end

  `include "i2c_bfm.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit ack;
    logic [7:0] d;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // write of two bytes
    bfm_start();
    bfm_write({ADDR, 1'b0}, ack);
    check(ack, "address ACK on write");
    bfm_write(8'h5A, ack); check(ack, "data ACK 1");
    bfm_write(8'hC3, ack); check(ack, "data ACK 2");
    bfm_stop();
    repeat (10) @(posedge clk);
    check(hits == 1 && last_rw == 1'b0, "one write addr_hit");
    check(nrx == 2, "two bytes received");
    check(rx_log[0] == 8'h5A && rx_log[1] == 8'hC3, "received byte values");
    check(nstop == 1, "stop detected");

    // other address: no ACK, no events
    bfm_start();
    bfm_write({7'h2B, 1'b0}, ack);
    check(!ack, "no ACK for another address");
    bfm_write(8'h11, ack);
    bfm_stop();
    repeat (10) @(posedge clk);
    check(hits == 1 && nrx == 2 && nstop == 1, "no events for another address");

    // read of three bytes, the last NACKed
    bfm_start();
    bfm_write({ADDR, 1'b1}, ack);
    check(ack, "address ACK on read");
    bfm_read(d, 1'b1); check(d == 8'hA5, "read byte 1");
    bfm_read(d, 1'b1); check(d == 8'h3C, "read byte 2");
    bfm_read(d, 1'b0); check(d == 8'h81, "read byte 3");
    bfm_stop();
    repeat (10) @(posedge clk);
    check(hits == 2 && last_rw == 1'b1, "read addr_hit");
    check(nload == 3, "three tx_load after a NACKed third byte");
    check(sda_oe == 1'b0, "SDA released after read");

    // write then repeated start read
    bfm_start();
    bfm_write({ADDR, 1'b0}, ack); check(ack, "address ACK (combined)");
    bfm_write(8'h99, ack);
    bfm_start();
    bfm_write({ADDR, 1'b1}, ack); check(ack, "address ACK after repeated START");
    bfm_read(d, 1'b0); check(d == 8'h7E, "read after repeated START");
    bfm_stop();
    repeat (10) @(posedge clk);
    check(nrx == 3 && rx_log[2] == 8'h99, "byte before repeated START");
    check(nstop == 3, "stop count");

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
