// tb_i2c_master_byte: runs i2c_master_byte against a behavioural module data
// sheet device and a bus monitor. Checks the acknowledge seen for a present and an
// absent address, the bytes read, the bits driven on the bus (monitor), the
// master's ACK/NACK, START/STOP counts and the SCL period of 4 x QTR_CYCLES.
module tb_i2c_master_byte;
  import awm_pkg::*;

  localparam int QTR = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, cmd_rd_ack = 1'b0, done, ack_rcvd;
  i2c_op_e cmd_op = I2C_START;
  logic [7:0] cmd_wdata = '0, rd_data;
  i2c_out_t bus_o;
  logic bus_scl, bus_sda, dev_sda_oe;
  logic [7:0] dev_data [11];
  int checks = 0, failures = 0;

  // bus monitor
  int nstart = 0, nstop = 0, nbits = 0;
  logic [63:0] bits;
  longint last_rise = -1, period = 1000000;
  longint cyc = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  assign bus_scl = !bus_o.scl_oe;
  assign bus_sda = !(bus_o.sda_oe || dev_sda_oe);

  i2c_master_byte #(.QTR_CYCLES(QTR)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_wdata, .cmd_rd_ack,
    .done, .rd_data, .ack_rcvd,
    .bus_i ('{scl: bus_scl, sda: bus_sda}), .bus_o
  );

  eds_module_model #(.ADDR(7'h20), .NDATA(11)) u_dev (
    .present (1'b1), .data (dev_data), .scl (bus_scl), .sda (bus_sda), .sda_oe (dev_sda_oe)
  );

  always @(negedge bus_sda) if (rst_n && bus_scl) begin nstart++; nbits = 0; end
  always @(posedge bus_sda) if (rst_n && bus_scl) nstop++;
  always @(posedge bus_scl) begin
    bits = {bits[62:0], bus_sda};
    nbits++;
    if (last_rise >= 0 && cyc - last_rise < period) period = cyc - last_rise;
    last_rise = cyc;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input i2c_op_e o, input logic [7:0] w, input bit rack);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 1'b1; cmd_op <= o; cmd_wdata <= w; cmd_rd_ack <= rack;
    @(posedge clk);
    cmd_valid <= 1'b0;
    while (!done) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 11; i++) dev_data[i] = 8'(8'h31 * (i + 1));
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(bus_scl && bus_sda, "bus idle after reset");

    // absent address
    op(I2C_START, 8'h00, 1'b0);
    op(I2C_WRITE, {7'h33, 1'b1}, 1'b0);
    check(!ack_rcvd, "NACK from absent address");
    check(bits[8:0] == {7'h33, 1'b1, 1'b1}, "monitor: address bits and NACK");
    op(I2C_STOP, 8'h00, 1'b0);
    check(period == 4 * QTR, $sformatf("shortest SCL period is 4 quarters (%0d)", period));
    check(nstart == 1 && nstop == 1, $sformatf("one START and one STOP (%0d %0d)", nstart, nstop));

    // present device: read three bytes
    op(I2C_START, 8'h00, 1'b0);
    op(I2C_WRITE, {7'h20, 1'b1}, 1'b0);
    check(ack_rcvd, "ACK from device");
    check(bits[8:0] == {7'h20, 1'b1, 1'b0}, "monitor: address bits and ACK");
    op(I2C_READ, 8'h00, 1'b1);
    check(rd_data == dev_data[0], "read byte 0");
    check(bits[0] == 1'b0, "master ACK driven");
    op(I2C_READ, 8'h00, 1'b1);
    check(rd_data == dev_data[1], "read byte 1");
    op(I2C_READ, 8'h00, 1'b0);
    check(rd_data == dev_data[2], "read byte 2");
    check(bits[8:0] == {dev_data[2], 1'b1}, "monitor: last byte then NACK");
    op(I2C_STOP, 8'h00, 1'b0);
    check(nstart == 2 && nstop == 2, "two STARTs and STOPs");

    // repeated START with the bus held
    op(I2C_START, 8'h00, 1'b0);
    op(I2C_WRITE, {7'h20, 1'b0}, 1'b0);
    check(!ack_rcvd, "device ignores a write address");
    op(I2C_START, 8'h00, 1'b0);
    check(nstart == 4 && nstop == 2, "repeated START seen");
    op(I2C_WRITE, {7'h20, 1'b1}, 1'b0);
    check(ack_rcvd, "ACK after repeated START");
    op(I2C_READ, 8'h00, 1'b0);
    check(rd_data == dev_data[0], "read after repeated START");
    op(I2C_STOP, 8'h00, 1'b0);
    check(bus_scl && bus_sda, "bus released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
