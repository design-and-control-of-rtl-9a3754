// tb_cmu_slave: plays the Cell Management Unit against cmu_slave (with a
// relay_ctrl behind it). Reads every register of the map and compares with the
// values the testbench drives in, checks that another cell address is ignored,
// and sends Enable Switch messages (full, replacing, empty, cut short by STOP,
// with an unknown index) and checks the relay word.
module tb_cmu_slave;
  import awm_pkg::*;

  localparam int BFM_QTR = 6;
  localparam logic [6:0] ID = 7'h09;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bfm_scl_oe = 1'b0, bfm_sda_oe = 1'b0;
  logic bus_scl, bus_sda, sda_oe;
  logic [7:0] nbr_id [NUM_DIRS];
  module_info_t mod_info;
  logic sw_clear, sw_set, sw_commit, bad_idx;
  logic [7:0] sw_idx;
  logic [NUM_SWITCHES-1:0] relay, expect_r;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  assign bus_scl = !bfm_scl_oe;
  assign bus_sda = !(bfm_sda_oe || sda_oe);

  cmu_slave dut (
    .clk, .rst_n, .cell_id (ID), .nbr_id, .mod_info,
    .bus_i ('{scl: bus_scl, sda: bus_sda}), .sda_oe,
    .sw_clear, .sw_set, .sw_idx, .sw_commit
  );
  relay_ctrl u_relay (.clk, .rst_n, .clear (sw_clear), .set (sw_set), .idx (sw_idx),
                      .commit (sw_commit), .relay, .bad_idx);

  `include "i2c_bfm.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_reg(input logic [7:0] cmd, input logic [7:0] val);
    logic [7:0] d;
    bit ok;
    bfm_reg_read(ID, cmd, d, ok);
    check(ok && d == val, $sformatf("register %02h: got %02h want %02h", cmd, d, val));
  endtask

  initial begin
    logic [7:0] msg [16];
    logic [7:0] d;
    bit ok;
    nbr_id = '{8'h0A, 8'h01, 8'h0C, 8'h01};
    mod_info.id = 8'h02; mod_info.nbytes = 8'd3; mod_info.orient = 8'd2;
    for (int i = 0; i < NUM_CFG_BYTES; i++) mod_info.cfg[i] = 8'(8'h60 + i);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    expect_reg(8'h44, {1'b0, ID});
    expect_reg(8'h45, 8'h0A);
    expect_reg(8'h46, 8'h01);
    expect_reg(8'h47, 8'h0C);
    expect_reg(8'h48, 8'h01);
    expect_reg(8'h49, 8'h02);
    expect_reg(8'h50, 8'd3);
    for (int i = 0; i < NUM_CFG_BYTES; i++) expect_reg(8'(8'h51 + i), 8'(8'h60 + i));
    expect_reg(8'h5A, 8'd2);
    expect_reg(8'h7F, 8'h00);

    // a different cell address is not answered
    bfm_reg_read(7'h0B, 8'h44, d, ok);
    check(!ok, "no answer at another cell address");

    // Enable Switch: close 3, 17, 71
    msg[0] = CMD_ENABLE_SW; msg[1] = 8'd3; msg[2] = 8'd3; msg[3] = 8'd17; msg[4] = 8'd71;
    bfm_msg_write(ID, msg, 5, ok);
    repeat (5) @(posedge clk);
    expect_r = '0; expect_r[3] = 1'b1; expect_r[17] = 1'b1; expect_r[71] = 1'b1;
    check(ok && relay == expect_r, "switches 3, 17, 71 closed");

    // message cut short: nothing changes
    msg[1] = 8'd4; msg[2] = 8'd5; msg[3] = 8'd6;
    bfm_msg_write(ID, msg, 4, ok);
    repeat (5) @(posedge clk);
    check(relay == expect_r, "short message changes nothing");

    // message to another cell: nothing changes
    msg[1] = 8'd1; msg[2] = 8'd9;
    bfm_msg_write(7'h0B, msg, 3, ok);
    repeat (5) @(posedge clk);
    check(!ok && relay == expect_r, "message for another cell ignored");

    // replacing list, with one index out of range
    msg[1] = 8'd3; msg[2] = 8'd0; msg[3] = 8'd99; msg[4] = 8'd40;
    bfm_msg_write(ID, msg, 5, ok);
    repeat (5) @(posedge clk);
    expect_r = '0; expect_r[0] = 1'b1; expect_r[40] = 1'b1;
    check(ok && relay == expect_r, "new list replaces the old");

    // a register read in between does not disturb the relays
    expect_reg(8'h44, {1'b0, ID});
    check(relay == expect_r, "relays held across reads");

    // empty list opens all
    msg[1] = 8'd0;
    bfm_msg_write(ID, msg, 2, ok);
    repeat (5) @(posedge clk);
    check(ok && relay == '0, "empty list opens all relays");

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
