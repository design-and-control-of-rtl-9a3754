// tb_cell_unit: one cell with its North bus looped back to its own South bus,
// its East bus open, a behavioural West neighbor and a module plugged into pin
// pair 1. A behavioural I2C master first acts as the West neighbor, then as the
// Cell Management Unit: it reads the whole register map and sends an Enable
// Switch message, and the testbench checks the values and the relay outputs.
module tb_cell_unit;
  import awm_pkg::*;

  localparam int BFM_QTR = 6;
  localparam int QTR  = 5;
  localparam logic [6:0] ID = 7'h0D;
  localparam logic [7:0] WEST_ID = 8'h30;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bfm_scl_oe = 1'b0, bfm_sda_oe = 1'b0;
  logic bus_scl, bus_sda;
  logic on_cmu = 1'b0;                  // BFM drives the CMU bus (1) or the West bus (0)
  logic cmu_sda_oe, m_sda_oe;
  i2c_in_t  cmu_i, nbr_i [NUM_DIRS], mod_i [NUM_ORIENT];
  i2c_out_t nbr_o [NUM_DIRS], mod_o [NUM_ORIENT];
  logic [NUM_SWITCHES-1:0] relay, expect_r;
  logic [7:0] mdata [11];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  // BFM on one of two buses
  assign cmu_i = '{scl: !(on_cmu && bfm_scl_oe), sda: !((on_cmu && bfm_sda_oe) || cmu_sda_oe)};
  assign nbr_i[DIR_W] = '{scl: !(!on_cmu && bfm_scl_oe), sda: !((!on_cmu && bfm_sda_oe) || nbr_o[DIR_W].sda_oe)};
  assign bus_scl = on_cmu ? cmu_i.scl : nbr_i[DIR_W].scl;
  assign bus_sda = on_cmu ? cmu_i.sda : nbr_i[DIR_W].sda;
  // North master looped to South slave; East left open
  assign nbr_i[DIR_N] = '{scl: !nbr_o[DIR_N].scl_oe, sda: !(nbr_o[DIR_N].sda_oe || nbr_o[DIR_S].sda_oe)};
  assign nbr_i[DIR_S] = nbr_i[DIR_N];
  assign nbr_i[DIR_E] = '{scl: !nbr_o[DIR_E].scl_oe, sda: !nbr_o[DIR_E].sda_oe};
  // module on pair 1
  always_comb
    for (int k = 0; k < NUM_ORIENT; k++)
      mod_i[k] = '{scl: !mod_o[k].scl_oe, sda: !(mod_o[k].sda_oe || (k == 1 && m_sda_oe))};

  cell_unit #(.QTR_CYCLES(QTR), .POLL_CYCLES(4000), .NBR_TIMEOUT_CYCLES(1_000_000),
              .PROBE_GAP_CYCLES(2000)) dut (
    .clk, .rst_n, .cell_id (ID), .cmu_i, .cmu_sda_oe, .nbr_i, .nbr_o, .mod_i, .mod_o, .relay
  );

  eds_module_model #(.ADDR(MODULE_ADDR), .NDATA(11)) u_mod (
    .present (1'b1), .data (mdata), .scl (mod_i[1].scl), .sda (mod_i[1].sda), .sda_oe (m_sda_oe)
  );

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
    logic [7:0] d;
    logic [7:0] msg [16];
    bit ok;
    mdata = '{8'h03, 8'd2, 8'hA1, 8'hA2, 8'hA3, 8'hA4, 8'hA5, 8'hA6, 8'hA7, 8'hA8, 8'hA9};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // West neighbor exchange
    bfm_reg_read(NEIGHBOR_ADDR, WEST_ID, d, ok);
    check(ok && d == {1'b0, ID}, "West neighbor reads the cell ID");

    // let the North loop-back poll and the module scan finish
    repeat (3000) @(posedge clk);
    on_cmu = 1'b1;
    repeat (20) @(posedge clk);

    expect_reg(CMD_CELL_ID, {1'b0, ID});
    expect_reg(CMD_NBR_N, {1'b0, ID});
    expect_reg(CMD_NBR_E, NOT_EXISTING);
    expect_reg(CMD_NBR_S, {1'b0, ID});
    expect_reg(CMD_NBR_W, WEST_ID);
    expect_reg(CMD_MOD_ID, 8'h03);
    expect_reg(CMD_NET_BYTES, 8'd2);
    expect_reg(8'h51, 8'hA1);
    expect_reg(8'h52, 8'hA2);
    expect_reg(8'h53, 8'h00);
    expect_reg(CMD_ORIENT, 8'd1);

    msg[0] = CMD_ENABLE_SW; msg[1] = 8'd2; msg[2] = 8'd10; msg[3] = 8'd65;
    bfm_msg_write(ID, msg, 4, ok);
    repeat (5) @(posedge clk);
    expect_r = '0; expect_r[10] = 1'b1; expect_r[65] = 1'b1;
    check(ok && relay == expect_r, "relays 10 and 65 closed");

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
