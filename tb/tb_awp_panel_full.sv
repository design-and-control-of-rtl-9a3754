// tb_awp_panel_full: the same end-to-end test as tb_awp_panel on the panel with
// every parameter at its default (two cells side by side, 100 kHz I2C at a
// 50 MHz clock, 2 s neighbor polls, 1 ms module scans).
module tb_awp_panel_full;
  localparam int ROWS = 1, COLS = 2, BASE_ID = 9;
  localparam int BFM_QTR = 125;
  localparam int SETTLE = 150_000;
  localparam bit EXPECT_REPOLL = 0;
  localparam int WATCHDOG = 20_000_000;

  `include "awp_panel_tb_body.svh"

  awp_panel dut (
    .clk, .rst_n, .cmu_i ('{scl: bus_scl, sda: bus_sda}), .cmu_sda_oe, .mod_i, .mod_o, .relay
  );
endmodule
