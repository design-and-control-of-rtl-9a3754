// tb_awp_panel: end-to-end test of a 2 x 3 panel with short I2C bit times and
// poll intervals. See awp_panel_tb_body.svh for what it does and checks.
module tb_awp_panel;
  localparam int ROWS = 2, COLS = 3, BASE_ID = 9;
  localparam int BFM_QTR = 6;
  localparam int SETTLE = 4000;
  localparam bit EXPECT_REPOLL = 1;
  localparam int WATCHDOG = 2_000_000;

  `include "awp_panel_tb_body.svh"

  awp_panel #(.ROWS(ROWS), .COLS(COLS), .BASE_ID(BASE_ID), .QTR_CYCLES(5),
              .POLL_CYCLES(20_000), .NBR_TIMEOUT_CYCLES(1_000_000), .PROBE_GAP_CYCLES(1000)) dut (
    .clk, .rst_n, .cmu_i ('{scl: bus_scl, sda: bus_sda}), .cmu_sda_oe, .mod_i, .mod_o, .relay
  );
endmodule
