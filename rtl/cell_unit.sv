// cell_unit: the logic of one cell of the adaptive wiring panel (one FPGA per
// cell in the prototype).
//
// A cell closes the relays of its own switch array on command, learns its
// neighbors and any module plugged into it, and reports all of that to the Cell
// Management Unit (CMU), which does the routing. It holds:
//   - cmu_slave + relay_ctrl: the CMU bus port at the cell's global ID (cell_id)
//     with the read-register map, and the 72-relay switch register;
//   - two neighbor_master: the North and East buses, where this cell is master;
//   - two neighbor_slave: the South and West buses, where this cell is slave;
//   - module_probe: the four SCL/SDA pairs of the module probe connector.
// The neighbor IDs found are read by the CMU at 0x45-0x48. All buses are
// open-drain: *_o/*_oe outputs of 1 pull a line low, and the *_i inputs are the
// resolved line levels. The S and W buses never drive SCL. The split into these
// parts follows the cell functions the document lists; the parameters set the
// I2C bit time (QTR_CYCLES, a quarter SCL period) and the poll, timeout and scan
// intervals, with defaults for a 50 MHz clock that are this design's choices.
module cell_unit
  import awm_pkg::*;
#(
  parameter int unsigned QTR_CYCLES         = 125,
  parameter int unsigned POLL_CYCLES        = 100_000_000,
  parameter int unsigned NBR_TIMEOUT_CYCLES = 300_000_000,
  parameter int unsigned PROBE_GAP_CYCLES   = 50_000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [6:0]              cell_id,
  // CMU bus
  input  i2c_in_t                 cmu_i,
  output logic                    cmu_sda_oe,
  // neighbor buses, indexed by dir_e (N, E, S, W)
  input  i2c_in_t                 nbr_i [NUM_DIRS],
  output i2c_out_t                nbr_o [NUM_DIRS],
  // module probe connector pairs
  input  i2c_in_t                 mod_i [NUM_ORIENT],
  output i2c_out_t                mod_o [NUM_ORIENT],
  // relay board
  output logic [NUM_SWITCHES-1:0] relay
);

  logic [7:0]   nbr_id [NUM_DIRS];
  module_info_t mod_info;
  logic         sw_clear, sw_set, sw_commit, bad_idx;
  logic [7:0]   sw_idx;
  logic         poll_done_n, poll_done_e, scan_done;
  logic         sda_oe_s, sda_oe_w;

  cmu_slave u_cmu (
    .clk, .rst_n,
    .cell_id,
    .nbr_id,
    .mod_info,
    .bus_i  (cmu_i),
    .sda_oe (cmu_sda_oe),
    .sw_clear, .sw_set, .sw_idx, .sw_commit
  );

  relay_ctrl #(.NUM_SWITCHES(NUM_SWITCHES)) u_relay (
    .clk, .rst_n,
    .clear  (sw_clear),
    .set    (sw_set),
    .idx    (sw_idx),
    .commit (sw_commit),
    .relay,
    .bad_idx
  );

  neighbor_master #(.QTR_CYCLES(QTR_CYCLES), .POLL_CYCLES(POLL_CYCLES)) u_nbr_n (
    .clk, .rst_n,
    .own_id    (cell_id),
    .bus_i     (nbr_i[DIR_N]),
    .bus_o     (nbr_o[DIR_N]),
    .nbr_id    (nbr_id[DIR_N]),
    .poll_done (poll_done_n)
  );

  neighbor_master #(.QTR_CYCLES(QTR_CYCLES), .POLL_CYCLES(POLL_CYCLES)) u_nbr_e (
    .clk, .rst_n,
    .own_id    (cell_id),
    .bus_i     (nbr_i[DIR_E]),
    .bus_o     (nbr_o[DIR_E]),
    .nbr_id    (nbr_id[DIR_E]),
    .poll_done (poll_done_e)
  );

  neighbor_slave #(.TIMEOUT_CYCLES(NBR_TIMEOUT_CYCLES)) u_nbr_s (
    .clk, .rst_n,
    .own_id (cell_id),
    .bus_i  (nbr_i[DIR_S]),
    .sda_oe (sda_oe_s),
    .nbr_id (nbr_id[DIR_S])
  );

  neighbor_slave #(.TIMEOUT_CYCLES(NBR_TIMEOUT_CYCLES)) u_nbr_w (
    .clk, .rst_n,
    .own_id (cell_id),
    .bus_i  (nbr_i[DIR_W]),
    .sda_oe (sda_oe_w),
    .nbr_id (nbr_id[DIR_W])
  );

  assign nbr_o[DIR_S] = '{scl_oe: 1'b0, sda_oe: sda_oe_s};
  assign nbr_o[DIR_W] = '{scl_oe: 1'b0, sda_oe: sda_oe_w};

  module_probe #(.QTR_CYCLES(QTR_CYCLES), .GAP_CYCLES(PROBE_GAP_CYCLES)) u_probe (
    .clk, .rst_n,
    .bus_i (mod_i),
    .bus_o (mod_o),
    .mod_info,
    .scan_done
  );

endmodule
