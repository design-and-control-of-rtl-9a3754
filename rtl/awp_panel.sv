// awp_panel: an adaptive wiring panel, a ROWS x COLS grid of cell_unit joined
// edge to edge, with CU(0,0) at the top left.
//
// Each cell's North bus is wired to the South bus of the cell above it, and
// each cell's East bus to the West bus of the cell to its right: an open-drain
// wired-AND of the two sides, with the master (N/E side) alone driving SCL.
// Buses at the panel edge see an idle, pulled-up line, so those neighbors read
// as absent (0x01). All cells share the one CMU bus: its SCL/SDA levels come in
// on cmu_i and cmu_sda_oe is the OR of the cells' pull-downs. Cell (r, c) has the
// global ID BASE_ID + r*COLS + c. Module probe pairs and relay outputs of every
// cell are brought out. The default 1 x 2 grid is the two-cell prototype
// (cells joined East-West); the ID numbering and base ID 0x09 (the document's
// example of a lowest cell address) are this design's choices.
module awp_panel
  import awm_pkg::*;
#(
  parameter int unsigned ROWS               = 1,
  parameter int unsigned COLS               = 2,
  parameter int unsigned BASE_ID            = 9,
  parameter int unsigned QTR_CYCLES         = 125,
  parameter int unsigned POLL_CYCLES        = 100_000_000,
  parameter int unsigned NBR_TIMEOUT_CYCLES = 300_000_000,
  parameter int unsigned PROBE_GAP_CYCLES   = 50_000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  i2c_in_t                 cmu_i,
  output logic                    cmu_sda_oe,
  input  i2c_in_t                 mod_i [ROWS][COLS][NUM_ORIENT],
  output i2c_out_t                mod_o [ROWS][COLS][NUM_ORIENT],
  output logic [NUM_SWITCHES-1:0] relay [ROWS][COLS]
);

  i2c_in_t  nbr_i [ROWS][COLS][NUM_DIRS];
  i2c_out_t nbr_o [ROWS][COLS][NUM_DIRS];
  logic [ROWS*COLS-1:0] cmu_pull;

  assign cmu_sda_oe = |cmu_pull;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned ID = BASE_ID + r * COLS + c;

      cell_unit #(
        .QTR_CYCLES         (QTR_CYCLES),
        .POLL_CYCLES        (POLL_CYCLES),
        .NBR_TIMEOUT_CYCLES (NBR_TIMEOUT_CYCLES),
        .PROBE_GAP_CYCLES   (PROBE_GAP_CYCLES)
      ) u_cell (
        .clk, .rst_n,
        .cell_id    (7'(ID)),
        .cmu_i,
        .cmu_sda_oe (cmu_pull[r*COLS+c]),
        .nbr_i      (nbr_i[r][c]),
        .nbr_o      (nbr_o[r][c]),
        .mod_i      (mod_i[r][c]),
        .mod_o      (mod_o[r][c]),
        .relay      (relay[r][c])
      );

      // North bus: this cell masters, the cell above is the slave on its South side.
      if (r > 0) begin : g_n
        assign nbr_i[r][c][DIR_N] = '{scl: !nbr_o[r][c][DIR_N].scl_oe,
                                      sda: !(nbr_o[r][c][DIR_N].sda_oe || nbr_o[r-1][c][DIR_S].sda_oe)};
      end else begin : g_n_edge
        assign nbr_i[r][c][DIR_N] = '{scl: !nbr_o[r][c][DIR_N].scl_oe, sda: !nbr_o[r][c][DIR_N].sda_oe};
      end
      // South bus: the cell below masters it through its North side.
      if (r < ROWS - 1) begin : g_s
        assign nbr_i[r][c][DIR_S] = '{scl: !nbr_o[r+1][c][DIR_N].scl_oe,
                                      sda: !(nbr_o[r+1][c][DIR_N].sda_oe || nbr_o[r][c][DIR_S].sda_oe)};
      end else begin : g_s_edge
        assign nbr_i[r][c][DIR_S] = '{scl: 1'b1, sda: !nbr_o[r][c][DIR_S].sda_oe};
      end
      // East bus: this cell masters, the cell to the right is the slave on its West side.
      if (c < COLS - 1) begin : g_e
        assign nbr_i[r][c][DIR_E] = '{scl: !nbr_o[r][c][DIR_E].scl_oe,
                                      sda: !(nbr_o[r][c][DIR_E].sda_oe || nbr_o[r][c+1][DIR_W].sda_oe)};
      end else begin : g_e_edge
        assign nbr_i[r][c][DIR_E] = '{scl: !nbr_o[r][c][DIR_E].scl_oe, sda: !nbr_o[r][c][DIR_E].sda_oe};
      end
      // West bus: the cell to the left masters it through its East side.
      if (c > 0) begin : g_w
        assign nbr_i[r][c][DIR_W] = '{scl: !nbr_o[r][c-1][DIR_E].scl_oe,
                                      sda: !(nbr_o[r][c-1][DIR_E].sda_oe || nbr_o[r][c][DIR_W].sda_oe)};
      end else begin : g_w_edge
        assign nbr_i[r][c][DIR_W] = '{scl: 1'b1, sda: !nbr_o[r][c][DIR_W].sda_oe};
      end
    end
  end

endmodule
