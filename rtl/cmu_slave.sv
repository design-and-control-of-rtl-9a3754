// cmu_slave: the cell's port to the Cell Management Unit (CMU), an I2C slave at
// the cell's global ID on the shared CMU bus.
//
// Reads: the CMU writes one command byte, then reads one byte (after a repeated
// START or a new transfer). 0x44 returns the cell ID, 0x45-0x48 the N/E/S/W
// neighbor IDs (0x01 if none), 0x49 the module ID (0x01 if none), 0x50 the number
// of netlist bytes and 0x51-0x59 config bytes 1-9. These codes follow the
// document's command list. 0x5A, returning the module orientation (0-3, 0xFF if
// none), is this design's addition: the document says the orientation is sent to
// the CMU on request but lists no code for it. Unknown codes read 0x00, and every
// byte of a longer read repeats the selected register.
// Write: 0x33, a count N, then N switch indices (Enable Switch). The indices go
// to relay_ctrl; the relays change when the N-th index has arrived, and a
// transfer that stops early changes nothing. N = 0 opens every relay.
module cmu_slave
  import awm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [6:0]   cell_id,
  input  logic [7:0]   nbr_id [NUM_DIRS],
  input  module_info_t mod_info,
  input  i2c_in_t      bus_i,
  output logic         sda_oe,
  // to relay_ctrl
  output logic         sw_clear,
  output logic         sw_set,
  output logic [7:0]   sw_idx,
  output logic         sw_commit
);

  typedef enum logic [1:0] {W_CMD, W_COUNT, W_INDEX, W_IGNORE} wstate_e;

  logic       addr_hit, addr_rw, rx_valid, tx_load, stop_det;
  logic [7:0] rx_data, tx_data;
  logic [7:0] ptr, remaining;
  wstate_e    wstate;

  i2c_slave_byte u_slave (
    .clk, .rst_n,
    .own_addr (cell_id),
    .bus_i,
    .sda_oe,
    .addr_hit, .addr_rw,
    .rx_valid, .rx_data,
    .tx_data,  .tx_load,
    .stop_det
  );

  // Read register map
  always_comb begin
    tx_data = 8'h00;
    unique case (ptr)
      CMD_CELL_ID:   tx_data = {1'b0, cell_id};
      CMD_NBR_N:     tx_data = nbr_id[DIR_N];
      CMD_NBR_E:     tx_data = nbr_id[DIR_E];
      CMD_NBR_S:     tx_data = nbr_id[DIR_S];
      CMD_NBR_W:     tx_data = nbr_id[DIR_W];
      CMD_MOD_ID:    tx_data = mod_info.id;
      CMD_NET_BYTES: tx_data = mod_info.nbytes;
      CMD_ORIENT:    tx_data = mod_info.orient;
      default:
        if (ptr >= CMD_CFG_FIRST && ptr <= CMD_CFG_LAST)
          tx_data = mod_info.cfg[4'(ptr - CMD_CFG_FIRST)];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate    <= W_IGNORE;
      ptr       <= CMD_CELL_ID;
      remaining <= '0;
      sw_clear  <= 1'b0;
      sw_set    <= 1'b0;
      sw_idx    <= '0;
      sw_commit <= 1'b0;
    end else begin
      sw_clear  <= 1'b0;
      sw_set    <= 1'b0;
      sw_commit <= 1'b0;
      if (addr_hit) begin
        wstate <= addr_rw ? W_IGNORE : W_CMD;
      end else if (stop_det) begin
        wstate <= W_IGNORE;
      end else if (rx_valid) begin
        unique case (wstate)
          W_CMD: begin
            if (rx_data == CMD_ENABLE_SW) begin
              wstate <= W_COUNT;
            end else begin
              ptr    <= rx_data;
              wstate <= W_IGNORE;
            end
          end
          W_COUNT: begin
            remaining <= rx_data;
            sw_clear  <= 1'b1;
            if (rx_data == 8'd0) begin
              sw_commit <= 1'b1;
              wstate    <= W_IGNORE;
            end else begin
              wstate <= W_INDEX;
            end
          end
          W_INDEX: begin
            sw_set    <= 1'b1;
            sw_idx    <= rx_data;
            remaining <= remaining - 8'd1;
            if (remaining == 8'd1) begin
              sw_commit <= 1'b1;
              wstate    <= W_IGNORE;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // A switch index is never staged in the same cycle the staging is cleared.
  a_no_set_with_clear: assert property (@(posedge clk) disable iff (!rst_n) !(sw_set && sw_clear));

endmodule
