// neighbor_slave: the cell's side of the bus to its South or West neighbor,
// where the neighbor is the I2C master.
//
// It answers at NEIGHBOR_ADDR on this point-to-point bus. A byte written to it is
// the neighbor's cell ID and is stored in nbr_id; a read returns this cell's own
// ID. If no ID arrives for TIMEOUT_CYCLES clocks the neighbor is taken as gone
// and nbr_id returns to 0x01, the value it also holds after reset. The slave role
// on the South and West buses follows the document; the exchange and the timeout
// (three of the neighbor's poll periods by default) are this design's choices.
module neighbor_slave
  import awm_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 300_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] own_id,
  input  i2c_in_t    bus_i,
  output logic       sda_oe,
  output logic [7:0] nbr_id
);

  logic        addr_hit, addr_rw, rx_valid, tx_load, stop_det;
  logic [7:0]  rx_data;
  logic [31:0] timer;

  i2c_slave_byte u_slave (
    .clk, .rst_n,
    .own_addr (NEIGHBOR_ADDR),
    .bus_i,
    .sda_oe,
    .addr_hit, .addr_rw,
    .rx_valid, .rx_data,
    .tx_data  ({1'b0, own_id}),
    .tx_load,
    .stop_det
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbr_id <= NOT_EXISTING;
      timer  <= '0;
    end else if (rx_valid) begin
      nbr_id <= rx_data;
      timer  <= '0;
    end else if (timer >= TIMEOUT_CYCLES - 1) begin
      nbr_id <= NOT_EXISTING;
    end else begin
      timer <= timer + 32'd1;
    end
  end

endmodule
