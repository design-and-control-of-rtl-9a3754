// neighbor_master: the cell's side of the bus to its North or East neighbor,
// where this cell is the I2C master (the neighbor's South or West port is the
// slave).
//
// Right after reset and then every POLL_CYCLES clocks it runs one exchange:
// START, address NEIGHBOR_ADDR + write, its own cell ID, repeated START, address
// + read, one byte (NACKed), STOP. The byte read is the neighbor's cell ID; if
// any acknowledge is missing the neighbor is taken as absent and nbr_id becomes
// 0x01. nbr_id is 0x01 from reset until the first exchange ends, and poll_done
// pulses at the end of each exchange. Fixing the master role on the North and
// East buses follows the document; the exchange itself, sending the own ID so
// that the slave side learns it too, and the default 2 s poll period at 50 MHz
// (the CMU's polling period reused here) are this design's choices.
module neighbor_master
  import awm_pkg::*;
#(
  parameter int unsigned QTR_CYCLES  = 125,
  parameter int unsigned POLL_CYCLES = 100_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] own_id,
  input  i2c_in_t    bus_i,
  output i2c_out_t   bus_o,
  output logic [7:0] nbr_id,
  output logic       poll_done
);

  typedef enum logic [2:0] {
    P_WAIT, P_START, P_ADDR_W, P_ID, P_RESTART, P_ADDR_R, P_READ, P_STOP
  } pstate_e;

  pstate_e     st;
  logic        pending, fail;
  logic [31:0] timer;
  logic        cmd_valid, cmd_ready, done, ack_rcvd;
  i2c_op_e     cmd_op;
  logic [7:0]  cmd_wdata, rd_data, result;

  always_comb begin
    cmd_op    = I2C_START;
    cmd_wdata = 8'hFF;
    unique case (st)
      P_ADDR_W: begin cmd_op = I2C_WRITE; cmd_wdata = {NEIGHBOR_ADDR, 1'b0}; end
      P_ID:     begin cmd_op = I2C_WRITE; cmd_wdata = {1'b0, own_id};        end
      P_ADDR_R: begin cmd_op = I2C_WRITE; cmd_wdata = {NEIGHBOR_ADDR, 1'b1}; end
      P_READ:   cmd_op = I2C_READ;
      P_STOP:   cmd_op = I2C_STOP;
      default:  ;
    endcase
  end
  assign cmd_valid = (st != P_WAIT) && !pending;

  i2c_master_byte #(.QTR_CYCLES(QTR_CYCLES)) u_master (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_wdata,
    .cmd_rd_ack (1'b0),
    .done, .rd_data, .ack_rcvd,
    .bus_i, .bus_o
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= P_START;
      pending   <= 1'b0;
      fail      <= 1'b0;
      timer     <= '0;
      result    <= NOT_EXISTING;
      nbr_id    <= NOT_EXISTING;
      poll_done <= 1'b0;
    end else begin
      poll_done <= 1'b0;
      if (cmd_valid && cmd_ready) pending <= 1'b1;
      if (st == P_WAIT) begin
        if (timer >= POLL_CYCLES - 1) begin
          timer <= '0;
          st    <= P_START;
        end else begin
          timer <= timer + 32'd1;
        end
      end else begin
        if (st == P_START) timer <= '0;
        else               timer <= timer + 32'd1;
      end
      if (done) begin
        pending <= 1'b0;
        unique case (st)
          P_START:   begin fail <= 1'b0; st <= P_ADDR_W; end
          P_ADDR_W:  if (ack_rcvd) st <= P_ID;     else begin fail <= 1'b1; st <= P_STOP; end
          P_ID:      if (ack_rcvd) st <= P_RESTART; else begin fail <= 1'b1; st <= P_STOP; end
          P_RESTART: st <= P_ADDR_R;
          P_ADDR_R:  if (ack_rcvd) st <= P_READ;   else begin fail <= 1'b1; st <= P_STOP; end
          P_READ:    begin result <= rd_data; st <= P_STOP; end
          P_STOP: begin
            nbr_id    <= fail ? NOT_EXISTING : result;
            poll_done <= 1'b1;
            st        <= P_WAIT;
          end
          default: st <= P_WAIT;
        endcase
      end
    end
  end

endmodule
