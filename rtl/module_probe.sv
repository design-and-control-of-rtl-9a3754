// module_probe: finds a module plugged into the cell's 4x4 probe connector and
// reads its electronic data sheet.
//
// The connector carries four SCL/SDA pairs; a module populates only one of them,
// which one depending on how it is turned. The probe tries the pairs 0..3 in
// turn, each time START, MODULE_ADDR + read, and STOP if unanswered. On the first
// pair that acknowledges it reads 2 + NUM_CFG_BYTES bytes (module ID, number of
// netlist bytes, config bytes 1..9; the last NACKed), then STOP. It then publishes
// mod_info: the ID, the byte count, the config bytes (those past the count read
// as 0) and the pair index as orientation. If no pair answers, mod_info holds ID
// 0x01, count 0 and orientation 0xFF. A new scan starts GAP_CYCLES clocks after
// the last, so plugging or removing a module shows at the next scan; scan_done
// pulses after each scan. Polling all four SDA pins and taking the orientation
// from the answering pair follow the document; the module's address, the fixed
// read length and the default 1 ms gap are this design's choices.
module module_probe
  import awm_pkg::*;
#(
  parameter int unsigned QTR_CYCLES = 125,
  parameter int unsigned GAP_CYCLES = 50_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  i2c_in_t      bus_i [NUM_ORIENT],
  output i2c_out_t     bus_o [NUM_ORIENT],
  output module_info_t mod_info,
  output logic         scan_done
);

  localparam int unsigned NREAD = 2 + NUM_CFG_BYTES;

  typedef enum logic [2:0] {M_WAIT, M_START, M_ADDR, M_READ, M_STOP} mstate_e;

  mstate_e      st;
  logic [1:0]   pair;
  logic [3:0]   nbyte;
  logic         pending, found;
  logic [31:0]  timer;
  module_info_t info;
  logic         cmd_valid, cmd_ready, done, ack_rcvd;
  i2c_op_e      cmd_op;
  logic [7:0]   rd_data;
  i2c_in_t      sel_i;
  i2c_out_t     eng_o;

  always_comb begin
    unique case (st)
      M_ADDR:  cmd_op = I2C_WRITE;
      M_READ:  cmd_op = I2C_READ;
      M_STOP:  cmd_op = I2C_STOP;
      default: cmd_op = I2C_START;
    endcase
  end
  assign cmd_valid = (st != M_WAIT) && !pending;

  // Steer the one engine onto the pair being probed; the others stay released.
  assign sel_i = bus_i[pair];
  always_comb begin
    for (int i = 0; i < NUM_ORIENT; i++) bus_o[i] = '0;
    bus_o[pair] = eng_o;
  end

  i2c_master_byte #(.QTR_CYCLES(QTR_CYCLES)) u_master (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op,
    .cmd_wdata  ({MODULE_ADDR, 1'b1}),
    .cmd_rd_ack (32'(nbyte) != NREAD - 1),
    .done, .rd_data, .ack_rcvd,
    .bus_i (sel_i),
    .bus_o (eng_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= M_START;
      pair      <= '0;
      nbyte     <= '0;
      pending   <= 1'b0;
      found     <= 1'b0;
      timer     <= '0;
      info      <= '0;
      mod_info  <= '{id: NOT_EXISTING, nbytes: 8'd0, cfg: '0, orient: NO_ORIENT};
      scan_done <= 1'b0;
    end else begin
      scan_done <= 1'b0;
      if (cmd_valid && cmd_ready) pending <= 1'b1;
      if (st == M_WAIT) begin
        if (timer >= GAP_CYCLES - 1) begin
          timer <= '0;
          pair  <= '0;
          st    <= M_START;
        end else begin
          timer <= timer + 32'd1;
        end
      end
      if (done) begin
        pending <= 1'b0;
        unique case (st)
          M_START: begin
            found <= 1'b0;
            nbyte <= '0;
            info  <= '0;
            st    <= M_ADDR;
          end
          M_ADDR: st <= ack_rcvd ? M_READ : M_STOP;
          M_READ: begin
            if (nbyte == 4'd0)      info.id     <= rd_data;
            else if (nbyte == 4'd1) info.nbytes <= rd_data;
            else if (32'(nbyte) - 2 < 32'(info.nbytes))
              info.cfg[nbyte - 4'd2] <= rd_data;
            if (32'(nbyte) == NREAD - 1) begin
              found <= 1'b1;
              st    <= M_STOP;
            end
            nbyte <= nbyte + 4'd1;
          end
          M_STOP: begin
            if (found) begin
              mod_info  <= '{id: info.id, nbytes: info.nbytes, cfg: info.cfg, orient: {6'd0, pair}};
              scan_done <= 1'b1;
              st        <= M_WAIT;
            end else if (pair == 2'(NUM_ORIENT - 1)) begin
              mod_info  <= '{id: NOT_EXISTING, nbytes: 8'd0, cfg: '0, orient: NO_ORIENT};
              scan_done <= 1'b1;
              st        <= M_WAIT;
            end else begin
              pair <= pair + 2'd1;
              st   <= M_START;
            end
          end
          default: st <= M_WAIT;
        endcase
      end
    end
  end

endmodule
