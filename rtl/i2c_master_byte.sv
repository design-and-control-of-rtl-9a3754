// i2c_master_byte: byte-level I2C master engine used by every bus a cell masters
// (its North and East neighbor buses and the module probe connector).
//
// A command (START, WRITE, READ or STOP) is taken when cmd_valid and cmd_ready are
// both high; `done` pulses one cycle when it has finished. Every bit is four
// quarter periods of QTR_CYCLES clocks: set SDA while SCL is low, release SCL,
// sample SDA, pull SCL low. START and STOP reuse the same four quarters, so a
// START issued while the bus is held gives a repeated START. WRITE returns the
// slave's acknowledge in ack_rcvd; READ returns the byte in rd_data and drives
// cmd_rd_ack as the master's acknowledge. Lines are open-drain (bus_o bits pull
// low) and bus_i is synchronised by two flip-flops. The document names the I2C
// masters of a cell but not their insides: this engine, single-master operation
// without clock stretching or arbitration, and the default 100 kHz SCL at a
// 50 MHz clock (QTR_CYCLES = 125) are this design's own choices.
module i2c_master_byte
  import awm_pkg::*;
#(
  parameter int unsigned QTR_CYCLES = 125
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  i2c_op_e    cmd_op,
  input  logic [7:0] cmd_wdata,
  input  logic       cmd_rd_ack,
  output logic       done,
  output logic [7:0] rd_data,
  output logic       ack_rcvd,
  input  i2c_in_t    bus_i,
  output i2c_out_t   bus_o
);

  localparam int unsigned QW = (QTR_CYCLES > 1) ? $clog2(QTR_CYCLES) : 1;

  logic          busy;
  i2c_op_e       op;
  logic [1:0]    phase;
  logic [3:0]    bitn;
  logic [QW-1:0] qcnt;
  logic [8:0]    tx, rx;
  logic [1:0]    sda_sync;

  assign cmd_ready = !busy;
  assign rd_data   = rx[8:1];
  assign ack_rcvd  = !rx[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sda_sync <= 2'b11;
    else        sda_sync <= {sda_sync[0], bus_i.sda};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      op    <= I2C_STOP;
      phase <= '0;
      bitn  <= '0;
      qcnt  <= '0;
      tx    <= '1;
      rx    <= '1;
      bus_o <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (cmd_valid) begin
          busy  <= 1'b1;
          op    <= cmd_op;
          phase <= '0;
          bitn  <= '0;
          qcnt  <= '0;
          tx    <= (cmd_op == I2C_WRITE) ? {cmd_wdata, 1'b1} : {8'hFF, !cmd_rd_ack};
        end
      end else begin
        // Quarter-period action, taken on the first clock of each quarter.
        if (qcnt == '0) begin
          unique case (op)
            I2C_START: unique case (phase)
              2'd0: bus_o.sda_oe <= 1'b0;
              2'd1: bus_o.scl_oe <= 1'b0;
              2'd2: bus_o.sda_oe <= 1'b1;
              2'd3: bus_o.scl_oe <= 1'b1;
            endcase
            I2C_STOP: unique case (phase)
              2'd0: bus_o.sda_oe <= 1'b1;
              2'd1: bus_o.scl_oe <= 1'b0;
              2'd2: bus_o.sda_oe <= 1'b0;
              2'd3: ;
            endcase
            default: unique case (phase)
              2'd0: bus_o.sda_oe <= !tx[8];
              2'd1: bus_o.scl_oe <= 1'b0;
              2'd2: rx <= {rx[7:0], sda_sync[1]};
              2'd3: bus_o.scl_oe <= 1'b1;
            endcase
          endcase
        end
        if (qcnt == QW'(QTR_CYCLES - 1)) begin
          qcnt  <= '0;
          phase <= phase + 2'd1;
          if (phase == 2'd3) begin
            if (op == I2C_START || op == I2C_STOP || bitn == 4'd8) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              bitn <= bitn + 4'd1;
              tx   <= {tx[7:0], 1'b1};
            end
          end
        end else begin
          qcnt <= qcnt + QW'(1);
        end
      end
    end
  end

  // Bus rules: data bits change only while SCL is held low, so only START and
  // STOP move SDA with SCL released; a command is only taken while idle.
  a_sda_with_scl_low: assert property (@(posedge clk) disable iff (!rst_n)
    busy && (op == I2C_WRITE || op == I2C_READ) && $changed(bus_o.sda_oe) |-> bus_o.scl_oe);
  a_done_when_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
