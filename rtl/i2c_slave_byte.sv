// i2c_slave_byte: byte-level I2C slave engine with a 7-bit address, used by the
// cell's CMU port and by its South and West neighbor ports.
//
// SCL and SDA are synchronised to clk and their edges found by comparison with
// the previous sample; START and STOP are SDA edges while SCL is high. After a
// START the engine shifts in the address byte on SCL rising edges. On a match it
// pulls SDA low for the acknowledge bit and pulses addr_hit with the R/W bit.
// In a write, each received byte is acknowledged and reported by a one-cycle
// rx_valid pulse. In a read, the engine latches tx_data at the start of every byte
// it sends (tx_load pulses then) and keeps sending while the master acknowledges.
// A STOP ends the transfer and pulses stop_det if this slave was addressed.
// The document names the I2C slaves of a cell but not their insides; this
// engine, the absence of clock stretching, and acknowledging every written byte
// are this design's own choices. SCL must stay high and low for at least four
// clk cycles each.
module i2c_slave_byte
  import awm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] own_addr,
  input  i2c_in_t    bus_i,
  output logic       sda_oe,
  output logic       addr_hit,
  output logic       addr_rw,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic [7:0] tx_data,
  output logic       tx_load,
  output logic       stop_det
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ADDR_ACK, S_RX, S_RX_ACK, S_TX, S_TX_ACK} state_e;

  state_e     state;
  logic [2:0] scl_s, sda_s;   // [0] first stage, [1] synchronised, [2] previous sample
  logic [7:0] sh;
  logic [3:0] cnt;
  logic       mack, selected;
  logic       scl_rise, scl_fall, start_c, stop_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 3'b111;
      sda_s <= 3'b111;
    end else begin
      scl_s <= {scl_s[1:0], bus_i.scl};
      sda_s <= {sda_s[1:0], bus_i.sda};
    end
  end

  assign scl_rise = scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] && scl_s[2];
  assign start_c  = scl_s[1] && scl_s[2] && sda_s[2] && !sda_s[1];
  assign stop_c   = scl_s[1] && scl_s[2] && !sda_s[2] && sda_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sh       <= '0;
      cnt      <= '0;
      mack     <= 1'b0;
      selected <= 1'b0;
      sda_oe   <= 1'b0;
      addr_hit <= 1'b0;
      addr_rw  <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      tx_load  <= 1'b0;
      stop_det <= 1'b0;
    end else begin
      addr_hit <= 1'b0;
      rx_valid <= 1'b0;
      tx_load  <= 1'b0;
      stop_det <= 1'b0;
      if (start_c) begin
        state  <= S_ADDR;
        cnt    <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state    <= S_IDLE;
        sda_oe   <= 1'b0;
        stop_det <= selected;
        selected <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR: begin
            if (scl_rise) begin
              sh  <= {sh[6:0], sda_s[1]};
              cnt <= cnt + 4'd1;
            end else if (scl_fall && cnt == 4'd8) begin
              if (sh[7:1] == own_addr) begin
                sda_oe   <= 1'b1;
                addr_rw  <= sh[0];
                addr_hit <= 1'b1;
                selected <= 1'b1;
                state    <= S_ADDR_ACK;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          S_ADDR_ACK: begin
            if (scl_fall) begin
              cnt <= '0;
              if (addr_rw) begin
                sh      <= tx_data;
                sda_oe  <= !tx_data[7];
                tx_load <= 1'b1;
                state   <= S_TX;
              end else begin
                sda_oe <= 1'b0;
                state  <= S_RX;
              end
            end
          end
          S_RX: begin
            if (scl_rise) begin
              sh  <= {sh[6:0], sda_s[1]};
              cnt <= cnt + 4'd1;
            end else if (scl_fall && cnt == 4'd8) begin
              rx_valid <= 1'b1;
              rx_data  <= sh;
              sda_oe   <= 1'b1;
              state    <= S_RX_ACK;
            end
          end
          S_RX_ACK: begin
            if (scl_fall) begin
              sda_oe <= 1'b0;
              cnt    <= '0;
              state  <= S_RX;
            end
          end
          S_TX: begin
            if (scl_fall) begin
              if (cnt == 4'd7) begin
                sda_oe <= 1'b0;
                state  <= S_TX_ACK;
              end else begin
                cnt    <= cnt + 4'd1;
                sda_oe <= !sh[6];
                sh     <= {sh[6:0], 1'b0};
              end
            end
          end
          S_TX_ACK: begin
            if (scl_rise) begin
              mack <= !sda_s[1];
            end else if (scl_fall) begin
              cnt <= '0;
              if (mack) begin
                sh      <= tx_data;
                sda_oe  <= !tx_data[7];
                tx_load <= 1'b1;
                state   <= S_TX;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The slave only drives SDA after it has been addressed, and only changes it
  // while SCL is low (START/STOP handling only ever releases it).
  a_drive_when_selected: assert property (@(posedge clk) disable iff (!rst_n)
    sda_oe |-> (state != S_IDLE && state != S_ADDR) || addr_hit);
  a_sda_change_scl_low: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(sda_oe) |-> !scl_s[1]);

endmodule
