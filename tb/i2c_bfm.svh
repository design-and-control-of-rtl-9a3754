// i2c_bfm.svh: tasks of a behavioural I2C master, standing in for the Cell
// Management Unit (or a neighbor cell) in the testbenches. Include it inside a
// testbench module that declares: clk; logic bfm_scl_oe, bfm_sda_oe (1 pulls the
// line low); the resolved line levels bus_scl and bus_sda; and an int BFM_QTR,
// the number of clk cycles per quarter SCL period.

task automatic bfm_wait_q();
  repeat (BFM_QTR) @(posedge clk);
endtask

task automatic bfm_start();          // START, or repeated START with SCL held low
  bfm_sda_oe = 1'b0; bfm_wait_q();
  bfm_scl_oe = 1'b0; bfm_wait_q();
  bfm_sda_oe = 1'b1; bfm_wait_q();
  bfm_scl_oe = 1'b1; bfm_wait_q();
endtask

task automatic bfm_stop();
  bfm_sda_oe = 1'b1; bfm_wait_q();
  bfm_scl_oe = 1'b0; bfm_wait_q();
  bfm_sda_oe = 1'b0; bfm_wait_q();
  bfm_wait_q();
endtask

task automatic bfm_bit(input bit b, output bit sampled);
  bfm_sda_oe = !b;   bfm_wait_q();
  bfm_scl_oe = 1'b0; bfm_wait_q();
  sampled = bus_sda; bfm_wait_q();
  bfm_scl_oe = 1'b1; bfm_wait_q();
endtask

task automatic bfm_write(input logic [7:0] data, output bit ack);
  bit s;
  for (int i = 7; i >= 0; i--) bfm_bit(data[i], s);
  bfm_bit(1'b1, s);
  ack = !s;
endtask

task automatic bfm_read(output logic [7:0] data, input bit ack);
  bit s;
  for (int i = 7; i >= 0; i--) begin
    bfm_bit(1'b1, s);
    data[i] = s;
  end
  bfm_bit(!ack, s);
endtask

// Write a command byte to a 7-bit address, then read one byte after a repeated START.
task automatic bfm_reg_read(input logic [6:0] addr, input logic [7:0] cmd,
                            output logic [7:0] data, output bit ok);
  bit a1, a2, a3;
  bfm_start();
  bfm_write({addr, 1'b0}, a1);
  bfm_write(cmd, a2);
  bfm_start();
  bfm_write({addr, 1'b1}, a3);
  if (a3) bfm_read(data, 1'b0);
  else    data = 8'hxx;
  bfm_stop();
  ok = a1 && a2 && a3;
endtask

// Write the first n bytes of msg (after the address byte) to a 7-bit address.
task automatic bfm_msg_write(input logic [6:0] addr, input logic [7:0] msg [16], input int n,
                             output bit ok);
  bit a;
  bfm_start();
  bfm_write({addr, 1'b0}, a);
  ok = a;
  for (int i = 0; i < n; i++) begin
    bfm_write(msg[i], a);
    ok &= a;
  end
  bfm_stop();
endtask
