// tb_neighbor_slave: plays the neighbor cell that masters the bus. Sends its ID
// and reads back, checks the stored neighbor ID and the returned own ID, checks
// that another address is ignored and that the ID falls back to 0x01 after the
// timeout, counted in clock cycles.
module tb_neighbor_slave;
  import awm_pkg::*;

  localparam int BFM_QTR = 6;
  localparam int TMO = 3000;
  localparam logic [6:0] OWN = 7'h15;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bfm_scl_oe = 1'b0, bfm_sda_oe = 1'b0;
  logic bus_scl, bus_sda, sda_oe;
  logic [7:0] nbr_id;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  assign bus_scl = !bfm_scl_oe;
  assign bus_sda = !(bfm_sda_oe || sda_oe);

  neighbor_slave #(.TIMEOUT_CYCLES(TMO)) dut (
    .clk, .rst_n, .own_id (OWN), .bus_i ('{scl: bus_scl, sda: bus_sda}), .sda_oe, .nbr_id
  );

  `include "i2c_bfm.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] d;
    bit ok;
    int t0, t;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(nbr_id == NOT_EXISTING, "no neighbor after reset");

    bfm_reg_read(NEIGHBOR_ADDR, 8'h22, d, ok);
    repeat (5) @(posedge clk);
    check(ok, "exchange acknowledged");
    check(d == {1'b0, OWN}, "own ID returned");
    check(nbr_id == 8'h22, "neighbor ID stored");

    bfm_reg_read(7'h45, 8'h33, d, ok);
    repeat (5) @(posedge clk);
    check(!ok && nbr_id == 8'h22, "other address ignored");

    bfm_reg_read(NEIGHBOR_ADDR, 8'h27, d, ok);
    t0 = 0;
    while (nbr_id == 8'h27) begin @(posedge clk); t0++; end
    check(nbr_id == NOT_EXISTING, "neighbor dropped after timeout");
    // The ID byte arrives about one byte time (9 bits) plus restart/read/stop
    // before the exchange ends; the drop follows TMO cycles after the byte.
    t = t0 + (9 + 2 + 9 + 9 + 2) * 4 * BFM_QTR;
    check(t0 < TMO && t > TMO, $sformatf("timeout length (%0d after end of exchange)", t0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
