// tb_module_probe: plugs a behavioural module into each of the four pin pairs
// of the probe connector in turn, and removes it. Checks the module ID, byte
// count, config bytes (zero past the count), orientation, the "no module"
// values 0x01/0xFF, and that a scan visits the pairs in order.
module tb_module_probe;
  import awm_pkg::*;

  localparam int QTR = 5;
  localparam int GAP = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  i2c_in_t  bus_i [NUM_ORIENT];
  i2c_out_t bus_o [NUM_ORIENT];
  module_info_t mod_info;
  logic scan_done, present = 1'b0, m_sda_oe;
  int orient = 0;
  logic [7:0] data [11];
  int checks = 0, failures = 0, nscan = 0;
  logic m_scl, m_sda;
  int pair_starts [NUM_ORIENT];

  always #5 clk = !clk;

  always_comb begin
    for (int k = 0; k < NUM_ORIENT; k++)
      bus_i[k] = '{scl: !bus_o[k].scl_oe, sda: !(bus_o[k].sda_oe || (orient == k && m_sda_oe))};
  end
  assign m_scl = bus_i[orient].scl;
  assign m_sda = bus_i[orient].sda;

  module_probe #(.QTR_CYCLES(QTR), .GAP_CYCLES(GAP)) dut (
    .clk, .rst_n, .bus_i, .bus_o, .mod_info, .scan_done
  );

  eds_module_model #(.ADDR(MODULE_ADDR), .NDATA(11)) u_mod (
    .present, .data, .scl (m_scl), .sda (m_sda), .sda_oe (m_sda_oe)
  );

  always @(posedge clk) if (scan_done) nscan++;
  for (genvar k = 0; k < NUM_ORIENT; k++) begin : g_mon
    always @(negedge bus_i[k].sda) if (rst_n && bus_i[k].scl) pair_starts[k]++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_scan();
    int n = nscan;
    wait (nscan == n + 1);
    @(posedge clk);
  endtask

  task automatic expect_module(input int k, input int cnt);
    check(mod_info.id == data[0], $sformatf("module ID at pair %0d", k));
    check(mod_info.nbytes == 8'(cnt), "byte count");
    for (int i = 0; i < NUM_CFG_BYTES; i++)
      check(mod_info.cfg[i] == ((i < cnt) ? data[2 + i] : 8'h00), $sformatf("config byte %0d", i + 1));
    check(mod_info.orient == 8'(k), "orientation");
  endtask

  initial begin
    for (int i = 0; i < 11; i++) data[i] = 8'(8'h40 + 3 * i);
    data[0] = 8'h02; data[1] = 8'd4;
    pair_starts = '{0, 0, 0, 0};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    wait_scan();
    check(mod_info.id == NOT_EXISTING && mod_info.orient == NO_ORIENT && mod_info.nbytes == 0,
          "empty connector");
    check(pair_starts[0] == 1 && pair_starts[1] == 1 && pair_starts[2] == 1 && pair_starts[3] == 1,
          "all four pairs polled");

    for (int k = 0; k < NUM_ORIENT; k++) begin
      orient = k;
      present = 1'b1;
      data[1] = 8'(k * 3);       // 0, 3, 6, 9 config bytes
      wait_scan();
      expect_module(k, k * 3);
    end

    present = 1'b0;
    wait_scan();
    check(mod_info.id == NOT_EXISTING && mod_info.orient == NO_ORIENT, "module removed");

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
