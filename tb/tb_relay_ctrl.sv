// tb_relay_ctrl: checks that relay_ctrl applies a staged switch list in one
// step, that a new list replaces the old one, that an empty list opens every
// relay, that out-of-range indices are dropped and flagged, and that the relays
// do not move before commit. Expected relay words are built in the testbench.
module tb_relay_ctrl;

  localparam int N = 72;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, set = 1'b0, commit = 1'b0, bad_idx;
  logic [7:0] idx = '0;
  logic [N-1:0] relay, expect_r;
  int checks = 0, failures = 0, nbad = 0;

  always #5 clk = !clk;

  relay_ctrl #(.NUM_SWITCHES(N)) dut (.clk, .rst_n, .clear, .set, .idx, .commit, .relay, .bad_idx);

  always @(posedge clk) if (bad_idx) nbad++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send a list of indices; the commit rides with the last set.
  task automatic send(input int list [], input bit do_commit);
    @(posedge clk); clear <= 1'b1;
    @(posedge clk); clear <= 1'b0;
    for (int i = 0; i < list.size(); i++) begin
      set <= 1'b1; idx <= 8'(list[i]); commit <= do_commit && (i == list.size() - 1);
      @(posedge clk);
      set <= 1'b0; commit <= 1'b0;
      @(posedge clk);
      if (i != list.size() - 1) check(relay == expect_r, "relays hold until commit");
    end
    if (list.size() == 0 && do_commit) begin
      commit <= 1'b1; @(posedge clk); commit <= 1'b0;
    end
    @(posedge clk);
  endtask

  initial begin
    int l1 [] = '{0, 5, 71, 36};
    int l2 [] = '{1, 2, 72, 200, 70};
    int l3 [] = '{};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    expect_r = '0;
    check(relay == '0, "all relays open after reset");

    send(l1, 1'b1);
    expect_r = '0;
    foreach (l1[i]) expect_r[l1[i]] = 1'b1;
    check(relay == expect_r, "first list applied");

    send(l2, 1'b0);
    check(relay == expect_r, "list without commit changes nothing");

    send(l2, 1'b1);
    expect_r = '0;
    expect_r[1] = 1'b1; expect_r[2] = 1'b1; expect_r[70] = 1'b1;
    check(relay == expect_r, "second list replaces the first, bad indices dropped");
    check(nbad == 4, $sformatf("bad indices flagged (%0d)", nbad));

    send(l3, 1'b1);
    expect_r = '0;
    check(relay == '0, "empty list opens all relays");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
