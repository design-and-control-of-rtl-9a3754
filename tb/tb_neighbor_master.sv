// tb_neighbor_master: runs neighbor_master against a behavioural neighbor cell
// (the slave side of the exchange). Checks the ID the master sends, the ID it
// records, that an absent neighbor reads 0x01, that a neighbor plugged in later
// is found at the next poll and that polls are POLL_CYCLES apart.
module tb_neighbor_master;
  import awm_pkg::*;

  localparam int QTR  = 5;
  localparam int POLL = 3000;
  localparam logic [6:0] OWN = 7'h11;

  logic clk = 1'b0, rst_n = 1'b0;
  i2c_out_t bus_o;
  logic bus_scl, bus_sda, nb_sda_oe = 1'b0, poll_done;
  logic [7:0] nbr_id;
  logic present = 1'b0;
  logic [7:0] nb_id = 8'h23, got_id = 8'h00;
  int checks = 0, failures = 0, npoll = 0;
  longint cyc = 0, poll_t [8];

  always #5 clk = !clk;
  always @(posedge clk) cyc++;
  assign bus_scl = !bus_o.scl_oe;
  assign bus_sda = !(bus_o.sda_oe || nb_sda_oe);

  neighbor_master #(.QTR_CYCLES(QTR), .POLL_CYCLES(POLL)) dut (
    .clk, .rst_n, .own_id (OWN), .bus_i ('{scl: bus_scl, sda: bus_sda}), .bus_o, .nbr_id, .poll_done
  );

  always @(posedge clk) if (poll_done) begin poll_t[npoll % 8] = cyc; npoll++; end

  // Behavioural neighbor: ACK address+W, take one byte, ACK address+R after the
  // repeated START, send nb_id.
  task automatic rx_byte(output logic [7:0] b);
    for (int i = 7; i >= 0; i--) @(posedge bus_scl) b[i] = bus_sda;
    @(negedge bus_scl);
  endtask
  task automatic ack_bit();
    #1 nb_sda_oe = 1'b1;
    @(negedge bus_scl);
    #1 nb_sda_oe = 1'b0;
  endtask
  initial begin
    logic [7:0] a, b;
    forever begin
      @(negedge bus_sda iff bus_scl);
      rx_byte(a);
      if (present && a == {NEIGHBOR_ADDR, 1'b0}) begin
        ack_bit();
        rx_byte(b);
        ack_bit();
        got_id = b;
        @(negedge bus_sda iff bus_scl);
        rx_byte(a);
        if (a == {NEIGHBOR_ADDR, 1'b1}) begin
          ack_bit();
          for (int i = 7; i >= 0; i--) begin
            #1 nb_sda_oe = !nb_id[i];
            @(negedge bus_scl);
          end
          #1 nb_sda_oe = 1'b0;
        end
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (npoll == 1);
    @(posedge clk);
    check(nbr_id == NOT_EXISTING, "absent neighbor reads 0x01");
    present = 1'b1;
    wait (npoll == 2);
    @(posedge clk);
    check(got_id == {1'b0, OWN}, "own ID sent to neighbor");
    check(nbr_id == 8'h23, "neighbor ID recorded");
    check(poll_t[1] - poll_t[0] >= POLL && poll_t[1] - poll_t[0] < POLL + 200 * QTR,
          $sformatf("poll spacing %0d", poll_t[1] - poll_t[0]));
    nb_id = 8'h2F;
    wait (npoll == 3);
    @(posedge clk);
    check(nbr_id == 8'h2F, "changed neighbor ID seen");
    present = 1'b0;
    wait (npoll == 4);
    @(posedge clk);
    check(nbr_id == NOT_EXISTING, "removed neighbor reads 0x01");
    check(bus_scl && bus_sda, "bus idle between polls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
