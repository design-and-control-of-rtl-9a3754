// awp_panel_tb_body.svh: body shared by the panel testbenches. The including
// module declares localparams ROWS, COLS, BASE_ID (the panel's settings),
// BFM_QTR (CMU bit timing), WATCHDOG (cycles), EXPECT_REPOLL (1 if the run is
// long enough for a second neighbor poll), and the panel instance `dut`
// with the signals declared here.
//
// A behavioural Cell Management Unit drives the shared CMU bus. It finds the
// lowest cell address, builds the cell map breadth first from the neighbor
// registers (North, then East, South, West), reads each cell's module data, and
// wires modules together: an LED (ID 0x02) to a 1k resistor (0x03), then the LED
// to a 5 V supply (0x04). Routes are found with Dijkstra's algorithm over the
// discovered cell graph; cells a route already uses get a high weight, so a later
// route avoids them when it can (the model works at cell granularity). Along a
// route it sends each cell an Enable Switch message. Modules are behavioural data
// sheet devices, plugged into chosen cells and pin pairs.
// Counted mechanisms: neighbor found, panel edge (0x01), module found, module
// orientation other than 0, empty cell, module removed, relays closed, a relay
// list replaced, a message for an absent address ignored, and (on panels with a
// second row and three columns) a route that avoided a used cell.

import awm_pkg::*;

logic clk = 1'b0, rst_n = 1'b0;
logic bfm_scl_oe = 1'b0, bfm_sda_oe = 1'b0;
logic bus_scl, bus_sda, cmu_sda_oe;
i2c_in_t  mod_i [ROWS][COLS][NUM_ORIENT];
i2c_out_t mod_o [ROWS][COLS][NUM_ORIENT];
logic [NUM_SWITCHES-1:0] relay [ROWS][COLS];
int checks = 0, failures = 0;

// modules: one model per cell, enabled by present[r][c], on pair orient[r][c]
logic present [ROWS][COLS];
int   orient  [ROWS][COLS];
logic m_sda_oe [ROWS][COLS];
logic [7:0] mdata [ROWS][COLS][11];

// mechanism counters
int n_nbr_found = 0, n_edge = 0, n_mod_found = 0, n_orient_nz = 0, n_empty = 0;
int n_removed = 0, n_relay_set = 0, n_replaced = 0, n_ignored = 0, n_avoided = 0;

always #5 clk = !clk;

// periodic neighbor polls of the first cell's East port
int n_polls = 0;
always @(posedge clk) if (rst_n && dut.g_row[0].g_col[0].u_cell.poll_done_e) n_polls++;

assign bus_scl = !bfm_scl_oe;
assign bus_sda = !(bfm_sda_oe || cmu_sda_oe);

for (genvar r = 0; r < ROWS; r++) begin : g_r
  for (genvar c = 0; c < COLS; c++) begin : g_c
    always_comb
      for (int k = 0; k < NUM_ORIENT; k++)
        mod_i[r][c][k] = '{scl: !mod_o[r][c][k].scl_oe,
                           sda: !(mod_o[r][c][k].sda_oe || (orient[r][c] == k && m_sda_oe[r][c]))};
    eds_module_model #(.ADDR(MODULE_ADDR), .NDATA(11)) u_mod (
      .present (present[r][c]), .data (mdata[r][c]),
      .scl (mod_i[r][c][orient[r][c]].scl), .sda (mod_i[r][c][orient[r][c]].sda),
      .sda_oe (m_sda_oe[r][c])
    );
  end
end

`include "i2c_bfm.svh"

task automatic check(input bit cond, input string what);
  checks++;
  if (!cond) begin failures++; $display("FAIL: %s", what); end
endtask

task automatic cmu_read(input logic [6:0] id, input logic [7:0] cmd, output logic [7:0] d, output bit ok);
  bfm_reg_read(id, cmd, d, ok);
endtask

// discovered map: cell id -> grid position relative to the first cell
int   pos_r [128], pos_c [128];
bit   known [128];
int   nbr_of [128][4];   // neighbor ID by direction, -1 at the edge
int   at_id [ROWS][COLS];

task automatic discover(output int ncells);
  logic [7:0] d;
  bit ok;
  int first = -1;
  int queue [$];
  // lowest responding address
  for (int a = 2; a < 128 && first < 0; a++) begin
    cmu_read(7'(a), CMD_CELL_ID, d, ok);
    if (ok) begin
      check(d == 8'(a), "cell reports its own address");
      first = a;
    end else begin
      n_ignored++;
    end
  end
  check(first == BASE_ID, $sformatf("lowest cell found at %0d", first));
  foreach (known[i]) known[i] = 1'b0;
  known[first] = 1'b1; pos_r[first] = 0; pos_c[first] = 0;
  queue.push_back(first);
  ncells = 1;
  while (queue.size() > 0) begin
    int id = queue.pop_front();
    for (int dir = 0; dir < 4; dir++) begin
      int nr, nc;
      cmu_read(7'(id), 8'(CMD_NBR_N + dir), d, ok);
      check(ok, "neighbor register read");
      nr = pos_r[id] + ((dir == 0) ? -1 : (dir == 2) ? 1 : 0);
      nc = pos_c[id] + ((dir == 1) ? 1 : (dir == 3) ? -1 : 0);
      nbr_of[id][dir] = (d == NOT_EXISTING) ? -1 : int'(d[6:0]);
      if (d == NOT_EXISTING) begin
        n_edge++;
        check(nr < 0 || nr >= ROWS || nc < 0 || nc >= COLS, "0x01 only at the panel edge");
      end else begin
        n_nbr_found++;
        check(d == 8'(BASE_ID + nr * COLS + nc), $sformatf("neighbor %0d of cell %0d is %0d", dir, id, d));
        if (!known[d[6:0]]) begin
          known[d[6:0]] = 1'b1; pos_r[d[6:0]] = nr; pos_c[d[6:0]] = nc;
          queue.push_back(int'(d[6:0]));
          ncells++;
        end
      end
    end
  end
  for (int r = 0; r < ROWS; r++)
    for (int c = 0; c < COLS; c++) at_id[r][c] = BASE_ID + r * COLS + c;
endtask

task automatic read_module(input int r, input int c);
  logic [7:0] d;
  bit ok;
  logic [6:0] id = 7'(at_id[r][c]);
  cmu_read(id, CMD_MOD_ID, d, ok);
  if (present[r][c]) begin
    check(ok && d == mdata[r][c][0], $sformatf("module ID of cell (%0d,%0d)", r, c));
    n_mod_found++;
    cmu_read(id, CMD_NET_BYTES, d, ok);
    check(d == mdata[r][c][1], "netlist byte count");
    for (int i = 0; i < int'(mdata[r][c][1]) && i < NUM_CFG_BYTES; i++) begin
      cmu_read(id, 8'(CMD_CFG_FIRST + i), d, ok);
      check(d == mdata[r][c][2 + i], "config byte");
    end
    cmu_read(id, CMD_ORIENT, d, ok);
    check(d == 8'(orient[r][c]), "module orientation");
    if (d != 8'd0) n_orient_nz++;
  end else begin
    check(ok && d == NOT_EXISTING, $sformatf("no module on cell (%0d,%0d)", r, c));
    n_empty++;
  end
endtask

task automatic send_switches(input int r, input int c, input logic [7:0] list [16], input int n);
  logic [7:0] msg [16];
  bit ok;
  msg[0] = CMD_ENABLE_SW;
  msg[1] = 8'(n);
  for (int i = 0; i < n && i < 14; i++) msg[2 + i] = list[i];
  bfm_msg_write(7'(at_id[r][c]), msg, n + 2, ok);
  check(ok, "Enable Switch acknowledged");
endtask

// expected relay words kept by the model
logic [NUM_SWITCHES-1:0] expect_r [ROWS][COLS];

// Dijkstra's algorithm over the discovered cells. Entering a cell costs 1, or
// USED_WEIGHT more if an earlier route already uses it. prev[] keeps the path.
localparam int USED_WEIGHT = 100;
bit used [128];
int prev [128];

task automatic dijkstra(input int src);
  int dist_to [128];
  bit visited [128];
  for (int i = 0; i < 128; i++) begin dist_to[i] = 1 << 30; prev[i] = -1; visited[i] = 1'b0; end
  dist_to[src] = 0;
  for (int k = 0; k < 128; k++) begin
    int mini = -1;
    for (int i = 0; i < 128; i++)
      if (known[i] && !visited[i] && (mini == -1 || dist_to[i] < dist_to[mini])) mini = i;
    if (mini == -1) break;
    visited[mini] = 1'b1;
    for (int dir = 0; dir < 4; dir++) begin
      int j = nbr_of[mini][dir];
      if (j >= 0) begin
        int w = 1 + (used[j] ? USED_WEIGHT : 0);
        if (dist_to[mini] + w < dist_to[j]) begin dist_to[j] = dist_to[mini] + w; prev[j] = mini; end
      end
    end
  end
endtask

// Path from the source to dst, rebuilt from prev[] recursively.
task automatic store_path(input int dst, inout int path [$]);
  if (prev[dst] != -1) store_path(prev[dst], path);
  path.push_back(dst);
endtask

function automatic int dir_to(input int a, input int b);
  for (int dir = 0; dir < 4; dir++) if (nbr_of[a][dir] == b) return dir;
  return 0;
endfunction

// Wire two cells together. In each cell on the path the model closes switch
// (8*route + entry side) and (8*route + 4 + exit side) on top of the switches
// earlier routes closed there, and sends the whole list (the list replaces the
// cell's closed set). The switch numbering is the model's stand-in for the real
// crossbar map. Returns the number of cells on the path that an earlier route
// already used, not counting the two ends.
task automatic route(input int route_no, input int r0, input int c0, input int r1, input int c1,
                     output int shared);
  int path [$];
  int src = at_id[r0][c0], dst = at_id[r1][c1];
  dijkstra(src);
  store_path(dst, path);
  check(path[0] == src && path[path.size() - 1] == dst, "route reaches its end");
  shared = 0;
  for (int i = 1; i < path.size() - 1; i++) if (used[path[i]]) shared++;
  for (int i = 0; i < path.size(); i++) begin
    logic [7:0] list [16];
    int n = 0;
    int r = pos_r[path[i]], c = pos_c[path[i]];
    int entry = (i == 0) ? 0 : (dir_to(path[i], path[i - 1]));
    int exit_d = (i == path.size() - 1) ? 0 : dir_to(path[i], path[i + 1]);
    logic [NUM_SWITCHES-1:0] prev_r;
    prev_r = expect_r[r][c];
    expect_r[r][c][8 * route_no + entry] = 1'b1;
    expect_r[r][c][8 * route_no + 4 + exit_d] = 1'b1;
    for (int k = 0; k < NUM_SWITCHES; k++) if (expect_r[r][c][k] && n < 14) list[n++] = 8'(k);
    send_switches(r, c, list, n);
    repeat (10) @(posedge clk);
    check(relay[r][c] == expect_r[r][c], $sformatf("relays of cell (%0d,%0d)", r, c));
    n_relay_set++;
    if (prev_r != '0) n_replaced++;
  end
  for (int i = 0; i < path.size(); i++) used[path[i]] = 1'b1;
endtask

initial begin
  int ncells;
  for (int r = 0; r < ROWS; r++)
    for (int c = 0; c < COLS; c++) begin
      present[r][c] = 1'b0; orient[r][c] = 0; expect_r[r][c] = '0;
      for (int i = 0; i < 11; i++) mdata[r][c][i] = 8'(8'h80 + 16 * r + 4 * c + i);
    end
  // LED (0x02) at the first cell, pair 0; 1k resistor (0x03) at the end of the
  // first row, pair 3; 5 V supply (0x04) at the bottom right cell, pair 1
  present[0][0] = 1'b1; orient[0][0] = 0; mdata[0][0][0] = 8'h02; mdata[0][0][1] = 8'd2;
  present[0][COLS-1] = 1'b1; orient[0][COLS-1] = 3;
  mdata[0][COLS-1][0] = 8'h03; mdata[0][COLS-1][1] = 8'd1;
  if (ROWS > 1) begin
    present[ROWS-1][COLS-1] = 1'b1; orient[ROWS-1][COLS-1] = 1;
    mdata[ROWS-1][COLS-1][0] = 8'h04; mdata[ROWS-1][COLS-1][1] = 8'd9;
  end
  foreach (used[i]) used[i] = 1'b0;
  repeat (5) @(posedge clk);
  rst_n = 1'b1;
  // give the cells time for their first neighbor poll and module scan
  repeat (SETTLE) @(posedge clk);

  discover(ncells);
  check(ncells == ROWS * COLS, $sformatf("%0d cells discovered", ncells));
  for (int r = 0; r < ROWS; r++)
    for (int c = 0; c < COLS; c++) read_module(r, c);

  // LED to resistor, then LED to supply (or, with one row, a second net to the
  // resistor over the same cells)
  begin
    int shared;
    route(0, 0, 0, 0, COLS - 1, shared);
    if (ROWS > 1) begin
      route(1, 0, 0, ROWS - 1, COLS - 1, shared);
      if (COLS > 2) begin
        check(shared == 0, "second route avoids the cells of the first");
        if (shared == 0) n_avoided++;
      end
    end else begin
      route(1, 0, 0, 0, COLS - 1, shared);
    end
  end
  for (int r = 0; r < ROWS; r++)
    for (int c = 0; c < COLS; c++)
      check(relay[r][c] == expect_r[r][c], "final relay state");

  // open all relays of the first cell
  begin
    logic [7:0] none [16];
    send_switches(0, 0, none, 0);
    repeat (10) @(posedge clk);
    check(relay[0][0] == '0, "empty list opens the relays");
  end

  // unplug the LED: the next scan reports an empty cell
  present[0][0] = 1'b0;
  repeat (SETTLE) @(posedge clk);
  begin
    int e0;
    e0 = n_empty;
    read_module(0, 0);
    n_removed += n_empty - e0;
  end

  check(n_nbr_found > 0, "mechanism: neighbor found");
  check(n_edge > 0, "mechanism: panel edge");
  check(n_mod_found > 0, "mechanism: module found");
  check(n_orient_nz > 0, "mechanism: rotated module");
  check(n_empty > 0, "mechanism: empty cell");
  check(n_removed > 0, "mechanism: module removed");
  check(n_relay_set > 0, "mechanism: relays closed");
  check(n_replaced > 0, "mechanism: relay list replaced");
  check(n_ignored > 0, "mechanism: absent address ignored");
  if (ROWS > 1 && COLS > 2) check(n_avoided > 0, "mechanism: used cell avoided");
  check(n_polls >= (EXPECT_REPOLL ? 2 : 1), $sformatf("mechanism: periodic neighbor poll (%0d)", n_polls));
  $display("mechanisms: nbr=%0d edge=%0d module=%0d rotated=%0d empty=%0d removed=%0d relay=%0d replaced=%0d ignored=%0d avoided=%0d polls=%0d",
           n_nbr_found, n_edge, n_mod_found, n_orient_nz, n_empty, n_removed, n_relay_set, n_replaced, n_ignored, n_avoided, n_polls);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  repeat (WATCHDOG) @(posedge clk);
  failures++;
  $display("FAIL: watchdog");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
