// relay_ctrl: the cell's switch register, driving one GPIO per relay of the
// cell's crossbar-like switch array (72 in the prototype, one pin per relay).
//
// An Enable Switch message is applied in three steps: `clear` empties a staging
// register, each `set` marks switch `idx` in it, and `commit` copies the staged
// set to the relay outputs in one clock, so the relays change together when the
// whole message has arrived. A set and a commit in the same cycle both count.
// An index of NUM_SWITCHES or above is dropped and pulses bad_idx. relay[i] = 1
// closes switch i. Whether a message adds to or replaces the closed set is not
// stated in the document; replacing it is this design's choice, as it lets the
// one write command both close and open relays.
module relay_ctrl #(
  parameter int unsigned NUM_SWITCHES = 72
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    set,
  input  logic [7:0]              idx,
  input  logic                    commit,
  output logic [NUM_SWITCHES-1:0] relay,
  output logic                    bad_idx
);

  localparam int unsigned IW = $clog2(NUM_SWITCHES);

  logic [NUM_SWITCHES-1:0] staged, staged_next;
  logic                    idx_ok;

  assign idx_ok = 32'(idx) < NUM_SWITCHES;

  always_comb begin
    staged_next = clear ? '0 : staged;
    if (set && idx_ok) staged_next[idx[IW-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      staged  <= '0;
      relay   <= '0;
      bad_idx <= 1'b0;
    end else begin
      staged  <= staged_next;
      bad_idx <= set && !idx_ok;
      if (commit) relay <= staged_next;
    end
  end

  // Relays only move on a commit.
  a_relay_on_commit: assert property (@(posedge clk) disable iff (!rst_n) !commit |=> $stable(relay));

endmodule
