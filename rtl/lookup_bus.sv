// lookup_bus: BANKS lookup nodes of one stride reachable by LANES agents.
//
// Every cycle each agent supplies an enable, the number of the bank it wants
// and the address within it. The enable is demultiplexed by bank number so
// only the designated node sees it; the address goes to every node. The bank
// number is registered and, in the following cycle, selects that node's read
// data and default register for the agent (address-based multiplexer). The
// update agent's write controls are shared by all nodes and its enable, bank
// and address are agent 0's.
//
// Timing: request in cycle t (with ce), data on rd_entry/dflt in cycle t+1.
// Two agents must not name the same bank in one cycle; the node asserts it.
//
// The enable demultiplexer and the registered bank number that selects the
// returned data follow the original design. The demultiplexer is written as a
// decoder (one comparator per node and agent), which is this design's choice.
module lookup_bus
  import trie_pkg::*;
#(
  parameter int unsigned STRIDE = 7,
  parameter int unsigned BANKS  = 512,
  parameter int unsigned LANES  = 16,
  localparam int unsigned BW    = clog2_min1(BANKS)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ce,
  input  logic [LANES-1:0]              en,
  input  logic [LANES-1:0][BW-1:0]      bank,
  input  logic [LANES-1:0][STRIDE-1:0]  addr,
  input  logic                          we,
  input  logic                          wr_default,
  input  entry_t                        wentry,
  input  dflt_t                         wdflt,
  output entry_t [LANES-1:0]            rd_entry,
  output dflt_t  [LANES-1:0]            dflt
);

  logic [LANES-1:0]            node_en [BANKS];
  entry_t                      node_entry [BANKS];
  dflt_t                       node_dflt  [BANKS];
  logic [LANES-1:0][BW-1:0]    bank_q;

  // Enable demultiplexer: agent i's enable reaches only node bank[i].
  // Written as one comparator per node and agent (a decoder) rather than an
  // indexed write, which keeps synthesis of large buses fast.
  always_comb
    for (int b = 0; b < BANKS; b++)
      for (int i = 0; i < LANES; i++)
        node_en[b][i] = en[i] && (int'(bank[i]) == b);

  for (genvar b = 0; b < BANKS; b++) begin : g_node
    lookup_node #(.STRIDE(STRIDE), .LANES(LANES)) u_node (
      .clk, .rst, .ce,
      .en        (node_en[b]),
      .addr      (addr),
      .we,
      .wr_default,
      .wentry,
      .wdflt,
      .rd_entry  (node_entry[b]),
      .dflt      (node_dflt[b])
    );
  end

  always_ff @(posedge clk)
    if (rst)
      bank_q <= '0;
    else if (ce)
      bank_q <= bank;

  always_comb
    for (int i = 0; i < LANES; i++) begin
      rd_entry[i] = node_entry[bank_q[i]];
      dflt[i]     = node_dflt[bank_q[i]];
    end

endmodule
