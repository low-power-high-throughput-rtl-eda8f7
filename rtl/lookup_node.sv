// lookup_node: a lookup bank shared by LANES lookup agents.
//
// Each agent drives an enable and an address fragment. At most one agent may
// enable a node in a cycle (the arbiter guarantees it); the enables are ORed
// into the bank enable and select the address with an enable-based
// multiplexer (AND-OR tree), which needs no address decoding. The single
// update agent shares agent 0's enable and address and adds the write enable,
// the "update default" select and the write data.
//
// Timing: as lookup_bank, the read data appears one clock-enabled cycle after
// the request. The output is the bank's raw read data and default register;
// steering it back to the right agent is the lookup bus's job.
//
// Sharing one bank among agents with an OR of enables and an AND-OR address
// multiplexer, and the update agent riding on agent 0, follow the original
// design; the port grouping is this design's.
module lookup_node
  import trie_pkg::*;
#(
  parameter int unsigned STRIDE = 9,
  parameter int unsigned LANES  = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ce,
  input  logic [LANES-1:0]              en,
  input  logic [LANES-1:0][STRIDE-1:0]  addr,
  input  logic                          we,          // update agent (lane 0) write
  input  logic                          wr_default,
  input  entry_t                        wentry,
  input  dflt_t                         wdflt,
  output entry_t                        rd_entry,
  output dflt_t                         dflt
);

  logic              bank_en;
  logic [STRIDE-1:0] bank_addr;

  always_comb begin
    bank_en   = |en;
    bank_addr = '0;
    for (int i = 0; i < LANES; i++)
      bank_addr |= addr[i] & {STRIDE{en[i]}};
  end

  lookup_bank #(.STRIDE(STRIDE)) u_bank (
    .clk, .rst, .ce,
    .en        (bank_en),
    .addr      (bank_addr),
    .we        (we && en[0]),
    .wr_default,
    .wentry,
    .wdflt,
    .rd_entry,
    .dflt
  );

  // At most one agent per node per cycle.
  always_ff @(posedge clk)
    if (!rst && ce)
      assert ($onehot0(en)) else $error("lookup_node: agents collide");

endmodule
