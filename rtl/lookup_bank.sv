// lookup_bank: one trie node of a stride, an SRAM bank plus a default register.
//
// The SRAM has 2**STRIDE entries and is indexed by the stride's bits of the IP
// address. Each entry is either a pointer to a bank of the next stride or a
// port number with its relative prefix length (trie_pkg::entry_t). The
// default register holds the port and relative length that apply to every
// entry storing the reserved default port; it resets to "no default".
//
// Timing: single-ported synchronous SRAM. When ce and en are high at a clock
// edge, a read (we low) returns mem[addr] on rd_entry after that edge; a write
// (we high) stores wentry in mem[addr], or wdflt in the default register when
// wr_default is high. The default register is visible on dflt at all times.
// ce is the clock enable of the whole lookup table. The SRAM is not reset:
// the update agents clear a bank before they use it.
//
// The bank with its default register and the pointer/port entries follow the
// original design; the entry layout and the synchronous read are this design's
// choices.
module lookup_bank
  import trie_pkg::*;
#(
  parameter int unsigned STRIDE = 9
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic              en,
  input  logic [STRIDE-1:0] addr,
  input  logic              we,
  input  logic              wr_default,
  input  entry_t            wentry,
  input  dflt_t             wdflt,
  output entry_t            rd_entry,
  output dflt_t             dflt
);

  entry_t mem [2**STRIDE];
  dflt_t  dflt_q;

  always_ff @(posedge clk) begin
    if (ce && en) begin
      if (!we)
        rd_entry <= mem[addr];
      else if (!wr_default)
        mem[addr] <= wentry;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)
      dflt_q <= DFLT_NONE;
    else if (ce && en && we && wr_default)
      dflt_q <= wdflt;
  end

  assign dflt = dflt_q;

endmodule
