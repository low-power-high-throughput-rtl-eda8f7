// bank_allocator: free-bank bookkeeping for one stride's lookup bus.
//
// When an addition needs a new trie node in a stride, a free bank is taken;
// when a removal leaves a bank holding nothing but default entries, the bank
// is given back. The allocator keeps one "in use" bit per bank and offers the
// lowest-numbered free bank (priority encoder). After reset every bank is
// free. How banks are tracked is this design's choice; only allocation and
// deallocation themselves are part of the update procedures.
//
// Interface: avail/alloc_idx describe the bank that alloc takes at the next
// edge; rel_en frees bank rel_idx at the next edge. Both may happen in one
// cycle (for different banks).
module bank_allocator
  import trie_pkg::*;
#(
  parameter int unsigned BANKS = 512
) (
  input  logic             clk,
  input  logic             rst,
  output logic             avail,
  output logic [PTR_W-1:0] alloc_idx,
  input  logic             alloc,
  input  logic             rel_en,
  input  logic [PTR_W-1:0] rel_idx,
  output logic [PTR_W:0]   n_used
);

  localparam int unsigned BW = clog2_min1(BANKS);

  logic [BANKS-1:0] used;

  always_comb begin
    avail     = 1'b0;
    alloc_idx = '0;
    for (int b = BANKS - 1; b >= 0; b--)
      if (!used[b]) begin
        avail     = 1'b1;
        alloc_idx = PTR_W'(b);
      end
  end

  always_ff @(posedge clk) begin
    if (rst)
      used <= '0;
    else begin
      if (rel_en && (int'(rel_idx) < BANKS))
        used[BW'(rel_idx)] <= 1'b0;
      if (alloc && avail)
        used[BW'(alloc_idx)] <= 1'b1;
    end
  end

  always_comb begin
    n_used = '0;
    for (int b = 0; b < BANKS; b++)
      n_used += (PTR_W + 1)'(used[b]);
  end

  always_ff @(posedge clk)
    if (!rst && rel_en)
      assert (int'(rel_idx) < BANKS && used[BW'(rel_idx)])
        else $error("bank_allocator: freeing a bank that is not in use");

endmodule
