// tb_bank_allocator: free-bank bookkeeping with six banks.
//
// Random allocations and releases (only of banks in use) are applied while a
// bitmap kept here predicts avail, the offered bank (lowest free one) and the
// number of banks in use. Running out of banks and allocating and releasing in
// the same cycle must both occur.
module tb_bank_allocator;
  import trie_pkg::*;
  localparam int unsigned BANKS = 6;

  logic clk = 0, rst = 1, avail, alloc, rel_en;
  logic [PTR_W-1:0] alloc_idx, rel_idx;
  logic [PTR_W:0] n_used;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  bank_allocator #(.BANKS(BANKS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit used [BANKS];
  int lo, cnt, r, offered;

  initial begin
    alloc = 0; rel_en = 0; rel_idx = '0;
    for (int b = 0; b < BANKS; b++) used[b] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      lo = -1; cnt = 0;
      for (int b = BANKS - 1; b >= 0; b--) if (!used[b]) lo = b;
      for (int b = 0; b < BANKS; b++) cnt += int'(used[b]);
      checks++;
      if (avail != (lo >= 0) || (lo >= 0 && int'(alloc_idx) != lo) || int'(n_used) != cnt) begin
        failures++;
        $display("avail %0d idx %0d used %0d, expected %0d %0d", avail, alloc_idx, n_used, lo, cnt);
      end
      if (lo < 0) n_full++;
      // Bias toward allocation in the first half so the banks run out.
      alloc = 1'($urandom_range(0, 9) < ((t % 400) < 200 ? 7 : 3));
      rel_en = 0;
      if (cnt > 0 && $urandom_range(0, 1) != 0) begin
        r = $urandom_range(0, BANKS - 1);
        while (!used[r]) r = (r + 1) % BANKS;
        rel_en = 1; rel_idx = PTR_W'(r);
      end
      if (alloc && rel_en && lo >= 0) n_both++;
      offered = int'(alloc_idx);
      @(negedge clk);
      if (rel_en) used[int'(rel_idx)] = 0;
      if (alloc && lo >= 0) used[offered] = 1;   // follow the design so one error is not repeated
    end
    checks++;
    if (n_full == 0 || n_both == 0) begin failures++; $display("case not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
