// tb_lookup_bank: SRAM bank and default register of one trie node.
//
// Random reads and writes, with and without the clock enable, are compared
// with a model array kept here. Checks: read data one cycle after the request,
// a write to the default register leaves the SRAM alone and vice versa, nothing
// changes without ce or en, and the default register resets to "no default".
module tb_lookup_bank;
  import trie_pkg::*;
  localparam int unsigned STRIDE = 4;

  logic clk = 0, rst = 1, ce, en, we, wr_default;
  logic [STRIDE-1:0] addr;
  entry_t wentry, rd_entry;
  dflt_t wdflt, dflt;
  int checks = 0, failures = 0;

  lookup_bank #(.STRIDE(STRIDE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t model [2**STRIDE];
  dflt_t  mdflt;
  entry_t exp_rd;
  bit     exp_valid;

  function automatic entry_t rnd_entry();
    entry_t e;
    e.is_ptr = 1'($urandom);
    e.ptr    = PTR_W'($urandom);
    e.ans    = dflt_t'($urandom);
    return e;
  endfunction

  initial begin
    ce = 0; en = 0; we = 0; wr_default = 0; addr = '0; wentry = ENTRY_NONE; wdflt = DFLT_NONE;
    repeat (2) @(negedge clk);
    rst = 0;
    checks++;
    if (dflt != DFLT_NONE) begin failures++; $display("default register not reset"); end
    // Fill.
    for (int a = 0; a < 2**STRIDE; a++) begin
      ce = 1; en = 1; we = 1; wr_default = 0; addr = STRIDE'(a);
      wentry = rnd_entry(); model[a] = wentry;
      @(negedge clk);
    end
    mdflt = DFLT_NONE;
    exp_valid = 0;
    for (int t = 0; t < 2000; t++) begin
      ce = 1'($urandom_range(0, 3) != 0);
      en = 1'($urandom_range(0, 3) != 0);
      we = 1'($urandom_range(0, 2) == 0);
      wr_default = 1'($urandom);
      addr = STRIDE'($urandom);
      wentry = rnd_entry();
      wdflt = dflt_t'($urandom);
      @(posedge clk);
      if (ce && en) begin
        if (!we) begin exp_rd = model[addr]; exp_valid = 1; end
        else if (!wr_default) model[addr] = wentry;
        else mdflt = wdflt;
      end
      @(negedge clk);
      checks++;
      if (dflt != mdflt) begin failures++; $display("default %h expected %h", dflt, mdflt); end
      if (exp_valid) begin
        checks++;
        if (rd_entry != exp_rd) begin failures++; $display("read %h expected %h", rd_entry, exp_rd); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
