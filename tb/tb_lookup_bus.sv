// tb_lookup_bus: four banks shared by three agents through the lookup bus.
//
// All banks and default registers are written through agent 0. Then every
// cycle each agent is given a different bank (or none) and a random address;
// one cycle later each enabled agent must receive that bank's entry and
// default register, which shows the enable demultiplexer, the registered bank
// number and the output multiplexer at work.
module tb_lookup_bus;
  import trie_pkg::*;
  localparam int unsigned STRIDE = 2, BANKS = 4, LANES = 3, BW = 2;

  logic clk = 0, rst = 1, ce = 1, we, wr_default;
  logic [LANES-1:0] en;
  logic [LANES-1:0][BW-1:0] bank;
  logic [LANES-1:0][STRIDE-1:0] addr;
  entry_t wentry;
  dflt_t wdflt;
  entry_t [LANES-1:0] rd_entry;
  dflt_t [LANES-1:0] dflt;
  int checks = 0, failures = 0;

  lookup_bus #(.STRIDE(STRIDE), .BANKS(BANKS), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t model [BANKS][2**STRIDE];
  dflt_t  mdflt [BANKS];
  entry_t exp_e [LANES];
  dflt_t  exp_d [LANES];
  bit     exp_v [LANES];
  int perm [BANKS];
  int r, x;

  initial begin
    en = '0; we = 0; wr_default = 0; bank = '0; addr = '0; wentry = ENTRY_NONE; wdflt = DFLT_NONE;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int b = 0; b < BANKS; b++) begin
      for (int a = 0; a < 2**STRIDE; a++) begin
        en = 3'b001; we = 1; wr_default = 0; bank[0] = BW'(b); addr[0] = STRIDE'(a);
        wentry = entry_t'({$urandom, $urandom}); model[b][a] = wentry;
        @(negedge clk);
      end
      en = 3'b001; we = 1; wr_default = 1; bank[0] = BW'(b);
      wdflt = dflt_t'($urandom); mdflt[b] = wdflt;
      @(negedge clk);
    end
    we = 0; wr_default = 0;
    for (int t = 0; t < 1000; t++) begin
      for (int b = 0; b < BANKS; b++) perm[b] = b;
      for (int b = BANKS - 1; b > 0; b--) begin
        r = $urandom_range(0, b); x = perm[b];
        perm[b] = perm[r]; perm[r] = x;
      end
      for (int i = 0; i < LANES; i++) begin
        en[i] = 1'($urandom_range(0, 3) != 0);
        bank[i] = BW'(perm[i]);
        addr[i] = STRIDE'($urandom);
        exp_v[i] = en[i];
        exp_e[i] = model[perm[i]][addr[i]];
        exp_d[i] = mdflt[perm[i]];
      end
      @(negedge clk);
      for (int i = 0; i < LANES; i++)
        if (exp_v[i]) begin
          checks++;
          if (rd_entry[i] != exp_e[i] || dflt[i] != exp_d[i]) begin
            failures++;
            $display("agent %0d: %h/%h expected %h/%h", i, rd_entry[i], dflt[i], exp_e[i], exp_d[i]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
