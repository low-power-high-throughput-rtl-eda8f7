// tb_lookup_node: one bank shared by four lookup agents.
//
// Each cycle at most one agent (chosen at random) enables the node with its
// own address while the others drive unrelated addresses; the read data one
// cycle later must be the model's entry at the enabled agent's address.
// Writes use agent 0's enable and address (the update agent); a write enable
// while another agent owns the node must not write.
module tb_lookup_node;
  import trie_pkg::*;
  localparam int unsigned STRIDE = 3, LANES = 4;

  logic clk = 0, rst = 1, ce = 1, we, wr_default;
  logic [LANES-1:0] en;
  logic [LANES-1:0][STRIDE-1:0] addr;
  entry_t wentry, rd_entry;
  dflt_t wdflt, dflt;
  int checks = 0, failures = 0;

  lookup_node #(.STRIDE(STRIDE), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t model [2**STRIDE];
  entry_t exp_rd;
  bit exp_valid = 0;
  int who;

  initial begin
    en = '0; we = 0; wr_default = 0; addr = '0; wentry = ENTRY_NONE; wdflt = DFLT_NONE;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 2**STRIDE; a++) begin
      en = 4'b0001; we = 1; addr[0] = STRIDE'(a);
      wentry = entry_t'({$urandom, $urandom}); model[a] = wentry;
      @(negedge clk);
    end
    for (int t = 0; t < 2000; t++) begin
      who = $urandom_range(0, LANES);          // LANES: nobody
      en = '0;
      for (int i = 0; i < LANES; i++) addr[i] = STRIDE'($urandom);
      if (who < LANES) en[who] = 1'b1;
      we = 1'($urandom_range(0, 4) == 0);
      wr_default = 0;
      wentry = entry_t'({$urandom, $urandom});
      @(posedge clk);
      if (who < LANES) begin
        if (we && who == 0) model[addr[0]] = wentry;
        else if (!we || who != 0) begin exp_rd = model[addr[who]]; exp_valid = (!we || who != 0); end
      end
      if (we && who != 0 && who < LANES) exp_valid = 0;  // write enable with another owner: no access
      @(negedge clk);
      if (exp_valid && who < LANES && !we) begin
        checks++;
        if (rd_entry != exp_rd) begin
          failures++; $display("agent %0d read %h expected %h", who, rd_entry, exp_rd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
