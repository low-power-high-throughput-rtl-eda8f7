// tb_update_controller: prefix additions and removals on the 8-bit {4,2,2} trie.
//
// The update agents build the example routing table (ten prefixes) in an
// empty lookup table; every 8-bit address is then looked up, three lanes at
// a time, and compared with a longest-prefix match computed here. The worked
// update examples follow: removing 011/3 (replaced by 0/1 found in the same
// bank), removing 0110100/7 (its stride-3 bank is freed, the stride-2 bank is
// kept), adding it back, setting and clearing the default route. A random
// phase adds and removes prefixes and sweeps all addresses after each step.
// Removals there only pick prefixes that no shorter stored prefix encloses,
// because a prefix completely hidden by longer ones is not kept by the trie.
// Errors are provoked by removing an absent prefix and by exhausting the banks.
// Each update's cycle count is checked against the bound of navigation plus
// clearing a new bank plus two passes over half a bank per stride.
module tb_update_controller;
  import trie_pkg::*;

  localparam int unsigned IP_W = 8, LANES = 3, N = 3;
  localparam int unsigned STRIDES [N] = '{4, 2, 2};
  localparam int unsigned BANKS   [N] = '{1, 4, 4};
  localparam int MAXP = 64;

  logic clk = 0, rst = 1;
  logic [LANES-1:0]             in_valid;
  logic [LANES-1:0][IP_W-1:0]   in_ip;
  logic [LANES-1:0]             out_valid;
  logic [LANES-1:0][IP_W-1:0]   out_ip;
  logic [LANES-1:0][PORT_W-1:0] out_port;
  logic busy, upd_mode;
  upd_req_t upd_req [N];
  upd_rsp_t upd_rsp [N];
  logic cmd_valid, cmd_ready, done, error, active;
  op_e cmd_op;
  logic [IP_W-1:0] cmd_prefix;
  logic [PLEN_W-1:0] cmd_len;
  logic [PORT_W-1:0] cmd_port;
  logic [PTR_W:0] banks_used [N];

  int checks = 0, failures = 0;
  int n_add = 0, n_rem = 0, n_err = 0, n_alloc = 0, n_free = 0;

  lookup_table #(.IP_W(IP_W), .LANES(LANES), .N_STAGES(N), .STRIDES(STRIDES), .BANKS(BANKS))
    u_table (.clk, .rst, .ce(1'b1), .in_valid, .in_ip, .out_valid, .out_ip, .out_port,
             .busy, .upd_mode, .upd_req, .upd_rsp);

  update_controller #(.IP_W(IP_W), .N_STAGES(N), .STRIDES(STRIDES), .BANKS(BANKS)) dut (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd_op, .cmd_prefix, .cmd_len, .cmd_port,
    .done, .error, .active, .table_busy(busy), .upd_mode, .upd_req, .upd_rsp, .banks_used);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference routing table.
  int  pv [MAXP], pl [MAXP], pp [MAXP];
  bit  pu [MAXP];
  int  droute = -1;

  function automatic int ref_port(int a);
    int best = -1, port = int'(PORT_DEFAULT);
    for (int j = 0; j < MAXP; j++)
      if (pu[j] && ((a ^ pv[j]) >> (8 - pl[j])) == 0 && pl[j] > best) begin
        best = pl[j]; port = pp[j];
      end
    if (best < 0 && droute >= 0) port = droute;
    return port;
  endfunction

  function automatic int find(int v, int l);
    for (int j = 0; j < MAXP; j++) if (pu[j] && pv[j] == v && pl[j] == l) return j;
    return -1;
  endfunction

  function automatic void ref_add(int v, int l, int p);
    int j = find(v, l);
    if (l == 0) begin droute = p; return; end
    if (j < 0) for (j = 0; j < MAXP && pu[j]; j++) ;
    pu[j] = 1; pv[j] = v; pl[j] = l; pp[j] = p;
  endfunction

  function automatic void ref_rem(int v, int l);
    int j = find(v, l);
    if (l == 0) begin droute = -1; return; end
    if (j >= 0) pu[j] = 0;
  endfunction

  // Cycle bound of one update for this configuration.
  localparam int BOUND = 2 * N + 4 + 2 * 16 + (2 * 2 + 2 * 2) * 2 + 3 * (4 + 4) + 16;

  // may_fail: an addition is allowed to report running out of banks.
  task automatic cmd(op_e op, int v, int l, int p, bit expect_err, bit may_fail = 0);
    int cyc = 0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_prefix = IP_W'(v); cmd_len = PLEN_W'(l); cmd_port = PORT_W'(p);
    @(negedge clk);
    cmd_valid = 0;
    while (!done && !error) begin @(negedge clk); cyc++; end
    checks++;
    if (error != expect_err && !(may_fail && error)) begin
      failures++;
      $display("op %0d %b/%0d: error=%0d expected %0d", op, v[7:0], l, error, expect_err);
    end
    if (error) n_err++;
    checks++;
    if (cyc > BOUND) begin failures++; $display("update took %0d cycles", cyc); end
    if (!error) begin
      if (op == OP_ADD) begin ref_add(v, l, p); n_add++; end
      else begin ref_rem(v, l); n_rem++; end
    end
  endtask

  always @(posedge clk)
    if (!rst)
      for (int i = 0; i < LANES; i++)
        if (out_valid[i]) begin
          checks++;
          if (int'(out_port[i]) != ref_port(int'(out_ip[i]))) begin
            failures++;
            $display("addr %b: port %0d expected %0d", out_ip[i], out_port[i],
                     ref_port(int'(out_ip[i])));
          end
        end

  task automatic sweep();
    for (int a = 0; a < 256; a += 1) begin
      @(negedge clk);
      in_valid = '1;
      in_ip[0] = IP_W'(a);
      in_ip[1] = IP_W'(a ^ 8'h50);
      in_ip[2] = IP_W'(a ^ 8'hA0);
    end
    @(negedge clk) in_valid = '0;
    repeat (N + 2) @(negedge clk);
  endtask

  task automatic expect_banks(int b1, int b2);
    checks++;
    if (banks_used[1] != (PTR_W+1)'(b1) || banks_used[2] != (PTR_W+1)'(b2)) begin
      failures++;
      $display("banks used %0d/%0d expected %0d/%0d", banks_used[1], banks_used[2], b1, b2);
    end
  endtask

  int v, l, p, j, tries, last1, last2;
  bit enclosed;

  initial begin
    in_valid = '0; in_ip = '0; cmd_valid = 0; cmd_op = OP_NONE;
    cmd_prefix = '0; cmd_len = '0; cmd_port = '0;
    for (int k = 0; k < MAXP; k++) pu[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // The example table.
    cmd(OP_ADD, 'h00, 1, 0, 0); cmd(OP_ADD, 'h80, 1, 5, 0);
    cmd(OP_ADD, 'h60, 3, 1, 0); cmd(OP_ADD, 'h90, 4, 6, 0);
    cmd(OP_ADD, 'h6E, 7, 2, 0); cmd(OP_ADD, 'h92, 7, 7, 0);
    cmd(OP_ADD, 'h6E, 8, 3, 0); cmd(OP_ADD, 'hC0, 3, 8, 0);
    cmd(OP_ADD, 'h68, 7, 4, 0); cmd(OP_ADD, 'hD8, 5, 9, 0);
    expect_banks(3, 3);
    sweep();
    // Removal example 1: 011/3 is replaced by 0/1.
    cmd(OP_REMOVE, 'h60, 3, 0, 0);
    sweep();
    cmd(OP_ADD, 'h60, 3, 1, 0);
    // Removal example 2: 0110100/7 frees one stride-3 bank.
    cmd(OP_REMOVE, 'h68, 7, 0, 0);
    expect_banks(3, 2);
    sweep();
    cmd(OP_ADD, 'h68, 7, 4, 0);
    expect_banks(3, 3);
    // Default route.
    cmd(OP_ADD, 'h00, 0, 11, 0);
    cmd(OP_REMOVE, 'h00, 1, 0, 0);
    sweep();
    cmd(OP_REMOVE, 'h00, 0, 0, 0);
    cmd(OP_ADD, 'h00, 1, 0, 0);
    // Errors: removing a prefix that is not stored below a port entry.
    cmd(OP_REMOVE, 'h00, 8, 0, 1);
    sweep();

    // Random phase.
    for (int it = 0; it < 120; it++) begin
      if ($urandom_range(0, 2) != 0) begin
        l = $urandom_range(1, 8);
        v = int'($urandom_range(0, 255)) & ('hFF << (8 - l)) & 'hFF;
        p = $urandom_range(0, 20);
        last1 = int'(banks_used[1]); last2 = int'(banks_used[2]);
        cmd(OP_ADD, v, l, p, 0, last1 == 4 || last2 == 4);
        if (int'(banks_used[1]) > last1 || int'(banks_used[2]) > last2) n_alloc++;
      end else begin
        // remove a stored prefix that no shorter stored prefix encloses
        for (tries = 0; tries < 50; tries++) begin
          j = $urandom_range(0, MAXP - 1);
          if (!pu[j]) continue;
          enclosed = 0;
          for (int q = 0; q < MAXP; q++)
            if (pu[q] && pl[q] < pl[j] && ((pv[q] ^ pv[j]) >> (8 - pl[q])) == 0) enclosed = 1;
          if (!enclosed) break;
        end
        if (tries < 50) begin
          last1 = int'(banks_used[1]); last2 = int'(banks_used[2]);
          cmd(OP_REMOVE, pv[j], pl[j], 0, 0);
          if (int'(banks_used[1]) < last1 || int'(banks_used[2]) < last2) n_free++;
        end
      end
      if (it % 4 == 0) sweep();
    end
    sweep();
    // Exhaust stride-2 banks: 16 first-stride entries need more than 4 banks.
    tries = 0;
    for (int a = 0; a < 16 && tries == 0; a++) begin
      if (int'(banks_used[1]) == 4) begin
        // entry a: add a /6 prefix; fails only if a new bank is needed
        @(negedge clk);
        while (!cmd_ready) @(negedge clk);
        cmd_valid = 1; cmd_op = OP_ADD; cmd_prefix = IP_W'(a << 4); cmd_len = 6; cmd_port = 3;
        @(negedge clk) cmd_valid = 0;
        while (!done && !error) @(negedge clk);
        if (error) begin tries = 1; n_err++; end
        else ref_add(a << 4, 6, 3);
      end else
        cmd(OP_ADD, a << 4, 6, 3, 0);
    end
    checks++;
    if (tries != 1) begin failures++; $display("bank exhaustion not reported"); end
    sweep();

    $display("adds=%0d removes=%0d errors=%0d allocations=%0d frees=%0d",
             n_add, n_rem, n_err, n_alloc, n_free);
    checks++;
    if (n_alloc == 0 || n_free == 0) begin failures++; $display("mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
