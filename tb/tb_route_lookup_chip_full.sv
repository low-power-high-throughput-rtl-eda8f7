// tb_route_lookup_chip_full: the lookup chip at its full size.
//
// The chip is built with its default parameters: 32-bit addresses, strides
// {9,7,8,3,5}, 16 lookups per table cycle and the default bank counts. A
// small routing table (prefix lengths from 1 to 32, nested prefixes, a
// default route) is added through the serial input, then lookups near the
// stored prefixes and random ones are sent, mixed with further additions and
// removals. Each accepted lookup is queued with the port a longest-prefix
// match computed here gives at that moment; results must come out in order
// with that port and within 16*(5+2) input cycles. The mechanisms seen are
// counted and each must occur: first-stride conflict waits, update waits,
// bank allocation in every stride after the first, bank release, an update
// error and the default route.
module tb_route_lookup_chip_full;
  import trie_pkg::*;

  localparam int unsigned IP_W = 32, LANES = 16, N = 5;
  localparam int MAXP = 64;

  logic clk = 0, rst = 1;
  logic in_valid, in_wait, out_valid, upd_done, upd_error, conflict_stall, full_stall;
  op_e in_op;
  logic [IP_W-1:0] in_addr, out_addr;
  logic [PLEN_W-1:0] in_len;
  logic [PORT_W-1:0] in_port, out_port;
  logic [PTR_W:0] banks_used [N];

  route_lookup_chip dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_conflict = 0, n_full = 0, n_updwait = 0, n_free = 0, n_err = 0;
  int n_droute = 0, n_results = 0, n_lookups = 0, max_lat = 0;
  int n_alloc [N];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference routing table.
  longint pv [MAXP];
  int pl [MAXP], pp [MAXP];
  bit pu [MAXP];
  int droute = -1;

  function automatic bit match(longint a, longint v, int l);
    return ((a ^ v) >> (IP_W - l)) == 0;
  endfunction
  function automatic int ref_port(longint a);
    int best = -1, port = int'(PORT_DEFAULT);
    for (int j = 0; j < MAXP; j++)
      if (pu[j] && match(a, pv[j], pl[j]) && pl[j] > best) begin
        best = pl[j]; port = pp[j];
      end
    if (best < 0 && droute >= 0) port = droute;
    return port;
  endfunction
  function automatic int find(longint v, int l);
    for (int j = 0; j < MAXP; j++) if (pu[j] && pv[j] == v && pl[j] == l) return j;
    return -1;
  endfunction

  longint exp_addr [$];
  int exp_port [$], exp_cyc [$];
  op_e u_op; longint u_v; int u_l, u_p; bit u_pend = 0;
  int jj, ep, ec;
  longint ea;

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (conflict_stall) n_conflict++;
      if (full_stall) n_full++;
      if (in_valid && in_wait && in_op == OP_LOOKUP && u_pend) n_updwait++;
      if (in_valid && !in_wait && in_op == OP_LOOKUP) begin
        exp_addr.push_back(longint'(in_addr));
        exp_port.push_back(ref_port(longint'(in_addr)));
        exp_cyc.push_back(cycle);
        n_lookups++;
      end
      if (in_valid && !in_wait && in_op inside {OP_ADD, OP_REMOVE}) begin
        u_pend = 1; u_op = in_op; u_v = longint'(in_addr); u_l = int'(in_len); u_p = int'(in_port);
      end
      if (upd_error) begin n_err++; u_pend = 0; end
      if (upd_done && u_pend) begin
        jj = find(u_v, u_l);
        u_pend = 0;
        if (u_l == 0) begin droute = (u_op == OP_ADD) ? u_p : -1; n_droute++; end
        else if (u_op == OP_ADD) begin
          if (jj < 0) for (jj = 0; jj < MAXP && pu[jj]; jj++) ;
          pu[jj] = 1; pv[jj] = u_v; pl[jj] = u_l; pp[jj] = u_p;
        end else if (jj >= 0) pu[jj] = 0;
      end
      if (out_valid) begin
        checks++;
        n_results++;
        if (exp_addr.size() == 0) begin
          failures++; $display("unexpected result %h", out_addr);
        end else begin
          ea = exp_addr.pop_front();
          ep = exp_port.pop_front();
          ec = exp_cyc.pop_front();
          if (longint'(out_addr) != ea || int'(out_port) != ep) begin
            failures++;
            $display("result %h -> %0d, expected %h -> %0d", out_addr, out_port, ea, ep);
          end
          if (cycle - ec > max_lat) max_lat = cycle - ec;
        end
      end
    end
  end

  int last [N];
  always @(posedge clk) begin
    if (!rst)
      for (int s = 1; s < N; s++) begin
        if (int'(banks_used[s]) > last[s]) n_alloc[s]++;
        if (int'(banks_used[s]) < last[s]) n_free++;
      end
    for (int s = 0; s < N; s++) last[s] <= int'(banks_used[s]);
  end

  task automatic send(op_e op, longint v, int l, int p);
    bit w;
    in_valid = 1; in_op = op; in_addr = IP_W'(v); in_len = PLEN_W'(l); in_port = PORT_W'(p);
    do begin
      #1 w = in_wait;   // value seen by the coming clock edge
      @(negedge clk);
    end while (w);
    in_valid = 0;
  endtask

  function automatic longint pmask(int l);
    return (l == 0) ? 0 : ((64'hFFFF_FFFF << (IP_W - l)) & 64'hFFFF_FFFF);
  endfunction

  // A lookup near a stored prefix (random low bits) or a random address.
  task automatic lookup_burst(int n);
    longint a;
    int j;
    for (int i = 0; i < n; i++) begin
      a = longint'($urandom);
      j = $urandom_range(0, MAXP - 1);
      if (pu[j] && $urandom_range(0, 3) != 0)
        a = (pv[j] & pmask(pl[j])) | (a & ~pmask(pl[j]) & 64'hFFFF_FFFF);
      send(OP_LOOKUP, a, 0, 0);
    end
  endtask

  longint v;
  int l;

  initial begin
    in_valid = 0; in_op = OP_NONE; in_addr = '0; in_len = '0; in_port = '0;
    for (int k = 0; k < MAXP; k++) pu[k] = 0;
    for (int s = 0; s < N; s++) n_alloc[s] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // Nested prefixes reaching every stride, plus short ones.
    send(OP_ADD, 64'h0A00_0000, 8, 1);
    send(OP_ADD, 64'h0A01_0000, 16, 2);
    send(OP_ADD, 64'h0A01_0200, 24, 3);
    send(OP_ADD, 64'h0A01_0280, 27, 4);
    send(OP_ADD, 64'h0A01_0285, 32, 5);
    send(OP_ADD, 64'hC0A8_0000, 16, 6);
    send(OP_ADD, 64'hC0A8_0100, 24, 7);
    send(OP_ADD, 64'h8000_0000, 1, 8);
    send(OP_ADD, 64'hAC10_0000, 12, 9);
    send(OP_ADD, 64'hAC10_0000, 20, 10);
    lookup_burst(200);
    // All in one first-stride entry: conflicts.
    for (int i = 0; i < 40; i++) send(OP_LOOKUP, 64'h0A01_0000 | $urandom_range(0, 'hFFFF), 0, 0);
    send(OP_ADD, 64'h0000_0000, 0, 11);       // default route
    lookup_burst(100);
    send(OP_REMOVE, 64'h0A01_0285, 32, 0);    // releases the stride-5 bank
    send(OP_REMOVE, 64'h0A01_0280, 27, 0);    // releases the stride-3 bank
    lookup_burst(100);
    send(OP_REMOVE, 64'h0102_0304, 32, 0);    // not stored: error
    for (int it = 0; it < 30; it++) begin
      if ($urandom_range(0, 1) == 0) begin
        l = $urandom_range(1, 32);
        v = longint'($urandom) & pmask(l);
        send(OP_ADD, v, l, $urandom_range(0, 40));
      end else begin
        for (int t = 0; t < 40; t++) begin
          automatic int j = $urandom_range(0, MAXP - 1);
          automatic bit enclosed = 0;
          if (!pu[j]) continue;
          for (int q = 0; q < MAXP; q++)
            if (pu[q] && pl[q] < pl[j] && match(pv[q], pv[j], pl[q])) enclosed = 1;
          if (!enclosed) begin send(OP_REMOVE, pv[j], pl[j], 0); break; end
        end
      end
      lookup_burst($urandom_range(5, 40));
    end
    repeat (LANES * (N + 4)) @(negedge clk);

    checks++;
    if (exp_addr.size() != 0 || n_results != n_lookups) begin
      failures++; $display("%0d lookups, %0d results", n_lookups, n_results);
    end
    checks++;
    if (max_lat > int'(LANES * (N + 2))) begin
      failures++; $display("latency %0d cycles", max_lat);
    end
    $display("lookups=%0d conflicts=%0d full=%0d update_waits=%0d allocs=%0d/%0d/%0d/%0d frees=%0d errors=%0d default_route=%0d max_latency=%0d",
             n_lookups, n_conflict, n_full, n_updwait, n_alloc[1], n_alloc[2], n_alloc[3], n_alloc[4],
             n_free, n_err, n_droute, max_lat);
    checks += 11;
    if (n_conflict == 0) begin failures++; $display("no conflict stall"); end
    // One command per input cycle cannot fill a group before the tick.
    if (n_full != 0) begin failures++; $display("full group stall"); end
    if (n_updwait == 0) begin failures++; $display("no update wait"); end
    for (int s = 1; s < N; s++)
      if (n_alloc[s] == 0) begin failures++; $display("no allocation in stride %0d", s); end
    if (n_free == 0) begin failures++; $display("no deallocation"); end
    if (n_err == 0) begin failures++; $display("no update error"); end
    if (n_droute == 0) begin failures++; $display("no default route"); end
    if (n_lookups < 500) begin failures++; $display("too few lookups"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
