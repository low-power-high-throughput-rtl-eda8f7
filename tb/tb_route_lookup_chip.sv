// tb_route_lookup_chip: end-to-end test of the lookup chip on an 8-bit {4,2,2} trie.
//
// Commands go in serially through the valid/wait interface: the example
// routing table is built with additions, then a stream of lookups mixed with
// additions and removals is sent. Every accepted lookup is queued with the
// port a longest-prefix match computed here gives at that moment; results
// must come out in the same order, one per cycle, with that port. The
// testbench counts the mechanisms it must see at least once: first-stride
// conflicts (arbiter wait), updates holding off input, bank allocation and
// deallocation, the default route and an update error. It also checks that no
// lookup takes longer than LANES*(N_STAGES+2) input cycles from acceptance to
// result.
module tb_route_lookup_chip;
  import trie_pkg::*;

  localparam int unsigned IP_W = 8, LANES = 3, N = 3;
  localparam int unsigned STRIDES [N] = '{4, 2, 2};
  localparam int unsigned BANKS   [N] = '{1, 8, 8};
  localparam int MAXP = 64;

  logic clk = 0, rst = 1;
  logic in_valid, in_wait, out_valid, upd_done, upd_error, conflict_stall, full_stall;
  op_e in_op;
  logic [IP_W-1:0] in_addr, out_addr;
  logic [PLEN_W-1:0] in_len;
  logic [PORT_W-1:0] in_port, out_port;
  logic [PTR_W:0] banks_used [N];

  route_lookup_chip #(.IP_W(IP_W), .LANES(LANES), .N_STAGES(N), .STRIDES(STRIDES),
                      .BANKS(BANKS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_conflict = 0, n_full = 0, n_updwait = 0, n_alloc = 0, n_free = 0, n_err = 0;
  int n_droute = 0, n_results = 0, n_lookups = 0, max_lat = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference routing table.
  int pv [MAXP], pl [MAXP], pp [MAXP];
  bit pu [MAXP];
  int droute = -1;

  function automatic int ref_port(int a);
    int best = -1, port = int'(PORT_DEFAULT);
    for (int j = 0; j < MAXP; j++)
      if (pu[j] && ((a ^ pv[j]) >> (IP_W - pl[j])) == 0 && pl[j] > best) begin
        best = pl[j]; port = pp[j];
      end
    if (best < 0 && droute >= 0) port = droute;
    return port;
  endfunction
  function automatic int find(int v, int l);
    for (int j = 0; j < MAXP; j++) if (pu[j] && pv[j] == v && pl[j] == l) return j;
    return -1;
  endfunction

  // Expected results in order.
  int exp_addr [$], exp_port [$], exp_cyc [$];

  // Bookkeeping of the pending update, applied to the reference when it ends.
  op_e u_op; int u_v, u_l, u_p; bit u_pend = 0;
  int jj, ea, ep, ec;

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (conflict_stall) n_conflict++;
      if (full_stall) n_full++;
      if (in_valid && in_wait && in_op == OP_LOOKUP && u_pend) n_updwait++;
      if (in_valid && !in_wait && in_op == OP_LOOKUP) begin
        exp_addr.push_back(int'(in_addr));
        exp_port.push_back(ref_port(int'(in_addr)));
        exp_cyc.push_back(cycle);
        n_lookups++;
      end
      if (in_valid && !in_wait && in_op inside {OP_ADD, OP_REMOVE}) begin
        u_pend = 1; u_op = in_op; u_v = int'(in_addr); u_l = int'(in_len); u_p = int'(in_port);
      end
      if (upd_error) n_err++;
      if (upd_done && u_pend) begin
        jj = find(u_v, u_l);
        u_pend = 0;
        if (u_l == 0) begin droute = (u_op == OP_ADD) ? u_p : -1; n_droute++; end
        else if (u_op == OP_ADD) begin
          if (jj < 0) for (jj = 0; jj < MAXP && pu[jj]; jj++) ;
          pu[jj] = 1; pv[jj] = u_v; pl[jj] = u_l; pp[jj] = u_p;
        end else if (jj >= 0) pu[jj] = 0;
      end
      if (upd_error) u_pend = 0;
      if (out_valid) begin
        checks++;
        n_results++;
        if (exp_addr.size() == 0) begin
          failures++; $display("unexpected result %b", out_addr);
        end else begin
          ea = exp_addr.pop_front();
          ep = exp_port.pop_front();
          ec = exp_cyc.pop_front();
          if (int'(out_addr) != ea || int'(out_port) != ep) begin
            failures++;
            $display("result %b -> %0d, expected %b -> %0d", out_addr, out_port, ea[7:0], ep);
          end
          if (cycle - ec > max_lat) max_lat = cycle - ec;
        end
      end
    end
  end

  int last1, last2;
  always @(posedge clk) begin
    if (!rst) begin
      if (int'(banks_used[1]) > last1 || int'(banks_used[2]) > last2) n_alloc++;
      if (int'(banks_used[1]) < last1 || int'(banks_used[2]) < last2) n_free++;
    end
    last1 <= int'(banks_used[1]);
    last2 <= int'(banks_used[2]);
  end

  task automatic send(op_e op, int v, int l, int p);
    bit w;
    in_valid = 1; in_op = op; in_addr = IP_W'(v); in_len = PLEN_W'(l); in_port = PORT_W'(p);
    do begin
      #1 w = in_wait;   // value seen by the coming clock edge
      @(negedge clk);
    end while (w);
    in_valid = 0;
  endtask

  task automatic lookup_burst(int n, bit same_stride);
    int a;
    for (int i = 0; i < n; i++) begin
      a = $urandom_range(0, 255);
      if (same_stride) a = (a & 'h0F) | 'h60;
      send(OP_LOOKUP, a, 0, 0);
    end
  endtask

  int v, l, j;
  bit enclosed;

  initial begin
    in_valid = 0; in_op = OP_NONE; in_addr = '0; in_len = '0; in_port = '0;
    for (int k = 0; k < MAXP; k++) pu[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (20) @(negedge clk);   // the first stride is cleared after reset

    send(OP_ADD, 'h00, 1, 0); send(OP_ADD, 'h80, 1, 5);
    send(OP_ADD, 'h60, 3, 1); send(OP_ADD, 'h90, 4, 6);
    send(OP_ADD, 'h6E, 7, 2); send(OP_ADD, 'h92, 7, 7);
    send(OP_ADD, 'h6E, 8, 3); send(OP_ADD, 'hC0, 3, 8);
    send(OP_ADD, 'h68, 7, 4); send(OP_ADD, 'hD8, 5, 9);
    lookup_burst(60, 0);
    lookup_burst(20, 1);            // all in one first-stride entry: conflicts
    send(OP_REMOVE, 'h68, 7, 0);   // frees a bank
    lookup_burst(30, 0);
    send(OP_ADD, 'h00, 0, 12);     // default route
    send(OP_REMOVE, 'h00, 1, 0);
    lookup_burst(30, 0);
    send(OP_REMOVE, 'h01, 8, 0);   // not stored: error
    for (int it = 0; it < 60; it++) begin
      if ($urandom_range(0, 3) == 0) begin
        l = $urandom_range(1, 8);
        v = int'($urandom_range(0, 255)) & ('hFF << (8 - l)) & 'hFF;
        send(OP_ADD, v, l, $urandom_range(0, 30));
      end else if ($urandom_range(0, 3) == 0) begin
        for (int t = 0; t < 40; t++) begin
          j = $urandom_range(0, MAXP - 1);
          if (!pu[j]) continue;
          enclosed = 0;
          for (int q = 0; q < MAXP; q++)
            if (pu[q] && pl[q] < pl[j] && ((pv[q] ^ pv[j]) >> (IP_W - pl[q])) == 0) enclosed = 1;
          if (!enclosed) begin send(OP_REMOVE, pv[j], pl[j], 0); break; end
        end
      end
      lookup_burst($urandom_range(1, 12), $urandom_range(0, 5) == 0);
    end
    repeat (LANES * (N + 6)) @(negedge clk);

    checks++;
    if (exp_addr.size() != 0 || n_results != n_lookups) begin
      failures++; $display("%0d lookups, %0d results", n_lookups, n_results);
    end
    checks++;
    if (max_lat > int'(LANES * (N + 2))) begin
      failures++; $display("latency %0d cycles", max_lat);
    end
    $display("lookups=%0d conflicts=%0d full=%0d update_waits=%0d allocs=%0d frees=%0d errors=%0d default_route=%0d max_latency=%0d",
             n_lookups, n_conflict, n_full, n_updwait, n_alloc, n_free, n_err, n_droute, max_lat);
    checks += 6;
    if (n_conflict == 0) begin failures++; $display("no conflict stall"); end
    // With one command per input cycle a group cannot fill up before the
    // tick, so a full-group stall must never be seen.
    checks++;
    if (n_full != 0) begin failures++; $display("full group stall"); end
    if (n_updwait == 0) begin failures++; $display("no update wait"); end
    if (n_alloc == 0) begin failures++; $display("no allocation"); end
    if (n_free == 0) begin failures++; $display("no deallocation"); end
    if (n_err == 0) begin failures++; $display("no update error"); end
    if (n_droute == 0) begin failures++; $display("no default route"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
