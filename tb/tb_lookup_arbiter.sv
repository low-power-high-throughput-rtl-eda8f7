// tb_lookup_arbiter: grouping of serial commands, 8-bit addresses, 3 lanes,
// 4-bit first stride, tick every third cycle.
//
// Random lookups (often sharing first-stride bits) and occasional updates are
// sent through the valid/wait handshake. The update agents are modelled here:
// ready when idle, active for a random number of cycles after a command. On
// every tick the group must hold the lookups accepted since the previous tick,
// in order, from lane 0 up, with no two sharing first-stride bits. A lookup
// must never wait longer than one tick period plus the time of an update; an
// update must only be handed over with an empty group and no update running,
// and no lookup may be accepted while one is running. Conflict waits and
// update waits must both be seen.
module tb_lookup_arbiter;
  import trie_pkg::*;
  localparam int unsigned IP_W = 8, LANES = 3, FS = 4;

  logic clk = 0, rst = 1, tick = 0;
  logic in_valid, in_wait, cmd_valid, cmd_ready, upd_active, conflict_stall, full_stall;
  op_e in_op, cmd_op;
  logic [IP_W-1:0] in_addr, cmd_prefix;
  logic [PLEN_W-1:0] in_len, cmd_len;
  logic [PORT_W-1:0] in_port, cmd_port;
  logic [LANES-1:0] grp_valid;
  logic [LANES-1:0][IP_W-1:0] grp_ip;
  int checks = 0, failures = 0, n_conf = 0, n_upd = 0, n_updwait = 0, cycle = 0;

  lookup_arbiter #(.IP_W(IP_W), .LANES(LANES), .FIRST_STRIDE(FS)) dut (
    .clk, .rst, .tick, .in_valid, .in_op, .in_addr, .in_len, .in_port, .in_wait,
    .grp_valid, .grp_ip, .cmd_valid, .cmd_ready, .cmd_op, .cmd_prefix, .cmd_len, .cmd_port,
    .upd_active, .conflict_stall, .full_stall);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Update agent model.
  int busy_cnt = 0;
  assign cmd_ready  = (busy_cnt == 0);
  assign upd_active = (busy_cnt != 0);
  // tick changes between edges, once every LANES cycles
  always @(negedge clk) tick = (cycle % LANES == 0);

  int acc [$];
  bit ok;
  int a;
  always @(posedge clk) begin
    if (!rst) begin
      if (tick) begin
        // the group leaving now
        ok = 1;
        for (int i = 0; i < LANES; i++) begin
          if (grp_valid[i]) begin
            if (acc.size() == 0) ok = 0;
            else begin a = acc.pop_front(); if (a != int'(grp_ip[i])) ok = 0; end
            for (int j = 0; j < i; j++)
              if (grp_ip[j][IP_W-1 -: FS] == grp_ip[i][IP_W-1 -: FS]) ok = 0;
          end
          if (i > 0 && grp_valid[i] && !grp_valid[i-1]) ok = 0;
        end
        checks++;
        if (!ok || acc.size() != 0) begin
          failures++; $display("cycle %0d: bad group %b %h", cycle, grp_valid, grp_ip);
        end
      end
      if (conflict_stall) n_conf++;
      if (in_valid && in_wait && in_op == OP_LOOKUP && busy_cnt != 0) n_updwait++;
      if (in_valid && !in_wait && in_op == OP_LOOKUP) begin
        acc.push_back(int'(in_addr));
        checks++;
        if (busy_cnt != 0) begin failures++; $display("lookup accepted during update"); end
      end
      if (cmd_valid && cmd_ready) begin
        n_upd++;
        checks++;
        if (grp_valid != '0 || cmd_op != in_op || cmd_prefix != in_addr) begin
          failures++; $display("update handed over wrongly");
        end
        busy_cnt <= $urandom_range(1, 12);
      end else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    end
    cycle++;
  end

  task automatic send(op_e op, int v);
    bit w;
    int waited = 0;
    in_valid = 1; in_op = op; in_addr = IP_W'(v); in_len = PLEN_W'(v % 9); in_port = PORT_W'(v);
    do begin
      #1 w = in_wait;
      @(negedge clk);
      waited++;
    end while (w);
    in_valid = 0;
    checks++;
    if (waited > int'(LANES) + 16) begin failures++; $display("waited %0d cycles", waited); end
  endtask

  initial begin
    in_valid = 0; in_op = OP_NONE; in_addr = '0; in_len = '0; in_port = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      if ($urandom_range(0, 29) == 0) send(($urandom_range(0, 1) != 0) ? OP_ADD : OP_REMOVE, $urandom_range(0, 255));
      else if ($urandom_range(0, 4) == 0) @(negedge clk);   // idle cycle
      else send(OP_LOOKUP, ($urandom_range(0, 1) != 0) ? $urandom_range(0, 63) : $urandom_range(0, 255));
    end
    repeat (2 * LANES) @(negedge clk);
    checks++;
    if (acc.size() != 0) begin failures++; $display("lookups never issued"); end
    $display("updates=%0d conflict_waits=%0d update_waits=%0d", n_upd, n_conf, n_updwait);
    checks++;
    if (n_upd == 0 || n_conf == 0 || n_updwait == 0) begin failures++; $display("case not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
