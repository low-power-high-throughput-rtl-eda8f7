// tb_lookup_throughput: average lookups per table cycle under full random load.
//
// Two arbiters run side by side, each fed one uniformly random 32-bit lookup
// per input cycle whenever it does not wait, with a tick every LANES cycles:
// the main configuration (16 lanes, 9-bit first stride) and a second one
// (8 lanes, 16-bit first stride). The lookups handed over per tick are
// averaged over many ticks and compared with the expected value of the
// simple grouping rule (a group closes at the first lookup whose first-stride
// bits repeat, or when full):
//   E = sum_{k=1}^{L-1} k * (k / 2^F) * prod_{j=1}^{k-1} (2^F - j) / 2^F
//       + L * prod_{j=1}^{L-1} (2^F - j) / 2^F
// which gives about 14.8 for L=16, F=9 and 7.9987 for L=8, F=16. The measured
// average must lie within 0.05 of it.
module tb_lookup_throughput;
  import trie_pkg::*;

  localparam int NCFG = 2;
  localparam int unsigned LN [NCFG] = '{16, 8};
  localparam int unsigned FS [NCFG] = '{9, 16};
  localparam int TICKS = 20000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cnt = 0;

  initial begin
    repeat (TICKS * 20 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(int L, int F);
    real n = real'(longint'(1) << F), e = 0.0, p = 1.0;
    for (int k = 1; k < L; k++) begin
      if (k > 1) p = p * (n - real'(k - 1)) / n;   // no repeat among the first k
      e += real'(k) * (real'(k) / n) * p;
    end
    p = p * (n - real'(L - 1)) / n;
    return e + real'(L) * p;
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned L = LN[c];
    logic tick = 0, in_valid, in_wait, cmd_valid, conflict_stall, full_stall;
    op_e in_op, cmd_op;
    logic [31:0] in_addr, cmd_prefix;
    logic [PLEN_W-1:0] cmd_len;
    logic [PORT_W-1:0] cmd_port;
    logic [L-1:0] grp_valid;
    logic [L-1:0][31:0] grp_ip;
    int cycle = 0, ticks = 0;
    longint total = 0;

    lookup_arbiter #(.IP_W(32), .LANES(L), .FIRST_STRIDE(FS[c])) u_arb (
      .clk, .rst, .tick, .in_valid, .in_op, .in_addr, .in_len('0), .in_port('0), .in_wait,
      .grp_valid, .grp_ip, .cmd_valid, .cmd_ready(1'b0), .cmd_op, .cmd_prefix, .cmd_len, .cmd_port,
      .upd_active(1'b0), .conflict_stall, .full_stall);

    always @(negedge clk) tick = (cycle % int'(L) == 0);
    always @(posedge clk) begin
      if (!rst && tick) begin
        total += longint'($countones(grp_valid));
        if (grp_valid != '0 || ticks > 0) ticks++;
      end
      cycle++;
    end

    logic w;
    initial begin
      real avg, exp_v;
      in_valid = 0; in_op = OP_LOOKUP; in_addr = '0;
      repeat (3) @(negedge clk);
      rst = 0;
      in_valid = 1;
      in_addr = $urandom;
      while (ticks < TICKS) begin
        #1 w = in_wait;
        @(negedge clk);
        if (!w) in_addr = $urandom;
      end
      avg = real'(total) / real'(ticks);
      exp_v = expected(int'(L), int'(FS[c]));
      $display("L=%0d F=%0d: %0d lookups in %0d table cycles, average %f, expected %f",
               L, FS[c], total, ticks, avg, exp_v);
      checks++;
      if (avg < exp_v - 0.05 || avg > exp_v + 0.05) failures++;
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
