// tb_lookup_stage: a middle stride (2 bits after 4) with four banks, three lanes.
//
// Banks and default registers are written through the update port. Random
// lane inputs follow (valid, perform, bank, port and default so far, address),
// with performing lanes on different banks. One cycle later each lane's
// output is compared with the agent rules worked out here: a pointer asks the
// next stage to read, a port ends the search, a bank default other than the
// reserved default port replaces the inherited default, and a lane that
// performs no read passes its port and default on unchanged.
module tb_lookup_stage;
  import trie_pkg::*;
  localparam int unsigned IP_W = 8, STRIDE = 2, OFFSET = 4, BANKS = 4, LANES = 3;

  logic clk = 0, rst = 1, ce = 1, upd_mode;
  lane_state_t [LANES-1:0] in_state, out_state;
  logic [LANES-1:0][IP_W-1:0] in_ip, out_ip;
  upd_req_t upd_req;
  upd_rsp_t upd_rsp;
  int checks = 0, failures = 0, n_ptr = 0, n_port = 0, n_pass = 0, n_dflt = 0;

  lookup_stage #(.IP_W(IP_W), .STRIDE(STRIDE), .OFFSET(OFFSET), .BANKS(BANKS), .LANES(LANES))
    dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t model [BANKS][4];
  dflt_t  mdflt [BANKS];
  lane_state_t exp_s [LANES];
  int perm [BANKS];
  int r, x, ix;

  function automatic entry_t rnd_entry();
    entry_t e = ENTRY_NONE;
    e.is_ptr = 1'($urandom_range(0, 2) == 0);
    if (e.is_ptr) e.ptr = PTR_W'($urandom_range(0, 7));
    else e.ans = '{port: ($urandom_range(0, 3) == 0) ? PORT_DEFAULT : PORT_W'($urandom_range(0, 40)),
                   len: LEN_W'($urandom_range(0, 2))};
    return e;
  endfunction

  initial begin
    upd_mode = 1; upd_req = '0; in_state = '0; in_ip = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int b = 0; b < BANKS; b++) begin
      for (int a = 0; a < 4; a++) begin
        model[b][a] = rnd_entry();
        upd_req = '{en: 1, we: 1, wr_default: 0, bank: PTR_W'(b), addr: ADDR_W'(a),
                    wentry: model[b][a], wdflt: DFLT_NONE};
        @(negedge clk);
      end
      mdflt[b] = '{port: (b == 1) ? PORT_DEFAULT : PORT_W'(10 + b), len: LEN_W'(b)};
      upd_req = '{en: 1, we: 1, wr_default: 1, bank: PTR_W'(b), addr: '0,
                  wentry: ENTRY_NONE, wdflt: mdflt[b]};
      @(negedge clk);
    end
    // Read back through the update port.
    for (int b = 0; b < BANKS; b++) begin
      upd_req = '{en: 1, we: 0, wr_default: 0, bank: PTR_W'(b), addr: ADDR_W'(3),
                  wentry: ENTRY_NONE, wdflt: DFLT_NONE};
      @(negedge clk);
      checks++;
      if (upd_rsp.entry != model[b][3] || upd_rsp.dflt != mdflt[b]) begin
        failures++; $display("update read bank %0d wrong", b);
      end
    end
    upd_req = '0; upd_mode = 0;
    for (int t = 0; t < 1000; t++) begin
      for (int b = 0; b < BANKS; b++) perm[b] = b;
      for (int b = BANKS - 1; b > 0; b--) begin
        r = $urandom_range(0, b); x = perm[b]; perm[b] = perm[r]; perm[r] = x;
      end
      for (int i = 0; i < LANES; i++) begin
        in_state[i].valid   = 1'($urandom_range(0, 4) != 0);
        in_state[i].perform = 1'($urandom);
        in_state[i].bank    = PTR_W'(perm[i]);
        in_state[i].port    = PORT_W'($urandom_range(0, 63));
        in_state[i].dport   = PORT_W'($urandom_range(0, 63));
        in_ip[i]            = IP_W'($urandom);
        exp_s[i] = in_state[i];
        if (in_state[i].valid && in_state[i].perform) begin
          ix = int'(in_ip[i][3:2]);
          if (mdflt[perm[i]].port != PORT_DEFAULT) begin exp_s[i].dport = mdflt[perm[i]].port; n_dflt++; end
          if (model[perm[i]][ix].is_ptr) begin
            exp_s[i].perform = 1; exp_s[i].bank = model[perm[i]][ix].ptr; exp_s[i].port = PORT_DEFAULT;
            n_ptr++;
          end else begin
            exp_s[i].perform = 0; exp_s[i].bank = '0; exp_s[i].port = model[perm[i]][ix].ans.port;
            n_port++;
          end
        end else n_pass++;
      end
      @(negedge clk);
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (out_state[i] != exp_s[i] || out_ip[i] != in_ip[i]) begin
          failures++;
          $display("lane %0d: %h expected %h", i, out_state[i], exp_s[i]);
        end
      end
    end
    checks++;
    if (n_ptr == 0 || n_port == 0 || n_pass == 0 || n_dflt == 0) begin
      failures++; $display("case not covered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
