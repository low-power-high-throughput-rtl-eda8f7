// tb_first_lookup_stage: the replicated first-stride bank (4 bits, three lanes).
//
// The update port writes every entry and the default register once; all
// three copies must receive the writes. Random lookups follow in which lanes
// may use the same entry in the same cycle (each has its own copy). One cycle
// later each lane must show a pointer request or the port of its entry, with
// the copy's default register as the inherited default port.
module tb_first_lookup_stage;
  import trie_pkg::*;
  localparam int unsigned IP_W = 8, STRIDE = 4, LANES = 3;

  logic clk = 0, rst = 1, ce = 1, upd_mode;
  logic [LANES-1:0] in_valid;
  logic [LANES-1:0][IP_W-1:0] in_ip, out_ip;
  lane_state_t [LANES-1:0] out_state;
  upd_req_t upd_req;
  upd_rsp_t upd_rsp;
  int checks = 0, failures = 0, n_same = 0;

  first_lookup_stage #(.IP_W(IP_W), .STRIDE(STRIDE), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t model [16];
  dflt_t  mdflt;
  lane_state_t exp_s [LANES];
  logic [LANES-1:0] vq;
  int ix;

  initial begin
    upd_mode = 1; upd_req = '0; in_valid = '0; in_ip = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 16; a++) begin
      model[a] = ENTRY_NONE;
      if ($urandom_range(0, 2) == 0) begin model[a].is_ptr = 1; model[a].ptr = PTR_W'($urandom_range(0, 9)); end
      else model[a].ans = '{port: PORT_W'($urandom_range(0, 63)), len: LEN_W'($urandom_range(0, 4))};
      upd_req = '{en: 1, we: 1, wr_default: 0, bank: '0, addr: ADDR_W'(a), wentry: model[a], wdflt: DFLT_NONE};
      @(negedge clk);
    end
    mdflt = '{port: 6'd33, len: 4'd0};
    upd_req = '{en: 1, we: 1, wr_default: 1, bank: '0, addr: '0, wentry: ENTRY_NONE, wdflt: mdflt};
    @(negedge clk);
    upd_req = '0; upd_mode = 0;
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < LANES; i++) begin
        in_valid[i] = 1'($urandom_range(0, 4) != 0);
        in_ip[i] = ($urandom_range(0, 3) == 0 && i > 0) ? in_ip[0] : IP_W'($urandom);
      end
      if (in_valid[0] && in_valid[1] && in_ip[0][7:4] == in_ip[1][7:4]) n_same++;
      for (int i = 0; i < LANES; i++) begin
        ix = int'(in_ip[i][7:4]);
        exp_s[i].valid = in_valid[i];
        exp_s[i].dport = mdflt.port;
        if (in_valid[i] && model[ix].is_ptr) begin
          exp_s[i].perform = 1; exp_s[i].bank = model[ix].ptr; exp_s[i].port = PORT_DEFAULT;
        end else begin
          exp_s[i].perform = 0; exp_s[i].bank = '0;
          exp_s[i].port = in_valid[i] ? model[ix].ans.port : PORT_DEFAULT;
        end
      end
      vq = in_valid;
      @(negedge clk);
      for (int i = 0; i < LANES; i++)
        if (vq[i]) begin
          checks++;
          if (out_state[i] != exp_s[i] || out_ip[i] != in_ip[i]) begin
            failures++; $display("lane %0d: %h expected %h", i, out_state[i], exp_s[i]);
          end
        end
    end
    checks++;
    if (n_same == 0) begin failures++; $display("no shared entry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
