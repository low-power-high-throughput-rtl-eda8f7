// tb_lookup_table: lookup pipeline on the 8-bit example trie with strides {4,2,2}.
//
// The testbench writes the example trie with default ports (prefixes
// 0/1->0, 011/3->1, 0110111/7->2, 01101110/8->3, 0110100/7->4, 1/1->5,
// 1001/4->6, 1001001/7->7, 110/3->8, 11011/5->9) entry by entry through the
// stage update ports, then looks up every 8-bit address three lanes at a
// time and compares each result with a longest-prefix match computed here.
// It checks that a group leaves exactly N_STAGES+1 cycles after entering and
// the two worked lookups 01101111 -> 2 and 11010010 -> 8.
module tb_lookup_table;
  import trie_pkg::*;

  localparam int unsigned IP_W = 8, LANES = 3, N = 3;
  localparam int unsigned STRIDES [N] = '{4, 2, 2};
  localparam int unsigned BANKS   [N] = '{1, 4, 4};

  logic clk = 0, rst = 1, ce = 1;
  logic [LANES-1:0]             in_valid;
  logic [LANES-1:0][IP_W-1:0]   in_ip;
  logic [LANES-1:0]             out_valid;
  logic [LANES-1:0][IP_W-1:0]   out_ip;
  logic [LANES-1:0][PORT_W-1:0] out_port;
  logic busy, upd_mode;
  upd_req_t upd_req [N];
  upd_rsp_t upd_rsp [N];

  int checks = 0, failures = 0, cycle = 0;

  lookup_table #(.IP_W(IP_W), .LANES(LANES), .N_STAGES(N), .STRIDES(STRIDES), .BANKS(BANKS))
    dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the prefixes of the example.
  localparam int NP = 10;
  int pv [NP] = '{'h00, 'h60, 'h6E, 'h6E, 'h68, 'h80, 'h90, 'h92, 'hC0, 'hD8};
  int pl [NP] = '{1, 3, 7, 8, 7, 1, 4, 7, 3, 5};
  int pp [NP] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9};

  function automatic int ref_port(int a);
    int best = -1, port = int'(PORT_DEFAULT);
    for (int j = 0; j < NP; j++)
      if (((a ^ pv[j]) >> (8 - pl[j])) == 0 && pl[j] > best) begin
        best = pl[j]; port = pp[j];
      end
    return port;
  endfunction

  function automatic entry_t P(int port, int len);
    return '{is_ptr: 1'b0, ptr: '0, ans: '{port: PORT_W'(port), len: LEN_W'(len)}};
  endfunction
  function automatic entry_t B(int b);
    return '{is_ptr: 1'b1, ptr: PTR_W'(b), ans: DFLT_NONE};
  endfunction
  localparam int PD = 63;

  task automatic wr(int s, int b, int a, entry_t e);
    @(negedge clk);
    for (int k = 0; k < N; k++) upd_req[k] = '0;
    upd_req[s] = '{en: 1'b1, we: 1'b1, wr_default: 1'b0, bank: PTR_W'(b), addr: ADDR_W'(a),
                   wentry: e, wdflt: DFLT_NONE};
  endtask
  task automatic wd(int s, int b, int port, int len);
    @(negedge clk);
    for (int k = 0; k < N; k++) upd_req[k] = '0;
    upd_req[s] = '{en: 1'b1, we: 1'b1, wr_default: 1'b1, bank: PTR_W'(b), addr: '0,
                   wentry: ENTRY_NONE, wdflt: '{port: PORT_W'(port), len: LEN_W'(len)}};
  endtask

  // Output checking and latency: out_valid must equal in_valid N+1 cycles ago.
  logic [LANES-1:0] vhist [N + 1];
  int outs = 0;
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (out_valid !== vhist[N]) begin
        failures++;
        $display("latency mismatch at cycle %0d: %b vs %b", cycle, out_valid, vhist[N]);
      end
      for (int i = 0; i < LANES; i++)
        if (out_valid[i]) begin
          outs++;
          checks++;
          if (int'(out_port[i]) != ref_port(int'(out_ip[i]))) begin
            failures++;
            $display("lane %0d addr %b: port %0d expected %0d", i, out_ip[i], out_port[i],
                     ref_port(int'(out_ip[i])));
          end
        end
    end
    for (int d = N; d > 0; d--) vhist[d] <= vhist[d-1];
    vhist[0] <= in_valid;
  end

  initial begin
    in_valid = '0; in_ip = '0; upd_mode = 0;
    for (int k = 0; k < N; k++) upd_req[k] = '0;
    for (int d = 0; d <= N; d++) vhist[d] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    upd_mode = 1;
    // Stage 1 (4 bits), single bank.
    for (int a = 0; a < 16; a++) wr(0, 0, a, P(0, 1));
    wr(0, 0, 'b0110, B(1)); wr(0, 0, 'b0111, P(1, 3)); wr(0, 0, 'b1000, P(5, 1));
    wr(0, 0, 'b1001, B(2)); wr(0, 0, 'b1010, P(5, 1)); wr(0, 0, 'b1011, P(5, 1));
    wr(0, 0, 'b1100, P(8, 3)); wr(0, 0, 'b1101, B(3)); wr(0, 0, 'b1110, P(5, 1));
    wr(0, 0, 'b1111, P(5, 1)); wd(0, 0, PD, 0);
    // Stage 2 (2 bits), banks 1..3.
    wd(1, 1, 1, 3); wr(1, 1, 0, P(PD, 0)); wr(1, 1, 1, P(PD, 0)); wr(1, 1, 2, B(2)); wr(1, 1, 3, B(1));
    wd(1, 2, 6, 4); wr(1, 2, 0, B(3)); wr(1, 2, 1, P(PD, 0)); wr(1, 2, 2, P(PD, 0)); wr(1, 2, 3, P(PD, 0));
    wd(1, 3, 8, 3); wr(1, 3, 0, P(PD, 0)); wr(1, 3, 1, P(PD, 0)); wr(1, 3, 2, P(9, 1)); wr(1, 3, 3, P(9, 1));
    // Stage 3 (2 bits), banks 1..3.
    wd(2, 1, PD, 0); wr(2, 1, 0, P(PD, 0)); wr(2, 1, 1, P(PD, 0)); wr(2, 1, 2, P(3, 2)); wr(2, 1, 3, P(2, 1));
    wd(2, 2, PD, 0); wr(2, 2, 0, P(4, 1)); wr(2, 2, 1, P(4, 1)); wr(2, 2, 2, P(PD, 0)); wr(2, 2, 3, P(PD, 0));
    wd(2, 3, PD, 0); wr(2, 3, 0, P(PD, 0)); wr(2, 3, 1, P(PD, 0)); wr(2, 3, 2, P(7, 1)); wr(2, 3, 3, P(7, 1));
    @(negedge clk);
    for (int k = 0; k < N; k++) upd_req[k] = '0;
    upd_mode = 0;
    repeat (2) @(negedge clk);

    // Worked examples, single lane.
    in_valid = 3'b001; in_ip[0] = 8'b01101111;
    @(negedge clk) in_valid = '0;
    repeat (N) @(negedge clk);
    checks++;
    if (!(out_valid[0] && out_port[0] == 2)) begin failures++; $display("example 1 failed"); end
    in_valid = 3'b001; in_ip[0] = 8'b11010010;
    @(negedge clk) in_valid = '0;
    repeat (N) @(negedge clk);
    checks++;
    if (!(out_valid[0] && out_port[0] == 8)) begin failures++; $display("example 2 failed"); end

    // Every address, three lanes per cycle with different first strides.
    for (int a = 0; a < 256; a++) begin
      in_valid = '1;
      in_ip[0] = IP_W'(a);
      in_ip[1] = IP_W'(a ^ 8'h50);
      in_ip[2] = IP_W'(a ^ 8'hA0);
      @(negedge clk);
    end
    // A sparse group with a gap.
    in_valid = 3'b101; in_ip[0] = 8'h6E; in_ip[2] = 8'h93;
    @(negedge clk) in_valid = '0;
    repeat (N + 3) @(negedge clk);
    checks++;
    if (outs != 2 + 256 * 3 + 2) begin failures++; $display("result count %0d", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
