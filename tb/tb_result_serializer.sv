// tb_result_serializer: four lanes of results turned into one result per cycle.
//
// Every fourth cycle a random set of lane results is loaded. The results must
// then come out one per cycle, lowest lane first, with address and port
// intact, the last of a full group in the cycle of the next load. Empty, partial and full loads
// must all occur.
module tb_result_serializer;
  import trie_pkg::*;
  localparam int unsigned IP_W = 32, LANES = 4;

  logic clk = 0, rst = 1, load, out_valid;
  logic [LANES-1:0] res_valid;
  logic [LANES-1:0][IP_W-1:0] res_ip;
  logic [LANES-1:0][PORT_W-1:0] res_port;
  logic [IP_W-1:0] out_ip;
  logic [PORT_W-1:0] out_port;
  int checks = 0, failures = 0, n_empty = 0, n_part = 0, n_fullg = 0;

  result_serializer #(.IP_W(IP_W), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q_ip [$], q_port [$];
  int e_ip, e_port;

  always @(posedge clk)
    if (!rst && out_valid) begin
      checks++;
      if (q_ip.size() == 0) begin failures++; $display("extra result"); end
      else begin
        e_ip = q_ip.pop_front(); e_port = q_port.pop_front();
        if (int'(out_ip) != e_ip || int'(out_port) != e_port) begin
          failures++; $display("result %h/%0d expected %h/%0d", out_ip, out_port, e_ip, e_port);
        end
      end
    end

  initial begin
    load = 0; res_valid = '0; res_ip = '0; res_port = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      load = (t % LANES == 0);
      if (load) begin
        checks++;
        // the last result of a full group leaves in the load cycle itself
        if (q_ip.size() > 1) begin failures++; $display("results left before load"); end
        res_valid = LANES'($urandom);
        if (res_valid == '0) n_empty++; else if (res_valid == '1) n_fullg++; else n_part++;
        for (int i = 0; i < LANES; i++) begin
          res_ip[i] = $urandom; res_port[i] = PORT_W'($urandom);
          if (res_valid[i]) begin q_ip.push_back(int'(res_ip[i])); q_port.push_back(int'(res_port[i])); end
        end
      end else res_valid = LANES'($urandom);   // ignored without load
      @(negedge clk);
    end
    checks++;
    if (n_empty == 0 || n_part == 0 || n_fullg == 0) begin failures++; $display("case not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
