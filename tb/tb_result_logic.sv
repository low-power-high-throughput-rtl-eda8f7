// tb_result_logic: final port selection.
//
// Random lane states go in; one cycle later each lane must carry its address
// and either its port or, when the port is the reserved default, its inherited
// default port. Both cases must occur.
module tb_result_logic;
  import trie_pkg::*;
  localparam int unsigned IP_W = 32, LANES = 4;

  logic clk = 0, rst = 1, ce = 1;
  lane_state_t [LANES-1:0] in_state;
  logic [LANES-1:0][IP_W-1:0] in_ip, out_ip;
  logic [LANES-1:0] out_valid;
  logic [LANES-1:0][PORT_W-1:0] out_port;
  logic [LANES-1:0][PORT_W-1:0] exp_p;
  int checks = 0, failures = 0, n_def = 0, n_port = 0;

  result_logic #(.IP_W(IP_W), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_state = '0; in_ip = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < LANES; i++) begin
        in_state[i].valid = 1'($urandom);
        in_state[i].perform = 1'b0;
        in_state[i].bank = '0;
        in_state[i].port = ($urandom_range(0, 2) == 0) ? PORT_DEFAULT : PORT_W'($urandom_range(0, 62));
        in_state[i].dport = PORT_W'($urandom);
        in_ip[i] = $urandom;
        if (in_state[i].port == PORT_DEFAULT) begin exp_p[i] = in_state[i].dport; n_def++; end
        else begin exp_p[i] = in_state[i].port; n_port++; end
      end
      @(negedge clk);
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (out_valid[i] != in_state[i].valid || out_ip[i] != in_ip[i] || out_port[i] != exp_p[i]) begin
          failures++; $display("lane %0d: port %0d expected %0d", i, out_port[i], exp_p[i]);
        end
      end
    end
    checks++;
    if (n_def == 0 || n_port == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
