// result_logic: turns the last stage's lane state into lookup results.
//
// For each lane: if the port found is the reserved default port, the result is
// the inherited default port, otherwise the port found. A result that is still
// the reserved default port means no prefix, not even a default route, covers
// the address. The result, the IP address and a valid flag are registered.
//
// Timing: one clock-enabled cycle; outputs are registers.
//
// The selection rule follows the original design; returning the reserved code
// for "no route" is this design's choice.
module result_logic
  import trie_pkg::*;
#(
  parameter int unsigned IP_W  = 32,
  parameter int unsigned LANES = 16
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              ce,
  input  lane_state_t [LANES-1:0]           in_state,
  input  logic [LANES-1:0][IP_W-1:0]        in_ip,
  output logic [LANES-1:0]                  out_valid,
  output logic [LANES-1:0][IP_W-1:0]        out_ip,
  output logic [LANES-1:0][PORT_W-1:0]      out_port
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= '0;
      out_ip    <= '0;
      out_port  <= '0;
    end else if (ce) begin
      for (int i = 0; i < LANES; i++) begin
        out_valid[i] <= in_state[i].valid;
        out_ip[i]    <= in_ip[i];
        out_port[i]  <= (in_state[i].port == PORT_DEFAULT) ? in_state[i].dport
                                                            : in_state[i].port;
      end
    end
  end

endmodule
