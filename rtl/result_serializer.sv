// result_serializer: one lookup result per cycle from the table's parallel output.
//
// The lookup table delivers up to LANES results at once, once per LANES input
// cycles. The serializer captures them (load) and then presents the pending
// result of the lowest lane on out_* each cycle, clearing it, so results leave
// in lane order, which is arrival order. Since at most LANES results arrive
// per LANES cycles, at most the last result of a group is still pending at
// the next load, and it leaves in that cycle.
//
// Timing: results captured at the edge ending the load cycle appear from the
// next cycle on, one per cycle. out_* are combinational from the pending
// registers.
//
// One result per input cycle in arrival order follows the original chip
// interface; the capture register and lowest-lane-first selection are this
// design's.
module result_serializer
  import trie_pkg::*;
#(
  parameter int unsigned IP_W  = 32,
  parameter int unsigned LANES = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          load,
  input  logic [LANES-1:0]              res_valid,
  input  logic [LANES-1:0][IP_W-1:0]    res_ip,
  input  logic [LANES-1:0][PORT_W-1:0]  res_port,
  output logic                          out_valid,
  output logic [IP_W-1:0]               out_ip,
  output logic [PORT_W-1:0]             out_port
);

  localparam int unsigned LW = (LANES <= 1) ? 1 : $clog2(LANES);

  logic [LANES-1:0]              pend;
  logic [LANES-1:0][IP_W-1:0]    ip_q;
  logic [LANES-1:0][PORT_W-1:0]  port_q;
  logic [LW-1:0]                 sel;

  always_comb begin
    sel = '0;
    for (int i = LANES - 1; i >= 0; i--)
      if (pend[i]) sel = LW'(i);
    out_valid = |pend;
    out_ip    = ip_q[sel];
    out_port  = port_q[sel];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend   <= '0;
      ip_q   <= '0;
      port_q <= '0;
    end else if (load) begin
      pend   <= res_valid;
      ip_q   <= res_ip;
      port_q <= res_port;
    end else if (out_valid)
      pend[sel] <= 1'b0;
  end

  // Results must not be overwritten before they have been sent.
  always_ff @(posedge clk)
    if (!rst && load && (|res_valid))
      assert (pend == '0 || (pend & ~(LANES'(1) << sel)) == '0)
        else $error("result_serializer: results overwritten");

endmodule
