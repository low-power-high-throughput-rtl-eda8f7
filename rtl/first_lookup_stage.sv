// first_lookup_stage: the first stride of the trie, one bank per lookup agent.
//
// The first stride has a single trie node, replicated LANES times so that
// every agent owns a copy and never conflicts with another. Every valid
// lookup reads entry ip[top STRIDE bits] of its copy; no bank number, perform
// flag or earlier port is needed. One cycle later the agent emits either a
// pointer (perform the next stage's read of the named bank) or the port found,
// together with the copy's default register as the inherited default port
// (the table-wide default route).
//
// Updates write all copies in the same cycle so they stay identical. While
// upd_mode is high the copies follow upd_req instead of the lanes, and upd_rsp
// returns copy 0's entry and default register one cycle after a read.
//
// Timing: one clock-enabled cycle, outputs combinational from the stage
// registers and the bank read data.
//
// One bank copy per agent, written together by updates, follows the original
// design. Ignoring update requests for other bank numbers is this design's
// choice.
module first_lookup_stage
  import trie_pkg::*;
#(
  parameter int unsigned IP_W   = 32,
  parameter int unsigned STRIDE = 9,
  parameter int unsigned LANES  = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         ce,
  input  logic [LANES-1:0]             in_valid,
  input  logic [LANES-1:0][IP_W-1:0]   in_ip,
  output lane_state_t [LANES-1:0]      out_state,
  output logic [LANES-1:0][IP_W-1:0]   out_ip,
  input  logic                         upd_mode,
  input  upd_req_t                     upd_req,
  output upd_rsp_t                     upd_rsp
);

  entry_t [LANES-1:0]          rd_entry;
  dflt_t  [LANES-1:0]          rd_dflt;
  logic   [LANES-1:0]          valid_q;
  logic [LANES-1:0][IP_W-1:0]  ip_q;

  // The first stride has a single bank, number 0; requests for other banks
  // or addresses beyond the bank are ignored.
  logic upd_en;
  assign upd_en = upd_req.en && (upd_req.bank == '0) && (32'(upd_req.addr) < (32'd1 << STRIDE));

  for (genvar i = 0; i < LANES; i++) begin : g_copy
    lookup_bank #(.STRIDE(STRIDE)) u_bank (
      .clk, .rst, .ce,
      .en         (upd_mode ? upd_en : in_valid[i]),
      .addr       (upd_mode ? upd_req.addr[STRIDE-1:0] : in_ip[i][IP_W-1 -: STRIDE]),
      .we         (upd_mode && upd_req.we),
      .wr_default (upd_req.wr_default),
      .wentry     (upd_req.wentry),
      .wdflt      (upd_req.wdflt),
      .rd_entry   (rd_entry[i]),
      .dflt       (rd_dflt[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      ip_q    <= '0;
    end else if (ce) begin
      valid_q <= upd_mode ? '0 : in_valid;
      ip_q    <= in_ip;
    end
  end

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      out_ip[i]          = ip_q[i];
      out_state[i].valid = valid_q[i];
      out_state[i].dport = rd_dflt[i].port;
      if (valid_q[i] && rd_entry[i].is_ptr) begin
        out_state[i].perform = 1'b1;
        out_state[i].bank    = rd_entry[i].ptr;
        out_state[i].port    = PORT_DEFAULT;
      end else begin
        out_state[i].perform = 1'b0;
        out_state[i].bank    = '0;
        out_state[i].port    = valid_q[i] ? rd_entry[i].ans.port : PORT_DEFAULT;
      end
    end
  end

  assign upd_rsp = '{entry: rd_entry[0], dflt: rd_dflt[0]};

endmodule
