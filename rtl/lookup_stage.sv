// lookup_stage: one stride (other than the first) of the pipelined trie.
//
// A lookup bus of BANKS banks is shared by LANES lookup agents. A lookup
// arrives on a lane with its IP address, a "perform" flag and the bank to
// read, the port found so far and the default port inherited so far. If
// perform is set the agent reads entry ip[stride bits] of that bank. One cycle
// later it resolves: a pointer entry asks the next stage to read the bank it
// names; a port entry ends the search; in both cases the bank's default
// register replaces the inherited default unless it holds the reserved default
// port. A lookup that needs no read passes its port and default unchanged.
// Lookups stay on their lane from stage to stage.
//
// Agent 0 doubles as the stage's update port: while upd_mode is high lane 0's
// bus request comes from upd_req, and upd_rsp returns the entry and default
// register read one cycle after a read request.
//
// Timing: one clock-enabled cycle per stage. Lane inputs are sampled at the
// edge; lane outputs are combinational from the stage registers and the bank
// read data.
//
// The agent rules (follow a pointer, stop at a port, take the bank default
// unless it is the reserved code, pass finished lookups through) follow the
// original design; the lane-state encoding is this design's choice.
module lookup_stage
  import trie_pkg::*;
#(
  parameter int unsigned IP_W   = 32,
  parameter int unsigned STRIDE = 7,
  parameter int unsigned OFFSET = 9,   // address bits consumed by earlier strides
  parameter int unsigned BANKS  = 512,
  parameter int unsigned LANES  = 16,
  localparam int unsigned BW    = clog2_min1(BANKS)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         ce,
  input  lane_state_t [LANES-1:0]      in_state,
  input  logic [LANES-1:0][IP_W-1:0]   in_ip,
  output lane_state_t [LANES-1:0]      out_state,
  output logic [LANES-1:0][IP_W-1:0]   out_ip,
  input  logic                         upd_mode,
  input  upd_req_t                     upd_req,
  output upd_rsp_t                     upd_rsp
);

  logic [LANES-1:0]              bus_en;
  logic [LANES-1:0][BW-1:0]      bus_bank;
  logic [LANES-1:0][STRIDE-1:0]  bus_addr;
  entry_t [LANES-1:0]            bus_entry;
  dflt_t  [LANES-1:0]            bus_dflt;

  lane_state_t [LANES-1:0]       st_q;
  logic [LANES-1:0][IP_W-1:0]    ip_q;

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      bus_en[i]   = in_state[i].valid && in_state[i].perform;
      bus_bank[i] = BW'(in_state[i].bank);
      bus_addr[i] = in_ip[i][IP_W-1-OFFSET -: STRIDE];
    end
    if (upd_mode) begin
      bus_en[0]   = upd_req.en;
      bus_bank[0] = BW'(upd_req.bank);
      bus_addr[0] = upd_req.addr[STRIDE-1:0];
    end
  end

  lookup_bus #(.STRIDE(STRIDE), .BANKS(BANKS), .LANES(LANES)) u_bus (
    .clk, .rst, .ce,
    .en         (bus_en),
    .bank       (bus_bank),
    .addr       (bus_addr),
    .we         (upd_mode && upd_req.we),
    .wr_default (upd_req.wr_default),
    .wentry     (upd_req.wentry),
    .wdflt      (upd_req.wdflt),
    .rd_entry   (bus_entry),
    .dflt       (bus_dflt)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q <= '0;
      ip_q <= '0;
    end else if (ce) begin
      st_q <= in_state;
      ip_q <= in_ip;
    end
  end

  // Lookup agents: resolve the entry read for each lane.
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      out_state[i] = st_q[i];
      out_ip[i]    = ip_q[i];
      if (st_q[i].valid && st_q[i].perform) begin
        if (bus_dflt[i].port != PORT_DEFAULT)
          out_state[i].dport = bus_dflt[i].port;
        if (bus_entry[i].is_ptr) begin
          out_state[i].perform = 1'b1;
          out_state[i].bank    = bus_entry[i].ptr;
          out_state[i].port    = PORT_DEFAULT;
        end else begin
          out_state[i].perform = 1'b0;
          out_state[i].bank    = '0;
          out_state[i].port    = bus_entry[i].ans.port;
        end
      end
    end
  end

  assign upd_rsp = '{entry: bus_entry[0], dflt: bus_dflt[0]};

endmodule
