// route_lookup_chip: IP routing table lookup chip built on a pipelined SRAM trie.
//
// Commands enter serially, one per input clock: lookups (op 0), prefix
// additions (op 1) and removals (op 2). The arbiter packs lookups into groups
// of up to LANES addresses with pairwise different first strides and hands a
// group to the lookup table once every LANES input cycles (the table's clock
// enable "tick"), so the table performs LANES lookups per table cycle while the
// pins carry one. The table's parallel results are serialized again, one per
// input cycle, in arrival order, as address and port.
//
// Additions and removals are handed to the update agents. They wait for the
// lookups in flight to leave the table, then run with the table clocked every
// input cycle; in_wait holds off further commands until the update is done.
// upd_done or upd_error pulses at the end of each update.
//
// Latency of a lookup without conflicts: up to LANES input cycles to fill
// its group, N_STAGES + 1 table cycles of LANES input cycles, and up to LANES
// cycles to be serialized. A result port equal to all ones means that no
// prefix and no default route covers the address.
//
// The serial interface, the wait signal, the table running once every LANES
// input cycles and the strides {9,7,8,3,5} with 16 lanes follow the original
// design. The clock enable in place of a divided clock, the bank counts, the
// handshake and the observation outputs are this design's choices.
module route_lookup_chip
  import trie_pkg::*;
#(
  parameter int unsigned IP_W     = 32,
  parameter int unsigned LANES    = 16,
  parameter int unsigned N_STAGES = 5,
  parameter int unsigned STRIDES [N_STAGES] = '{9, 7, 8, 3, 5},
  parameter int unsigned BANKS   [N_STAGES] = '{1, 512, 1024, 512, 256}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  op_e               in_op,
  input  logic [IP_W-1:0]   in_addr,
  input  logic [PLEN_W-1:0] in_len,
  input  logic [PORT_W-1:0] in_port,
  output logic              in_wait,
  output logic              out_valid,
  output logic [IP_W-1:0]   out_addr,
  output logic [PORT_W-1:0] out_port,
  output logic              upd_done,
  output logic              upd_error,
  output logic              conflict_stall,
  output logic              full_stall,
  output logic [PTR_W:0]    banks_used [N_STAGES]
);

  localparam int unsigned TW = (LANES <= 1) ? 1 : $clog2(LANES);

  // Table clock enable: once every LANES input cycles, every cycle while the
  // update agents own the table.
  logic [TW-1:0] phase;
  logic          tick, ce, ce_q;

  always_ff @(posedge clk)
    if (rst) phase <= '0;
    else     phase <= (32'(phase) == LANES - 1) ? '0 : phase + 1'b1;

  assign tick = (32'(phase) == LANES - 1);

  logic [LANES-1:0]              grp_valid;
  logic [LANES-1:0][IP_W-1:0]    grp_ip;
  logic                          cmd_valid, cmd_ready;
  op_e                           cmd_op;
  logic [IP_W-1:0]               cmd_prefix;
  logic [PLEN_W-1:0]             cmd_len;
  logic [PORT_W-1:0]             cmd_port;
  logic                          upd_active, upd_mode, table_busy;
  upd_req_t                      upd_req [N_STAGES];
  upd_rsp_t                      upd_rsp [N_STAGES];
  logic [LANES-1:0]              res_valid;
  logic [LANES-1:0][IP_W-1:0]    res_ip;
  logic [LANES-1:0][PORT_W-1:0]  res_port;

  assign ce = tick || upd_mode;

  lookup_arbiter #(.IP_W(IP_W), .LANES(LANES), .FIRST_STRIDE(STRIDES[0])) u_arbiter (
    .clk, .rst,
    .tick       (tick && !upd_mode),
    .in_valid, .in_op, .in_addr, .in_len, .in_port, .in_wait,
    .grp_valid, .grp_ip,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_prefix, .cmd_len, .cmd_port,
    .upd_active,
    .conflict_stall,
    .full_stall
  );

  lookup_table #(
    .IP_W(IP_W), .LANES(LANES), .N_STAGES(N_STAGES), .STRIDES(STRIDES), .BANKS(BANKS)
  ) u_table (
    .clk, .rst, .ce,
    .in_valid  (grp_valid & {LANES{!upd_mode}}),
    .in_ip     (grp_ip),
    .out_valid (res_valid),
    .out_ip    (res_ip),
    .out_port  (res_port),
    .busy      (table_busy),
    .upd_mode,
    .upd_req,
    .upd_rsp
  );

  update_controller #(
    .IP_W(IP_W), .N_STAGES(N_STAGES), .STRIDES(STRIDES), .BANKS(BANKS)
  ) u_update (
    .clk, .rst,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_prefix, .cmd_len, .cmd_port,
    .done       (upd_done),
    .error      (upd_error),
    .active     (upd_active),
    .table_busy,
    .upd_mode,
    .upd_req,
    .upd_rsp,
    .banks_used
  );

  always_ff @(posedge clk)
    if (rst) ce_q <= 1'b0;
    else     ce_q <= ce;

  result_serializer #(.IP_W(IP_W), .LANES(LANES)) u_serializer (
    .clk, .rst,
    .load      (ce_q && (|res_valid)),
    .res_valid, .res_ip, .res_port,
    .out_valid,
    .out_ip    (out_addr),
    .out_port
  );

endmodule
