// lookup_table: the pipelined multi-bit trie, N_STAGES strides and result logic.
//
// Stride k is looked up in stage k: the first stage holds one bank replicated
// per lane, every later stage a lookup bus of BANKS[k] banks. Up to LANES
// addresses enter together (one group from the arbiter), move one stage per
// clock-enabled cycle on their own lane, and leave in order from the result
// logic. The default configuration is the preferred stride choice
// {9,7,8,3,5} with 16 lookups per cycle. The numbers of banks per stride are
// this design's choice (they must cover the routing tables to be stored).
//
// Updates: the update agents drive upd_req[k] for stage k while upd_mode is
// high and read upd_rsp[k] one cycle after a read. No lookups may be in the
// pipeline while upd_mode is high; busy reports lookups in flight.
//
// Timing: a group entering at clock-enabled cycle t leaves on out_* after
// N_STAGES + 1 clock-enabled cycles.
module lookup_table
  import trie_pkg::*;
#(
  parameter int unsigned IP_W     = 32,
  parameter int unsigned LANES    = 16,
  parameter int unsigned N_STAGES = 5,
  parameter int unsigned STRIDES [N_STAGES] = '{9, 7, 8, 3, 5},
  parameter int unsigned BANKS   [N_STAGES] = '{1, 512, 1024, 512, 256}
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              ce,
  input  logic [LANES-1:0]                  in_valid,
  input  logic [LANES-1:0][IP_W-1:0]        in_ip,
  output logic [LANES-1:0]                  out_valid,
  output logic [LANES-1:0][IP_W-1:0]        out_ip,
  output logic [LANES-1:0][PORT_W-1:0]      out_port,
  output logic                              busy,
  input  logic                              upd_mode,
  input  upd_req_t                          upd_req [N_STAGES],
  output upd_rsp_t                          upd_rsp [N_STAGES]
);

  function automatic int unsigned offset_of(input int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < k; j++) s += STRIDES[j];
    return s;
  endfunction

  lane_state_t [LANES-1:0]       st [N_STAGES];
  logic [LANES-1:0][IP_W-1:0]    ip [N_STAGES];

  first_lookup_stage #(.IP_W(IP_W), .STRIDE(STRIDES[0]), .LANES(LANES)) u_stage0 (
    .clk, .rst, .ce,
    .in_valid  (in_valid),
    .in_ip     (in_ip),
    .out_state (st[0]),
    .out_ip    (ip[0]),
    .upd_mode,
    .upd_req   (upd_req[0]),
    .upd_rsp   (upd_rsp[0])
  );

  for (genvar k = 1; k < N_STAGES; k++) begin : g_stage
    lookup_stage #(
      .IP_W   (IP_W),
      .STRIDE (STRIDES[k]),
      .OFFSET (offset_of(k)),
      .BANKS  (BANKS[k]),
      .LANES  (LANES)
    ) u_stage (
      .clk, .rst, .ce,
      .in_state  (st[k-1]),
      .in_ip     (ip[k-1]),
      .out_state (st[k]),
      .out_ip    (ip[k]),
      .upd_mode,
      .upd_req   (upd_req[k]),
      .upd_rsp   (upd_rsp[k])
    );
  end

  result_logic #(.IP_W(IP_W), .LANES(LANES)) u_result (
    .clk, .rst, .ce,
    .in_state  (st[N_STAGES-1]),
    .in_ip     (ip[N_STAGES-1]),
    .out_valid,
    .out_ip,
    .out_port
  );

  always_comb begin
    busy = |in_valid;
    for (int k = 0; k < N_STAGES; k++)
      for (int i = 0; i < LANES; i++)
        busy |= st[k][i].valid;
  end

  // The strides must cover the whole address.
  initial assert (offset_of(N_STAGES) == IP_W)
    else $error("lookup_table: strides do not add up to IP_W");

endmodule
