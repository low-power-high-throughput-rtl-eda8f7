// lookup_arbiter: turns a serial stream of commands into conflict-free groups.
//
// Lookups arrive one per cycle and are packed, in arrival order, into a group
// of up to LANES slots. Two lookups whose first FIRST_STRIDE address bits are
// equal would read the same first-stride entry and, if it is a pointer, the
// same second-stride bank in the same cycle, so such a lookup is not added:
// it waits for the next group. On every tick (the lookup table's clock enable)
// the current group is handed to the table and a new one starts; a lookup
// arriving in that cycle opens the new group. A full group also makes the
// input wait for the next tick.
//
// Additions and removals wait until the current group has been issued and the
// update agents are idle, are handed to them, and hold off every following
// command until the update has finished.
//
// Interface: in_* is a valid/wait handshake; while in_wait is high the sender
// keeps in_valid and its data unchanged. grp_valid/grp_ip are registers that
// the table samples on tick. cmd_op/cmd_prefix/cmd_len/cmd_port are the
// input fields themselves; only cmd_valid decides when they count. Grouping
// and the wait signal follow the chip description; the handshake timing is
// this design's choice.
module lookup_arbiter
  import trie_pkg::*;
#(
  parameter int unsigned IP_W         = 32,
  parameter int unsigned LANES        = 16,
  parameter int unsigned FIRST_STRIDE = 9
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           tick,
  // serial command input
  input  logic                           in_valid,
  input  op_e                            in_op,
  input  logic [IP_W-1:0]                in_addr,
  input  logic [PLEN_W-1:0]              in_len,
  input  logic [PORT_W-1:0]              in_port,
  output logic                           in_wait,
  // group to the lookup table
  output logic [LANES-1:0]               grp_valid,
  output logic [LANES-1:0][IP_W-1:0]     grp_ip,
  // update command to the update agents
  output logic                           cmd_valid,
  input  logic                           cmd_ready,
  output op_e                            cmd_op,
  output logic [IP_W-1:0]                cmd_prefix,
  output logic [PLEN_W-1:0]              cmd_len,
  output logic [PORT_W-1:0]              cmd_port,
  input  logic                           upd_active,
  // statistics
  output logic                           conflict_stall,
  output logic                           full_stall
);

  localparam int unsigned CW = $clog2(LANES + 1);
  localparam int unsigned LW = (LANES <= 1) ? 1 : $clog2(LANES);

  logic [CW-1:0] cnt;
  logic          upd_busy;   // an update was handed over and is not finished
  logic          is_lookup, is_update, conflict, full, accept;

  always_comb begin
    is_lookup = in_valid && (in_op == OP_LOOKUP);
    is_update = in_valid && (in_op inside {OP_ADD, OP_REMOVE});
    conflict  = 1'b0;
    for (int j = 0; j < LANES; j++)
      if (grp_valid[j] && grp_ip[j][IP_W-1 -: FIRST_STRIDE] == in_addr[IP_W-1 -: FIRST_STRIDE])
        conflict = 1'b1;
    full   = (32'(cnt) == LANES);
    // On a tick the group leaves, so the lookup opens an empty group.
    accept = is_lookup && !upd_busy && (tick || (!conflict && !full));

    cmd_valid  = is_update && !upd_busy && (cnt == 0);
    cmd_op     = in_op;
    cmd_prefix = in_addr;
    cmd_len    = in_len;
    cmd_port   = in_port;

    in_wait        = in_valid && !(accept || (cmd_valid && cmd_ready) || in_op == OP_NONE);
    conflict_stall = is_lookup && !upd_busy && !tick && conflict && !full;
    full_stall     = is_lookup && !upd_busy && !tick && full;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      grp_valid <= '0;
      grp_ip    <= '0;
      upd_busy  <= 1'b0;
    end else begin
      if (tick) begin
        grp_valid <= '0;
        cnt       <= '0;
      end
      if (accept) begin
        if (tick) begin
          grp_valid[0] <= 1'b1;
          grp_ip[0]    <= in_addr;
          cnt          <= CW'(1);
        end else begin
          grp_valid[LW'(cnt)] <= 1'b1;
          grp_ip[LW'(cnt)]    <= in_addr;
          cnt            <= cnt + 1'b1;
        end
      end
      if (cmd_valid && cmd_ready)
        upd_busy <= 1'b1;
      else if (upd_busy && !upd_active)
        upd_busy <= 1'b0;
    end
  end

  // Handshake rule: a waiting command is held unchanged.
  logic             held_valid;
  logic [IP_W-1:0]  held_addr;
  op_e              held_op;
  always_ff @(posedge clk) begin
    if (rst) held_valid <= 1'b0;
    else     held_valid <= in_valid && in_wait;
    held_addr <= in_addr;
    held_op   <= in_op;
    if (!rst && held_valid)
      assert (in_valid && in_addr == held_addr && in_op == held_op)
        else $error("lookup_arbiter: command changed while waiting");
  end

endmodule
