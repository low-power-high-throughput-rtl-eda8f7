// update_controller: the update agents of all strides, prefix addition and removal.
//
// Updates are processed one at a time while no lookups are in the table. Each
// stride is reached only through its lane-0 agent port (upd_req/upd_rsp), so
// updating adds no read port to any lookup bus; the per-stage update agents are
// realised here as one sequencer that works on one stage at a time and hands
// the search from stage to stage exactly as the agents would.
//
// Addition of prefix P/n -> port q:
//   * n = 0: write the first stride's default register (the default route).
//   * navigate: while P extends past stride k, read entry P[stride k] of the
//     current bank; follow a pointer, or allocate a bank in stride k+1, clear
//     it, give it the entry's port/length as default and turn the entry into a
//     pointer to it.
//   * in the last stride reached (relative length r = n - bits before it),
//     visit the 2**(W-r) covered entries: a port entry of length <= r, or the
//     default register of a bank a pointer entry leads to whose length is
//     <= r, becomes {q, r}.
// Removal of P/n:
//   * n = 0: reset the default route.
//   * navigate as above; a port entry on the way is an error (not stored).
//   * search the half of the bank that shares P's first stride bit for the
//     longest prefix that covers P (port entries and defaults behind
//     pointers); it replaces P, else "default, length 0" does.
//   * covered entries (or defaults behind pointers) of length exactly r take
//     the replacement.
//   * deallocate: in strides after the first, if every entry of the bank is
//     "default, length 0" the bank is freed and the parent entry becomes the
//     bank's default register; repeat in the parent's stride.
// After reset the sequencer clears the first stride's bank before accepting
// commands; later banks are cleared when they are allocated.
//
// Interface: a command is taken when cmd_valid and cmd_ready are high; done or
// error pulses one cycle at its end. Addition of a bank when none is free, a
// removal that finds a port on the way, or a prefix longer than IP_W set error
// and abort. upd_mode is high from the moment the table has drained until
// the end of the command. Read data is expected one cycle after a read.
// banks_used[0] is the constant 1: the first stride's single bank is always
// in use.
//
// The addition and removal steps follow the original design. Folding the
// per-stage agents into one sequencer, clearing new banks, and the error cases
// are this design's choices.
module update_controller
  import trie_pkg::*;
#(
  parameter int unsigned IP_W     = 32,
  parameter int unsigned N_STAGES = 5,
  parameter int unsigned STRIDES [N_STAGES] = '{9, 7, 8, 3, 5},
  parameter int unsigned BANKS   [N_STAGES] = '{1, 512, 1024, 512, 256}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  op_e               cmd_op,
  input  logic [IP_W-1:0]   cmd_prefix,
  input  logic [PLEN_W-1:0] cmd_len,
  input  logic [PORT_W-1:0] cmd_port,
  output logic              done,
  output logic              error,
  output logic              active,
  input  logic              table_busy,
  output logic              upd_mode,
  output upd_req_t          upd_req [N_STAGES],
  input  upd_rsp_t          upd_rsp [N_STAGES],
  output logic [PTR_W:0]    banks_used [N_STAGES]
);

  localparam int unsigned KW = $clog2(N_STAGES + 1);

  typedef enum logic [4:0] {
    S_INIT, S_IDLE, S_DRAIN, S_ROOT, S_NAV, S_NAV_CHK, S_CLR, S_NEWDEF, S_LINK,
    S_SCAN_RD, S_SCAN_CHK, S_SCAN_DRD, S_SCAN_DCHK,
    S_MOD_RD, S_MOD_CHK, S_MOD_DRD, S_MOD_DCHK,
    S_DA_START, S_DA_RD, S_DA_CHK, S_DA_FREE, S_DONE, S_ERR
  } state_e;

  function automatic int unsigned offset_of(input int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < k; j++) s += STRIDES[j];
    return s;
  endfunction

  state_e            state;
  op_e               op;
  logic [IP_W-1:0]   pfx;
  logic [PLEN_W-1:0] plen;
  logic [PORT_W-1:0] port;
  logic [KW-1:0]     k;          // current stage
  logic [PTR_W-1:0]  bank;       // current bank in stage k
  logic [ADDR_W:0]   i;          // loop counter
  logic [LEN_W-1:0]  best;       // length of the best replacement so far
  dflt_t             repl;       // replacement for removed entries
  logic [PTR_W-1:0]  e_ptr_q;     // entry under examination: pointer field
  dflt_t             e_ans_q;     // and port/length field
  dflt_t             d_q;        // default register of a bank being freed
  logic [PTR_W-1:0]  nb;         // newly allocated bank
  logic [PTR_W-1:0]  par_bank [N_STAGES];
  logic [ADDR_W-1:0] par_idx  [N_STAGES];

  // Per-stage quantities of the current stage.
  int unsigned       w_k, off_k, rel_i;
  logic [ADDR_W-1:0] eidx;       // P's index in stage k
  logic [ADDR_W-1:0] base;       // first entry covered by P in stage k
  logic [ADDR_W:0]   cnt;        // number of entries covered by P
  logic [ADDR_W-1:0] hbase;      // first entry of P's half of the bank
  logic [ADDR_W:0]   bank_size;
  logic              ext_past;
  logic [LEN_W-1:0]  rel;

  always_comb begin
    w_k       = STRIDES[k];
    off_k     = offset_of(32'(k));
    ext_past  = 32'(plen) > off_k + w_k;
    rel_i     = ext_past ? w_k : 32'(plen) - off_k;
    rel       = LEN_W'(rel_i);
    eidx      = ADDR_W'((32'(pfx) >> (IP_W - off_k - w_k)) & ((32'd1 << w_k) - 1));
    cnt       = (ADDR_W + 1)'(32'd1 << (w_k - rel_i));
    base      = eidx & ~ADDR_W'(cnt - 1);
    hbase     = eidx & ADDR_W'(32'd1 << (w_k - 1));
    bank_size = (ADDR_W + 1)'(32'd1 << w_k);
  end

  // Allocators for strides 1..N-1 (the first stride has a single bank).
  logic             al_avail [N_STAGES];
  logic [PTR_W-1:0] al_idx   [N_STAGES];
  logic             al_take  [N_STAGES];
  logic             al_rel   [N_STAGES];

  assign al_avail[0]   = 1'b0;
  assign al_idx[0]     = '0;
  assign banks_used[0] = (PTR_W + 1)'(1);
  for (genvar s = 1; s < N_STAGES; s++) begin : g_alloc
    bank_allocator #(.BANKS(BANKS[s])) u_alloc (
      .clk, .rst,
      .avail     (al_avail[s]),
      .alloc_idx (al_idx[s]),
      .alloc     (al_take[s]),
      .rel_en    (al_rel[s]),
      .rel_idx   (bank),
      .n_used    (banks_used[s])
    );
  end

  // Candidate replacement for removal: a port/length found at entry j.
  function automatic logic covers(input logic [LEN_W-1:0] l, input logic [ADDR_W-1:0] j,
                                  input logic [ADDR_W-1:0] e, input int unsigned w,
                                  input logic [LEN_W-1:0] r);
    if (l == 0 || l >= r) return 1'b0;
    return ((j ^ e) >> (w - 32'(l))) == '0;
  endfunction

  // Value written to a matching entry in the modify step.
  dflt_t newval;
  assign newval = (op == OP_ADD) ? '{port: port, len: rel} : repl;

  // Request to the table: one stage at a time.
  logic              r_en, r_we, r_wd;
  logic [KW-1:0]     r_stage;
  logic [PTR_W-1:0]  r_bank;
  logic [ADDR_W-1:0] r_addr;
  entry_t            r_went;
  dflt_t             r_wdflt;

  entry_t rsp_e;     // entry read from stage k
  dflt_t  rsp_dn;    // default register read from stage k+1
  logic   mod_match_e, mod_match_d;
  logic   last_mod;

  always_comb begin
    rsp_e  = upd_rsp[k].entry;
    rsp_dn = (32'(k) + 1 < N_STAGES) ? upd_rsp[k + 1].dflt : DFLT_NONE;
    mod_match_e = (op == OP_ADD) ? (rsp_e.ans.len <= rel) : (rsp_e.ans.len == rel);
    mod_match_d = (op == OP_ADD) ? (rsp_dn.len <= rel) : (rsp_dn.len == rel);
    last_mod    = (i == cnt - 1);
  end

  always_comb begin
    r_en = 1'b0; r_we = 1'b0; r_wd = 1'b0; r_stage = k; r_bank = bank;
    r_addr = eidx; r_went = ENTRY_NONE; r_wdflt = DFLT_NONE;
    unique case (state)
      S_INIT: begin
        r_en = 1'b1; r_we = 1'b1; r_stage = '0; r_bank = '0; r_addr = ADDR_W'(i);
      end
      S_ROOT: begin
        r_en = 1'b1; r_we = 1'b1; r_wd = 1'b1; r_stage = '0; r_bank = '0;
        r_wdflt = (op == OP_ADD) ? '{port: port, len: '0} : DFLT_NONE;
      end
      S_NAV: r_en = ext_past;
      S_CLR: begin
        r_en = 1'b1; r_we = 1'b1; r_stage = k + 1; r_bank = nb; r_addr = ADDR_W'(i);
      end
      S_NEWDEF: begin
        r_en = 1'b1; r_we = 1'b1; r_wd = 1'b1; r_stage = k + 1; r_bank = nb;
        r_wdflt = e_ans_q;
      end
      S_LINK: begin
        r_en = 1'b1; r_we = 1'b1;
        r_went = '{is_ptr: 1'b1, ptr: nb, ans: DFLT_NONE};
      end
      S_SCAN_RD: begin r_en = 1'b1; r_addr = hbase | ADDR_W'(i); end
      S_SCAN_DRD, S_MOD_DRD: begin
        r_en = 1'b1; r_stage = k + 1; r_bank = e_ptr_q; r_addr = '0;
      end
      S_MOD_RD: begin r_en = 1'b1; r_addr = base | ADDR_W'(i); end
      S_MOD_CHK: begin
        r_addr = base | ADDR_W'(i);
        if (!rsp_e.is_ptr && mod_match_e) begin
          r_en = 1'b1; r_we = 1'b1;
          r_went = '{is_ptr: 1'b0, ptr: '0, ans: newval};
        end
      end
      S_MOD_DCHK: begin
        r_stage = k + 1; r_bank = e_ptr_q;
        if (mod_match_d) begin
          r_en = 1'b1; r_we = 1'b1; r_wd = 1'b1; r_wdflt = newval;
        end
      end
      S_DA_RD: begin r_en = 1'b1; r_addr = ADDR_W'(i); end
      S_DA_FREE: begin
        r_en = 1'b1; r_we = 1'b1; r_stage = k - 1; r_bank = par_bank[k];
        r_addr = par_idx[k];
        r_went = '{is_ptr: 1'b0, ptr: '0, ans: d_q};
      end
      default: ;
    endcase
  end

  always_comb
    for (int s = 0; s < N_STAGES; s++) begin
      upd_req[s] = '0;
      if (r_en && 32'(r_stage) == s)
        upd_req[s] = '{en: 1'b1, we: r_we, wr_default: r_wd, bank: r_bank,
                       addr: r_addr, wentry: r_went, wdflt: r_wdflt};
    end

  always_comb
    for (int s = 0; s < N_STAGES; s++) begin
      al_take[s] = (state == S_NAV_CHK) && (32'(k) + 1 == s) && !rsp_e.is_ptr &&
                   (op == OP_ADD);
      al_rel[s]  = (state == S_DA_FREE) && (32'(k) == s);
    end

  assign cmd_ready = (state == S_IDLE);
  assign upd_mode  = !(state inside {S_IDLE, S_DRAIN});
  assign active    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_INIT;
      i     <= '0;
      k     <= '0;
      bank  <= '0;
      done  <= 1'b0;
      error <= 1'b0;
      op    <= OP_NONE;
      pfx   <= '0;
      plen  <= '0;
      port  <= '0;
      best  <= '0;
      repl  <= DFLT_NONE;
      e_ptr_q <= '0;
      e_ans_q <= DFLT_NONE;
      d_q   <= DFLT_NONE;
      nb    <= '0;
      for (int s = 0; s < N_STAGES; s++) begin
        par_bank[s] <= '0;
        par_idx[s]  <= '0;
      end
    end else begin
      done  <= 1'b0;
      error <= 1'b0;
      unique case (state)
        S_INIT: begin
          i <= i + 1;
          if (i == (ADDR_W + 1)'((32'd1 << STRIDES[0]) - 1)) begin
            i     <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE:
          if (cmd_valid) begin
            op    <= cmd_op;
            pfx   <= cmd_prefix;
            plen  <= cmd_len;
            port  <= cmd_port;
            k     <= '0;
            bank  <= '0;
            state <= (32'(cmd_len) > IP_W || !(cmd_op inside {OP_ADD, OP_REMOVE}))
                     ? S_ERR : S_DRAIN;
          end
        S_DRAIN:
          if (!table_busy) state <= (plen == 0) ? S_ROOT : S_NAV;
        S_ROOT: state <= S_DONE;
        S_NAV: begin
          i <= '0;
          if (ext_past)
            state <= S_NAV_CHK;
          else if (op == OP_ADD)
            state <= S_MOD_RD;
          else begin
            best  <= '0;
            repl  <= DFLT_NONE;
            state <= (rel > 1) ? S_SCAN_RD : S_MOD_RD;
          end
        end
        S_NAV_CHK: begin
          begin e_ptr_q <= rsp_e.ptr; e_ans_q <= rsp_e.ans; end
          if (rsp_e.is_ptr) begin
            par_bank[k + 1] <= bank;
            par_idx[k + 1]  <= eidx;
            bank            <= rsp_e.ptr;
            k               <= k + 1;
            state           <= S_NAV;
          end else if (op == OP_ADD && al_avail[k + 1]) begin
            nb    <= al_idx[k + 1];
            i     <= '0;
            state <= S_CLR;
          end else
            state <= S_ERR;
        end
        S_CLR: begin
          i <= i + 1;
          if (i == (ADDR_W + 1)'((32'd1 << STRIDES[k + 1]) - 1)) state <= S_NEWDEF;
        end
        S_NEWDEF: state <= S_LINK;
        S_LINK: begin
          par_bank[k + 1] <= bank;
          par_idx[k + 1]  <= eidx;
          bank            <= nb;
          k               <= k + 1;
          state           <= S_NAV;
        end
        S_SCAN_RD: state <= S_SCAN_CHK;
        S_SCAN_CHK: begin
          begin e_ptr_q <= rsp_e.ptr; e_ans_q <= rsp_e.ans; end
          if (rsp_e.is_ptr)
            state <= S_SCAN_DRD;
          else begin
            if (covers(rsp_e.ans.len, hbase | ADDR_W'(i), eidx, w_k, rel) &&
                rsp_e.ans.len > best) begin
              best <= rsp_e.ans.len;
              repl <= rsp_e.ans;
            end
            i <= i + 1;
            if (i == (bank_size >> 1) - 1) begin
              i     <= '0;
              state <= S_MOD_RD;
            end else
              state <= S_SCAN_RD;
          end
        end
        S_SCAN_DRD: state <= S_SCAN_DCHK;
        S_SCAN_DCHK: begin
          if (covers(rsp_dn.len, hbase | ADDR_W'(i), eidx, w_k, rel) && rsp_dn.len > best) begin
            best <= rsp_dn.len;
            repl <= rsp_dn;
          end
          i <= i + 1;
          if (i == (bank_size >> 1) - 1) begin
            i     <= '0;
            state <= S_MOD_RD;
          end else
            state <= S_SCAN_RD;
        end
        S_MOD_RD: state <= S_MOD_CHK;
        S_MOD_CHK: begin
          begin e_ptr_q <= rsp_e.ptr; e_ans_q <= rsp_e.ans; end
          if (rsp_e.is_ptr)
            state <= S_MOD_DRD;
          else begin
            i <= i + 1;
            if (last_mod) state <= (op == OP_ADD) ? S_DONE : S_DA_START;
            else          state <= S_MOD_RD;
          end
        end
        S_MOD_DRD: state <= S_MOD_DCHK;
        S_MOD_DCHK: begin
          i <= i + 1;
          if (last_mod) state <= (op == OP_ADD) ? S_DONE : S_DA_START;
          else          state <= S_MOD_RD;
        end
        S_DA_START: begin
          i     <= '0;
          state <= (k == 0) ? S_DONE : S_DA_RD;
        end
        S_DA_RD: state <= S_DA_CHK;
        S_DA_CHK: begin
          d_q <= upd_rsp[k].dflt;
          if (rsp_e.is_ptr || rsp_e.ans != DFLT_NONE)
            state <= S_DONE;
          else if (i == bank_size - 1)
            state <= S_DA_FREE;
          else begin
            i     <= i + 1;
            state <= S_DA_RD;
          end
        end
        S_DA_FREE: begin
          bank  <= par_bank[k];
          k     <= k - 1;
          state <= S_DA_START;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_ERR: begin
          error <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
