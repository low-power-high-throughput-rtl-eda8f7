// trie_pkg: types and constants shared by the multi-bit trie routing lookup design.
//
// A trie memory entry holds either a pointer to a bank of the next stride or a
// resolved answer: a destination port and the length of its prefix measured
// relative to the start of the stride that stores it. Relative length 0 is
// reserved for entries that defer to the bank's default register, and the port
// code PORT_DEFAULT (all ones) is the reserved "default" port. Every bank also
// has a default register holding a port and a relative length.
//
// The field widths are fixed maxima that cover every stride choice the lookup
// table can be built with (strides up to 15 bits, up to 65536 banks per
// stride). The encoding and widths are this design's choice; the 6-bit port
// number follows the pin budget of the chip.
package trie_pkg;

  localparam int unsigned PORT_W   = 6;   // destination port number width
  localparam int unsigned LEN_W    = 4;   // relative prefix length (0..15)
  localparam int unsigned PTR_W    = 16;  // bank number of the next stride
  localparam int unsigned ADDR_W   = 15;  // maximum stride width (bank address)
  localparam int unsigned PLEN_W   = 6;   // absolute prefix length 0..32

  localparam logic [PORT_W-1:0] PORT_DEFAULT = '1;

  // Operation codes of the chip's serial command input.
  typedef enum logic [1:0] {
    OP_LOOKUP = 2'd0,
    OP_ADD    = 2'd1,
    OP_REMOVE = 2'd2,
    OP_NONE   = 2'd3
  } op_e;

  // Port number and relative prefix length (an answer or a default register).
  typedef struct packed {
    logic [PORT_W-1:0] port;
    logic [LEN_W-1:0]  len;
  } dflt_t;

  // One SRAM entry: pointer or answer.
  typedef struct packed {
    logic              is_ptr;
    logic [PTR_W-1:0]  ptr;
    dflt_t             ans;
  } entry_t;

  localparam dflt_t  DFLT_NONE  = '{port: PORT_DEFAULT, len: '0};
  localparam entry_t ENTRY_NONE = '{is_ptr: 1'b0, ptr: '0, ans: DFLT_NONE};

  // Update agent request to one stage: all reads and writes use lane 0's
  // bank/address path. A read returns the addressed entry and the bank's
  // default register one cycle later.
  typedef struct packed {
    logic              en;          // access the stage this cycle
    logic              we;          // write (otherwise read)
    logic              wr_default;  // write the default register, not the SRAM
    logic [PTR_W-1:0]  bank;
    logic [ADDR_W-1:0] addr;
    entry_t            wentry;
    dflt_t             wdflt;
  } upd_req_t;

  typedef struct packed {
    entry_t entry;
    dflt_t  dflt;
  } upd_rsp_t;

  // Payload carried from stage to stage with each lookup.
  typedef struct packed {
    logic              valid;    // lookup enable: a lookup occupies this lane
    logic              perform;  // next stage must read a bank
    logic [PTR_W-1:0]  bank;     // bank to read in the next stage
    logic [PORT_W-1:0] port;     // answer so far (PORT_DEFAULT: not yet known)
    logic [PORT_W-1:0] dport;    // default port inherited so far
  } lane_state_t;

  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

endpackage
