// atm_pkg: constants and types shared by the 4x4 shared-buffer ATM switch.
//
// The switch moves 53-byte cells between four bidirectional links. Each
// link direction carries, per 50 MHz clock, one 10-bit word: a signalling
// bit (1 = cell delimiter), a data byte and one flow-control bit that
// carries permit tokens serially. A cell on the link is one delimiter
// followed by 53 data bytes (54 clocks). Byte 0 of a cell is the VC ID,
// byte 1 the control byte whose two top bits give the cell type.
// The numbers below (4 links, 256 VCs per link, 128 dedicated plus a 64-cell
// shared pool, 576 buffer rows of 424 bits, 12-bit service weights, four
// priority classes, 16-bit node ID) are the chip's own; the delimiter byte
// value and the set-up cell field layout are this design's choices.
// ded_row is only used for VCs 0..127, so it ignores the top VC bit.
package atm_pkg;

  localparam int NLINK      = 4;     // links in each direction
  localparam int CELL_BYTES = 53;    // bytes per ATM cell
  localparam int FRAME      = 54;    // clocks per cell on a link (53 + delimiter)
  localparam int CELL_BITS  = 8 * CELL_BYTES;  // 424-bit buffer RAM row
  localparam int NVC        = 256;   // VCs per link
  localparam int NDED       = 128;   // VCs 0..127 have a dedicated buffer row
  localparam int NSHARED    = 64;    // shared pool for VCs 128..255 of all links
  localparam int NROWS      = NLINK * NDED + NSHARED;  // 576
  localparam int WEIGHT_W   = 12;    // service-frequency weight / label counter
  localparam int NCLASS     = 4;     // priority classes, class 0 is the highest
  localparam int NODEID_W   = 16;

  localparam logic [7:0] DELIM_BYTE = 8'h00;  // value sent with sig = 1

  typedef logic [7:0] vc_t;
  typedef logic [1:0] link_t;
  typedef logic [9:0] row_t;                   // 0..575
  typedef logic [CELL_BITS-1:0] cell_t;        // byte k at bits [8k+7:8k]

  // cell type: the two most significant bits of the control byte (byte 1)
  typedef enum logic [1:0] {
    CT_NORMAL  = 2'b00,
    CT_NODEID  = 2'b01,
    CT_VCSETUP = 2'b10,
    CT_SIGNAL  = 2'b11
  } cell_type_e;

  // one routing table word: 1 + 8 + 2 = 11 bits
  typedef struct packed {
    logic  valid;     // VC open on this incoming link
    vc_t   new_vc;    // translated VC ID
    link_t out_link;  // destination outgoing link
  } rt_entry_t;

  // one link word per clock, as carried by the five pins on both clock edges
  typedef struct packed {
    logic       sig;   // 1 = cell delimiter
    logic [7:0] data;
    logic       fc;    // flow-control (permit token) bit stream
  } link_word_t;

  // buffer RAM row of a cell: dedicated row for VCs 0..127, shared pool above
  function automatic row_t ded_row(link_t out, vc_t vc);
    return row_t'(out) * row_t'(NDED) + row_t'(vc[6:0]);
  endfunction

  function automatic row_t shared_row(logic [5:0] idx);
    return row_t'(NLINK * NDED) + row_t'(idx);
  endfunction

  // event counters brought out of the switch, summed over the links
  typedef enum int {
    ST_FRAME_ERR,    // incoming cells cut short by a delimiter
    ST_DROP_CLOSED,  // incoming cells on closed VCs (not set-up cells)
    ST_OVERRUN,      // input lower latches overwritten before use
    ST_TOKENS_IN,    // permits received from downstream
    ST_TOKENS_OUT,   // permits sent upstream
    ST_TOKENS_LOST,  // permit queue overflows
    ST_SEL_SCAN,     // selections by label matching
    ST_SEL_SPECIAL,  // selections by a token or an incoming cell
    ST_STERILE,      // label positions found sterile
    ST_SCAN_END,     // scan cycles ended (label counter advanced)
    ST_CUT_THROUGH,  // cells cut through
    ST_CONFLICT,     // buffer reads moved earlier by a conflict
    ST_REFRESH,      // refresh operations
    ST_DROP_FULL,    // cells for a VC that already had one buffered
    ST_DROP_POOL,    // cells lost because the shared pool was full
    ST_SETUP,        // VC set-up cells applied
    ST_CFG_IGNORED,  // set-up cells for another node
    NSTAT
  } stat_e;

endpackage
