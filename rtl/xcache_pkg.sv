// xcache_pkg: types and constants shared by the X-Cache modules.
//
// X-Cache is a cache for domain-specific accelerators whose tags are the
// accelerator's own metadata (a hash key, a row id, a node id) instead of a
// memory address, and whose miss handling is a programmable walker: a set of
// microcoded routines, selected by a [state, event] routine table, that run as
// coroutines on a small pool of action-executor lanes.
//
// This package fixes the field widths of the messages, the microcode action
// format and the walker context. The action set (AGEN, queue, meta-tag,
// control and data-RAM actions) follows the action table of the design; the
// binary encoding, the operand fields and the field widths are this design's
// own choice. Sizes that are module parameters (ways, sets, sectors, lanes,
// X-registers) are bounded here only by the width of their index fields.
package xcache_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned KEY_W   = 32;  // meta-tag key (DSA metadata field)
  localparam int unsigned WORD_W  = 32;  // data word
  localparam int unsigned ADDR_W  = 32;  // DRAM byte address
  localparam int unsigned WLEN    = 4;   // words per sector (#wlen, #Word)
  localparam int unsigned NREGS   = 8;   // temporaries R0..R7 per X-register
  localparam int unsigned NCTRL   = 8;   // host-written control registers
  localparam int unsigned STATE_W = 4;   // walker state encoding
  localparam int unsigned EVENT_W = 4;   // event encoding
  localparam int unsigned UPC_W   = 8;   // microcode address
  localparam int unsigned SEC_W   = 16;  // data RAM sector index
  localparam int unsigned LEN_W   = 8;   // sectors held by one entry
  localparam int unsigned SET_W   = 16;  // meta-tag set index
  localparam int unsigned WAY_W   = 4;   // meta-tag way index
  localparam int unsigned WID_W   = 6;   // walker (X-register row) index
  localparam int unsigned PEND_W  = 4;   // loads waiting on one walker

  typedef logic [WORD_W-1:0]  word_t;
  typedef word_t [WLEN-1:0]   block_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [STATE_W-1:0] state_t;
  typedef logic [EVENT_W-1:0] event_t;
  typedef logic [UPC_W-1:0]   upc_t;
  typedef logic [SEC_W-1:0]   sec_t;
  typedef logic [LEN_W-1:0]   len_t;
  typedef logic [WID_W-1:0]   wid_t;

  // Fixed state encodings: every walker starts in DEFAULT; an entry whose
  // state is END holds resident data and answers meta loads as a hit.
  localparam state_t STATE_DEFAULT = state_t'(0);
  localparam state_t STATE_END     = state_t'(1);

  // ------------------------------------------------------------- messages
  typedef enum logic [1:0] {
    REQ_LOAD    = 2'd0,   // meta load: answer with the element's sectors
    REQ_PRELOAD = 2'd1,   // decoupled preload: walk and fill, no answer
    REQ_STORE   = 2'd2    // meta store: run a routine with the payload
  } req_kind_e;

  // Message sources seen by the trigger table.
  typedef enum logic [1:0] {
    SRC_LOAD    = 2'd0,
    SRC_PRELOAD = 2'd1,
    SRC_STORE   = 2'd2,
    SRC_DRAM    = 2'd3
  } src_e;

  typedef struct packed {
    req_kind_e kind;
    key_t      key;
    block_t    data;
  } meta_req_t;

  typedef struct packed {
    key_t   key;
    block_t data;
    logic   last;     // final sector of this element
  } meta_resp_t;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;  // block address, one sector per request
    wid_t              wid;   // walker waiting on the fill
  } dram_req_t;

  typedef struct packed {
    wid_t   wid;
    block_t data;
  } dram_resp_t;

  // Internal event: names the walker, the event, the trigger's hit flag and
  // the message handed to the routine (the lane's message buffer at ENQ).
  typedef struct packed {
    wid_t   wid;
    event_t ev;
    logic   hit;
    block_t msg;
  } int_event_t;

  typedef struct packed {
    key_t              key;
    logic [PEND_W-1:0] cnt;   // loads to answer once the element is resident
  } replay_t;

  typedef struct packed {
    key_t   key;
    sec_t   start;
    len_t   len;
  } hit_job_t;

  // ------------------------------------------------------------- actions
  typedef enum logic [5:0] {
    // AGEN
    OP_NOP, OP_ADD, OP_AND, OP_OR, OP_XOR, OP_ADDI, OP_INC, OP_DEC,
    OP_SHL, OP_SHR, OP_SRA, OP_SRL, OP_NOT, OP_ALLOCR,
    // message queues
    OP_ENQ, OP_DEQ, OP_RDATA, OP_WDATA, OP_PEEK,
    // meta-tags
    OP_ALLOCM, OP_DEALLOCM, OP_UPDATE, OP_STATE,
    // control
    OP_BMISS, OP_BHIT, OP_BEQ, OP_BNZ, OP_BLT, OP_BGE, OP_BLE,
    // data RAM
    OP_ALLOCD, OP_DEALLOCD, OP_READ, OP_WRITE
  } op_e;

  // Operand sources 0..7 are the walker's temporaries R0..R7, 8..15 the
  // control registers C0..C7. Destinations are always temporaries.
  typedef struct packed {
    op_e         op;
    logic [2:0]  rd;
    logic [3:0]  rs1;
    logic [3:0]  rs2;
    logic [15:0] imm;
  } action_t;

  localparam int unsigned ACTION_W = $bits(action_t);

  // imm[15] of ENQ selects the DRAM request queue instead of the internal
  // event queue; imm[15] of WRITE selects a single-word register write.
  localparam int unsigned IMM_SEL = 15;

  // ------------------------------------------------------ walker context
  typedef struct packed {
    key_t               key;
    state_t             state;
    word_t [NREGS-1:0]  r;
    logic               has_meta;
    logic [SET_W-1:0]   set;
    logic [WAY_W-1:0]   way;
    logic               has_data;
    sec_t               dstart;
    len_t               dlen;
  } walker_ctx_t;

  typedef struct packed {
    wid_t        wid;
    walker_ctx_t ctx;
    event_t      ev;
    logic        hit;     // the triggering meta lookup hit
    block_t      msg;     // payload of the triggering message
    upc_t        pc;      // routine start from the routine table
  } dispatch_t;

  typedef struct packed {
    logic        valid;
    key_t        key;
    state_t      state;
    sec_t        dstart;
    len_t        dlen;
  } meta_entry_t;

  // ----------------------------------------------- meta-tag update port
  typedef enum logic [2:0] {
    MT_NONE, MT_ALLOC, MT_DEALLOC, MT_UPDATE, MT_STATE
  } mt_op_e;

  typedef struct packed {
    mt_op_e           op;
    key_t             key;
    logic [SET_W-1:0] set;
    logic [WAY_W-1:0] way;
    state_t           state;
    sec_t             dstart;
    len_t             dlen;
  } mt_cmd_t;

  // Shared ports arbitrated among executor lanes.
  localparam int unsigned P_META  = 0;  // meta-tag update, walker release
  localparam int unsigned P_ALLOC = 1;  // sector allocator
  localparam int unsigned P_DRAMQ = 2;  // DRAM request queue
  localparam int unsigned P_EVQ   = 3;  // internal event queue
  localparam int unsigned P_DWR   = 4;  // data RAM write port
  localparam int unsigned P_DRD   = 5;  // data RAM routine read port
  localparam int unsigned NPORTS  = 6;

  // Host configuration targets.
  typedef enum logic [1:0] {
    CFG_TRIGGER = 2'd0,
    CFG_RTABLE  = 2'd1,
    CFG_UCODE   = 2'd2,
    CFG_CTRL    = 2'd3
  } cfg_target_e;

  typedef struct packed {
    logic [31:0] hits;          // meta loads answered from resident data
    logic [31:0] misses;        // meta loads/preloads that started a walker
    logic [31:0] merged;        // loads that joined an already active walker
    logic [31:0] replays;       // completed walkers that answered waiting loads
    logic [31:0] routines;      // routines dispatched
    logic [31:0] port_stalls;   // lane-cycles lost to a shared-port conflict
    logic [31:0] alloc_stalls;  // lane-cycles waiting for a tag or sectors
    logic [31:0] xreg_full;     // cycles a miss waited for a free X-register
    logic [31:0] evictions;     // resident entries replaced
    logic [31:0] dropped;       // messages with no routine in the table
  } xc_stats_t;

  // Build one microcode action (used by testbenches and host code).
  function automatic action_t mk_act(op_e op, int rd = 0, int rs1 = 0,
                                     int rs2 = 0, int imm = 0);
    action_t a;
    a.op  = op;
    a.rd  = 3'(rd);
    a.rs1 = 4'(rs1);
    a.rs2 = 4'(rs2);
    a.imm = 16'(imm);
    return a;
  endfunction

endpackage
