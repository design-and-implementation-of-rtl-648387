// davrid_pkg -- types and constants shared by every DAVRID block.
//
// A DAVRID message is a header double-word followed by body words. The
// header layout is the one of the general message packet: bit 0 is the
// leftmost (most significant) bit, so the first struct member below is the
// top of the 64-bit word.
//
//   bits  0..11  NODE  node identifier (12 bits)   -- or CLUSTER (bits 0..9)
//   bits 12..31  FBA   frame base address (20 bits) -- or SM_ADDR for SM messages
//   bits 32..39  MT    message type (8 bits)
//   bits 40..43  S     size (4 bits)
//   bits 44..53  OFF   offset of a synchronization slot (10 bits)
//   bits 54..63  DISP  displacement of a value slot (10 bits)
//
// Field widths and positions follow the packet figures. Design choices of
// this implementation: a node identifier is {cluster id (10 bits), node in
// cluster (2 bits)}, which matches a 10-bit CLUSTER field and at most four
// nodes per cluster; bits 10..11 of an SM message header are unused; a
// message carries a fixed body of four 32-bit words (the second and third
// 64-bit lines of the general packet), and S gives how many of them are
// meaningful; the numeric message-type codes are this design's own.
package davrid_pkg;

  localparam int unsigned NODE_W    = 12;
  localparam int unsigned CLUSTER_W = 10;
  localparam int unsigned LNODE_W   = NODE_W - CLUSTER_W; // node within a cluster
  localparam int unsigned FBA_W     = 20;
  localparam int unsigned MT_W      = 8;
  localparam int unsigned S_W       = 4;
  localparam int unsigned OFF_W     = 10;
  localparam int unsigned DISP_W    = 10;
  localparam int unsigned WORD_W    = 32;   // R3000 word
  localparam int unsigned BODY_WORDS = 4;

  // Frame synchronization slot: {synchronization counter, thread pointer}
  localparam int unsigned SC_W = 8;
  localparam int unsigned IP_W = WORD_W - SC_W;

  typedef enum logic [MT_W-1:0] {
    // node-addressed, handled by the SU
    MT_START      = 8'h01,  // FM[fp+disp] <- val; sync on fp+off
    MT_STARTR     = 8'h02,  // as START, then signal the sender at r_off
    MT_STARTN     = 8'h03,  // (STARTn) sync on fp+off, no value
    MT_STARTNV    = 8'h04,  // (STARTN) FM[fp+disp] <- val; sync on fp+off
    MT_FALLOC     = 8'h10,  // allocate a frame, send fp to off:disp
    MT_M_FALLOC   = 8'h11,  // allocate the main frame and start it
    MT_FDEALLOC   = 8'h12,  // free a function frame
    MT_LDEALLOC   = 8'h13,  // free a sequential loop frame
    MT_PLDEALLOC  = 8'h14,  // free a parallel loop frame
    // cluster-addressed, handled by the NIMU structured memory
    MT_ILOAD      = 8'h20,
    MT_ISTORE     = 8'h21,
    MT_ISTORER    = 8'h22,
    MT_HALLOC     = 8'h23,
    MT_HDEALLOC   = 8'h24,
    // to the host, through the NIMU
    MT_HOST_OUT1  = 8'h30,
    MT_HOST_OUT2  = 8'h31
  } mt_e;

  typedef struct packed {
    logic [NODE_W-1:0] node;   // destination node, or {cluster, 2'b00}
    logic [FBA_W-1:0]  fba;    // frame base address, or SM address
    mt_e               mt;
    logic [S_W-1:0]    s;      // number of meaningful body words
    logic [OFF_W-1:0]  off;
    logic [DISP_W-1:0] disp;
  } msg_hdr_t;

  typedef struct packed {
    msg_hdr_t                         hdr;
    logic [0:BODY_WORDS-1][WORD_W-1:0] w;   // w[0] is the third packet word
  } msg_t;

  localparam int unsigned MSG_W = $bits(msg_t);

  // A continuation <fp, ip> as held by the ATQ
  typedef struct packed {
    logic [FBA_W-1:0] fp;
    logic [IP_W-1:0]  ip;
  } cont_t;

  // Setup Token Queue entry written by the TPU
  typedef enum logic {
    STQ_CONT = 1'b0,   // STARTd: move <fp, ip> to the ATQ
    STQ_SYNC = 1'b1    // STARTln: synchronize on FM[fp+off]
  } stq_kind_e;

  typedef struct packed {
    stq_kind_e        kind;
    logic [FBA_W-1:0] fp;
    logic [IP_W-1:0]  arg;   // ip for STQ_CONT, off in the low bits for STQ_SYNC
  } stq_t;

  // Classification of a message by its header
  function automatic logic is_sm_msg(mt_e mt);
    return mt[7:4] == 4'h2;
  endfunction

  function automatic logic is_host_msg(mt_e mt);
    return mt[7:4] == 4'h3;
  endfunction

  function automatic logic is_alloc_msg(mt_e mt);
    return (mt == MT_FALLOC) || (mt == MT_M_FALLOC);
  endfunction

  function automatic logic is_dealloc_msg(mt_e mt);
    return (mt == MT_FDEALLOC) || (mt == MT_LDEALLOC) || (mt == MT_PLDEALLOC);
  endfunction

  function automatic logic [CLUSTER_W-1:0] cluster_of(logic [NODE_W-1:0] node);
    return node[NODE_W-1 -: CLUSTER_W];
  endfunction

  function automatic logic [LNODE_W-1:0] lnode_of(logic [NODE_W-1:0] node);
    return node[LNODE_W-1:0];
  endfunction

  // Build a START-family message to the frame slot <node, fba, off, disp>
  function automatic msg_t mk_start(mt_e mt, logic [NODE_W-1:0] node,
                                    logic [FBA_W-1:0] fba, logic [OFF_W-1:0] off,
                                    logic [DISP_W-1:0] disp, logic [WORD_W-1:0] val);
    msg_t m;
    m = '0;
    m.hdr.node = node;
    m.hdr.fba  = fba;
    m.hdr.mt   = mt;
    m.hdr.s    = (mt == MT_STARTN) ? 4'd0 : 4'd1;
    m.hdr.off  = off;
    m.hdr.disp = disp;
    m.w[0]     = val;
    return m;
  endfunction

endpackage
