// ts_pkg: shared types and constants of the timestamp snooping address network.
//
// An address transaction carries no explicit timestamp. Its ordering time (OT)
// is implicit: the only timing field is the slack, the extra logical time the
// transaction still has before it must reach its furthest destination. Switches
// and endpoints rewrite the slack as the transaction moves past tokens, which
// keeps the OT invariant. Ties between equal OTs are broken by source ID.
//
// System size (16 nodes, 4x4 torus), 64-byte blocks within a 44-bit physical
// address, 64 switch buffers, 128 endpoint buffers and 8 outstanding
// transactions per processor follow the published design. The field widths,
// the request encoding and the port numbering are this design's own choices.
package ts_pkg;

  // ---- system size -------------------------------------------------------
  localparam int unsigned NODES     = 16;           // processor/memory nodes
  localparam int unsigned TORUS_K   = 4;            // 4x4 torus
  localparam int unsigned SRC_W     = $clog2(NODES);

  // ---- addresses ---------------------------------------------------------
  localparam int unsigned PADDR_W   = 44;           // physical address bits
  localparam int unsigned BLOCK_B   = 64;           // block size in bytes
  localparam int unsigned BLK_W     = PADDR_W - $clog2(BLOCK_B); // 38

  // ---- logical time ------------------------------------------------------
  localparam int unsigned SLACK_W   = 6;            // slack field width
  localparam int unsigned TOK_W     = 4;            // token counter width
  localparam int unsigned DD_W      = 3;            // Delta-D field width
  localparam int unsigned INIT_TOKENS = 1;          // tokens on each input at reset

  // ---- switch ports of the torus -----------------------------------------
  localparam int unsigned NPORTS    = 5;
  localparam int unsigned P_LOCAL   = 0;            // to/from the node
  localparam int unsigned P_EAST    = 1;            // +x
  localparam int unsigned P_WEST    = 2;            // -x
  localparam int unsigned P_NORTH   = 3;            // +y
  localparam int unsigned P_SOUTH   = 4;            // -y

  // ---- coherence requests (MSI with a memory owner bit) -------------------
  typedef enum logic [1:0] {
    REQ_GETS = 2'd0,   // get a shared copy
    REQ_GETM = 2'd1,   // get a modified copy
    REQ_PUTM = 2'd2    // write back a modified copy
  } req_e;

  typedef logic [SLACK_W-1:0] slack_t;
  typedef logic [SRC_W-1:0]   node_id_t;
  typedef logic [BLK_W-1:0]   blk_t;

  // An address transaction as it travels on a link.
  typedef struct packed {
    slack_t   slack;
    node_id_t src;
    req_e     kind;
    blk_t     blk;
  } addr_txn_t;

  // The ordered transaction as delivered to the coherence controllers.
  typedef struct packed {
    node_id_t src;
    req_e     kind;
    blk_t     blk;
  } ord_txn_t;

endpackage
