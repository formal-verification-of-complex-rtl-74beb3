// coh_pkg: types and constants shared by the directory-based coherence system.
//
// The protocol is a write-invalidate, full-map directory protocol for an
// interconnect that may reorder messages. Every message carries a kind, the
// number of the block it concerns and a whole block of data (meaningful only
// for the kinds that move data: Data, DxM, DOxMR, DOxMU). The sender's or
// receiver's cache index is not part of the message: each cache has its own
// pair of channels, so the channel a message travels on identifies the cache.
//
// The message kinds and the cache and directory state names follow the
// protocol specification. The encodings, the block count, the block size and
// the word width are choices of this design (the specification tracks one
// abstract block and gives no sizes).
package coh_pkg;

  // Sizes of the shared memory image: NBLK blocks of WORDS words of DATA_W bits.
  localparam int unsigned NBLK   = 4;
  localparam int unsigned WORDS  = 4;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned BLK_W  = (NBLK  > 1) ? $clog2(NBLK)  : 1;
  localparam int unsigned WORD_W = (WORDS > 1) ? $clog2(WORDS) : 1;

  typedef logic [DATA_W-1:0]             word_t;
  typedef logic [WORDS-1:0][DATA_W-1:0]  block_t;
  typedef logic [BLK_W-1:0]              blkno_t;
  typedef logic [WORD_W-1:0]             wordno_t;

  // Coherence messages. Memory-to-cache kinds first, then cache-to-memory.
  typedef enum logic [3:0] {
    MSG_NONE  = 4'd0,
    MSG_INV   = 4'd1,   // invalidate the local copy
    MSG_INVO  = 4'd2,   // invalidate the local copy and write it back
    MSG_UPDM  = 4'd3,   // write the copy back and keep it Shared
    MSG_OSHIP = 4'd4,   // ownership grant (no data)
    MSG_DATA  = 4'd5,   // block supplied by memory
    MSG_NACK  = 4'd6,   // request rejected, directory entry locked
    MSG_REQSC = 4'd7,   // request a Shared copy
    MSG_REQO  = 4'd8,   // request ownership of a Shared copy held
    MSG_REQOC = 4'd9,   // request ownership and the block
    MSG_DXM   = 4'd10,  // block from the owner in answer to UpdM
    MSG_DOXMR = 4'd11,  // block from the owner after a replacement
    MSG_DOXMU = 4'd12,  // block from the owner in answer to InvO
    MSG_IACK  = 4'd13,  // invalidation done
    MSG_SACK  = 4'd14   // synchronisation message
  } msg_kind_e;

  typedef struct packed {
    msg_kind_e kind;
    blkno_t    blk;
    block_t    data;
  } msg_t;

  // Cache block-frame states: three stable, three pending, three transient.
  typedef enum logic [3:0] {
    C_I    = 4'd0,
    C_S    = 4'd1,
    C_O    = 4'd2,
    C_RMP  = 4'd3,
    C_WMP  = 4'd4,
    C_WHP  = 4'd5,
    C_TXOI = 4'd6,
    C_TXSI = 4'd7,
    C_TXOS = 4'd8
  } cstate_e;

  // Directory entry states: Free (unlocked) and the five locked states.
  typedef enum logic [2:0] {
    D_FREE  = 3'd0,
    D_XDATA = 3'd1,
    D_XOWN  = 3'd2,
    D_XOWNC = 3'd3,
    D_SYNC1 = 3'd4,
    D_SYNC2 = 3'd5
  } dstate_e;

  // Processor operations. REPL evicts the block from the cache.
  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_REPL  = 2'd2
  } op_e;

  function automatic msg_t mk_msg(msg_kind_e k, blkno_t b, block_t d);
    msg_t m;
    m.kind = k;
    m.blk  = b;
    m.data = d;
    return m;
  endfunction

endpackage
