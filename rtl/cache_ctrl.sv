// cache_ctrl: cache controller of one processor in the directory protocol.
//
// The cache is direct mapped: block b lives in frame b % NFRAMES, which
// holds a tag, a state and the block's data. A block whose frame holds
// another block is in state I. A miss first evicts the frame's current
// block through cache_repl (an Owner copy is written back with DOxMR in the
// same cycle as the new request), then reserves the frame for the missing
// block, as the protocol does. The processor can also evict a block
// explicitly with OP_REPL. Each frame has one of nine states:
// I, S, O (stable), RMP, WMP, WHP (a request of this cache is outstanding)
// and TxOI, TxSI, TxOS (an outstanding request was overtaken by an
// invalidation or an update request from memory, so the frame must give the
// block up again as soon as it arrives). The transitions and reply messages
// are those of the protocol's cache state-transition table; a message that
// the table marks as an error raises proto_err for one cycle and leaves the
// frame unchanged.
//
// The processor is blocking: after a miss it waits, so at most one access is
// outstanding and its block, word and write data are kept in the pend_*
// registers until the block or ownership arrives.
//
// Timing: one event per cycle. A received message has priority over a new
// processor request. Either is taken only when the sending channel has room
// for two messages (a few events answer with a pair, e.g. SAck then ReqOC).
// A hit or a replacement is answered one cycle after it is accepted
// (p_resp_valid, with p_resp_rdata for reads); a miss is answered one cycle
// after the completing message is consumed.
module cache_ctrl
  import coh_pkg::*;
#(
  parameter int unsigned NFRAMES = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  // processor side
  input  logic    p_req_valid,
  input  op_e     p_req_op,
  input  blkno_t  p_req_blk,
  input  wordno_t p_req_word,
  input  word_t   p_req_wdata,
  output logic    p_req_ready,
  output logic    p_resp_valid,
  output word_t   p_resp_rdata,
  // receiving channel (memory to cache)
  input  logic    rx_valid,
  input  msg_t    rx_msg,
  output logic    rx_ready,
  // sending channel (cache to memory)
  output logic [1:0] tx_valid,
  output msg_t    tx_msg [2],
  input  logic    tx_room2,
  // status
  output logic    proto_err,
  output cstate_e st_o [NBLK]
);

  localparam int unsigned FW = (NFRAMES > 1) ? $clog2(NFRAMES) : 1;
  typedef logic [FW-1:0] frame_t;

  cstate_e st  [NFRAMES];
  blkno_t  tag [NFRAMES];
  block_t  mem [NFRAMES];

  function automatic frame_t frame_of(blkno_t blk);
    return frame_t'(int'(blk) % NFRAMES);
  endfunction

  logic    pend_valid;
  blkno_t  pend_blk;
  wordno_t pend_word;
  word_t   pend_wdata;

  logic do_msg, do_req;
  assign do_msg      = rx_valid && tx_room2;
  assign do_req      = !do_msg && p_req_valid && !pend_valid && tx_room2;
  assign rx_ready    = do_msg;
  assign p_req_ready = !(rx_valid && tx_room2) && !pend_valid && tx_room2;

  // Replacement of the block held in the requested block's frame.
  frame_t  rf;
  cstate_e rp_st;
  logic    rp_send, rp_bad;
  msg_t    rp_msg;
  assign rf = frame_of(p_req_blk);
  cache_repl u_repl (
    .st       (st[rf]),
    .blk      (tag[rf]),
    .data     (mem[rf]),
    .st_next  (rp_st),
    .send     (rp_send),
    .msg      (rp_msg),
    .bad_state(rp_bad)
  );

  // Next-state logic for the one frame touched this cycle.
  blkno_t  b;
  frame_t  f;
  logic    present, wr_st, victim;
  cstate_e s, ns;
  block_t  d, nd, dw, mw;
  logic    upd;
  logic    resp_v, set_pend, clr_pend, err;
  word_t   resp_d;

  always_comb begin
    b        = do_msg ? rx_msg.blk : p_req_blk;
    f        = frame_of(b);
    present  = (tag[f] == b);
    s        = present ? st[f] : C_I;
    d        = mem[f];
    wr_st    = present;
    victim   = 1'b0;
    ns       = s;
    nd       = d;
    upd      = 1'b0;
    resp_v   = 1'b0;
    resp_d   = '0;
    set_pend = 1'b0;
    clr_pend = 1'b0;
    err      = 1'b0;
    tx_valid = 2'b00;
    tx_msg[0] = mk_msg(MSG_NONE, b, '0);
    tx_msg[1] = mk_msg(MSG_NONE, b, '0);
    // the held copy, and the arriving block, with the pending store applied
    dw = d;
    dw[pend_word] = pend_wdata;
    mw = rx_msg.data;
    mw[pend_word] = pend_wdata;

    if (do_msg) begin
      unique case (rx_msg.kind)
        MSG_INV: unique case (s)
          C_I:         begin tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_IACK, b, '0); end
          C_S:         begin ns = C_I; tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_IACK, b, '0); end
          C_RMP:       ns = C_TXSI;
          C_WMP:       begin tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_IACK, b, '0); end
          C_WHP:       begin ns = C_WMP; tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_IACK, b, '0); end
          default:     err = 1'b1;
        endcase
        MSG_INVO: unique case (s)
          C_I, C_RMP:  begin tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_SACK, b, '0); end
          C_O:         begin ns = C_I; tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_DOXMU, b, d); end
          C_WMP, C_WHP: ns = C_TXOI;
          default:     err = 1'b1;
        endcase
        MSG_UPDM: unique case (s)
          C_I, C_RMP:  begin tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_SACK, b, '0); end
          C_O:         begin ns = C_S; tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_DXM, b, d); end
          C_WMP, C_WHP: ns = C_TXOS;
          default:     err = 1'b1;
        endcase
        MSG_OSHIP: unique case (s)
          C_WHP:  begin ns = C_O; nd = dw; upd = 1'b1; resp_v = 1'b1; clr_pend = 1'b1; end
          C_TXOI: begin
            ns = C_I; nd = dw; upd = 1'b1; resp_v = 1'b1; clr_pend = 1'b1;
            tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_DOXMU, b, dw);
          end
          C_TXOS: begin
            ns = C_S; nd = dw; upd = 1'b1; resp_v = 1'b1; clr_pend = 1'b1;
            tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_DXM, b, dw);
          end
          default: err = 1'b1;
        endcase
        MSG_DATA: unique case (s)
          C_RMP: begin
            ns = C_S; nd = rx_msg.data; upd = 1'b1; clr_pend = 1'b1;
            resp_v = 1'b1; resp_d = rx_msg.data[pend_word];
          end
          C_WMP: begin ns = C_O; nd = mw; upd = 1'b1; resp_v = 1'b1; clr_pend = 1'b1; end
          C_TXOI: begin
            ns = C_I; nd = mw; upd = 1'b1; resp_v = 1'b1; clr_pend = 1'b1;
            tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_DOXMU, b, mw);
          end
          C_TXSI: begin
            ns = C_I; nd = rx_msg.data; upd = 1'b1; clr_pend = 1'b1;
            resp_v = 1'b1; resp_d = rx_msg.data[pend_word];
            tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_IACK, b, '0);
          end
          C_TXOS: begin
            ns = C_S; nd = mw; upd = 1'b1; resp_v = 1'b1; clr_pend = 1'b1;
            tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_DXM, b, mw);
          end
          default: err = 1'b1;
        endcase
        MSG_NACK: unique case (s)
          C_RMP:  begin tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_REQSC, b, '0); end
          C_WMP:  begin tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_REQOC, b, '0); end
          C_WHP:  begin tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_REQO,  b, '0); end
          C_TXOI, C_TXOS: begin
            ns = C_WMP; tx_valid = 2'b11;
            tx_msg[0] = mk_msg(MSG_SACK, b, '0);
            tx_msg[1] = mk_msg(MSG_REQOC, b, '0);
          end
          C_TXSI: begin
            ns = C_RMP; tx_valid = 2'b11;
            tx_msg[0] = mk_msg(MSG_IACK, b, '0);
            tx_msg[1] = mk_msg(MSG_REQSC, b, '0);
          end
          default: err = 1'b1;
        endcase
        default: err = 1'b1;   // a cache-to-memory kind on the receiving channel
      endcase
      if (err) ns = s;
    end else if (do_req) begin
      unique case (p_req_op)
        OP_READ: unique case (s)
          C_O, C_S: begin resp_v = 1'b1; resp_d = d[p_req_word]; end
          C_I:      begin ns = C_RMP; set_pend = 1'b1; victim = 1'b1;
                          tx_msg[1] = mk_msg(MSG_REQSC, b, '0); end
          default:  err = 1'b1;
        endcase
        OP_WRITE: unique case (s)
          C_O:      begin nd[p_req_word] = p_req_wdata; upd = 1'b1; resp_v = 1'b1; end
          C_S:      begin ns = C_WHP; set_pend = 1'b1;
                          tx_valid = 2'b01; tx_msg[0] = mk_msg(MSG_REQO, b, '0); end
          C_I:      begin ns = C_WMP; set_pend = 1'b1; victim = 1'b1;
                          tx_msg[1] = mk_msg(MSG_REQOC, b, '0); end
          default:  err = 1'b1;
        endcase
        OP_REPL: begin
          resp_v = 1'b1;
          if (present) begin
            ns = rp_st; err = rp_bad;
            tx_valid = {1'b0, rp_send}; tx_msg[0] = rp_msg;
          end
        end
        default: err = 1'b1;
      endcase
      if (victim) begin
        // the frame's current block is evicted, then the frame is reserved
        // for the missing block; the request goes out with the write-back
        wr_st = 1'b1;
        err   = rp_bad;
        if (rp_send) begin
          tx_valid = 2'b11; tx_msg[0] = rp_msg;
        end else begin
          tx_valid = 2'b01; tx_msg[0] = tx_msg[1];
          tx_msg[1] = mk_msg(MSG_NONE, b, '0);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NFRAMES; k++) begin
        st[k]  <= C_I;
        tag[k] <= blkno_t'(k);
        mem[k] <= '0;
      end
      pend_valid   <= 1'b0;
      pend_blk     <= '0;
      pend_word    <= '0;
      pend_wdata   <= '0;
      p_resp_valid <= 1'b0;
      p_resp_rdata <= '0;
      proto_err    <= 1'b0;
    end else begin
      p_resp_valid <= resp_v;
      if (resp_v) p_resp_rdata <= resp_d;
      proto_err <= err;
      if ((do_msg || do_req) && wr_st && !err) begin
        st[f]  <= ns;
        tag[f] <= b;
        if (upd) mem[f] <= nd;
      end
      if (set_pend) begin
        pend_valid <= 1'b1;
        pend_blk   <= p_req_blk;
        pend_word  <= p_req_word;
        pend_wdata <= p_req_wdata;
      end else if (clr_pend) begin
        pend_valid <= 1'b0;
      end
    end
  end

  // per-block view: the frame's state if the frame holds the block, else I
  for (genvar g = 0; g < NBLK; g++) begin : g_st
    assign st_o[g] = (tag[g % NFRAMES] == blkno_t'(g)) ? st[g % NFRAMES] : C_I;
  end

  // Pending and transient states only ever belong to the outstanding access.
  a_pending_blk: assert property (@(posedge clk) disable iff (!rst_n)
    (do_msg && !(s inside {C_I, C_S, C_O})) |-> (pend_valid && rx_msg.blk == pend_blk));

endmodule
