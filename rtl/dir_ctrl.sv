// dir_ctrl: main memory, full-map directory and memory controller.
//
// For each of the NBLK blocks the directory keeps a presence bit per cache,
// a dirty bit (one cache owns a modified copy), the entry state and the index
// of the requester of the transaction in progress. The entry state is Free
// (unlocked) or one of the locked states XData (a Shared copy is being
// fetched from the owner), XOwn (ownership is being granted once all other
// copies are invalidated), XOwnC (same, with the block), Synch1 and Synch2
// (the owner's write-back after a replacement crossed a forwarded request;
// the entry waits for both the write-back DOxMR and the owner's SAck). A
// request that finds the entry locked is answered with NAck and retried by
// the cache. The transitions follow the protocol's memory-controller table,
// including two corrections the protocol makes to the basic scheme: a ReqO
// from a cache whose presence bit is clear is rejected (the cache has lost
// its copy and must ask again with ReqOC), and a ReqOC from the cache that
// the directory still records as owner goes straight to Synch1 to wait for
// that cache's write-back instead of sending it an InvO. Presence bits of
// clean copies are not cleared on replacement, so invalidations are also
// sent to caches that may no longer hold the block; they answer with IAck.
// A message the table does not expect in the entry's state raises proto_err
// for one cycle and leaves the entry unchanged.
//
// Timing: one message per cycle. The sending channels are served round
// robin, and a message is taken only when every receiving channel has a free
// slot, because one step can send an invalidation to every sharer at once.
// Replies are presented on rch_valid/rch_msg in the same cycle.
module dir_ctrl
  import coh_pkg::*;
#(
  parameter int unsigned NPROC = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // sending channels of the caches (cache to memory)
  input  logic [NPROC-1:0]  sch_valid,
  input  msg_t              sch_msg  [NPROC],
  output logic [NPROC-1:0]  sch_ready,
  // receiving channels of the caches (memory to cache)
  output logic [NPROC-1:0]  rch_valid,
  output msg_t              rch_msg  [NPROC],
  input  logic [NPROC-1:0]  rch_room,
  // status
  output logic              proto_err,
  output dstate_e           dstate_o [NBLK],
  output logic [NPROC-1:0]  pres_o   [NBLK],
  output logic [NBLK-1:0]   dirty_o,
  output block_t            mem_o    [NBLK]
);

  localparam int unsigned IDW = (NPROC > 1) ? $clog2(NPROC) : 1;
  typedef logic [IDW-1:0]   id_t;
  typedef logic [NPROC-1:0] vec_t;

  dstate_e   dstate [NBLK];
  vec_t      pres   [NBLK];
  logic      dirty  [NBLK];
  id_t       reqc   [NBLK];
  block_t    mem    [NBLK];
  id_t       rr;

  // Round-robin choice of the sending channel to serve.
  logic go;
  id_t  src;
  always_comb begin
    go  = 1'b0;
    src = '0;
    for (int unsigned k = 0; k < NPROC; k++) begin
      int unsigned idx;
      idx = (int'(rr) + k) % NPROC;
      if (!go && sch_valid[idx]) begin
        go  = 1'b1;
        src = id_t'(idx);
      end
    end
    go = go && (&rch_room);
  end

  always_comb begin
    sch_ready = '0;
    if (go) sch_ready[src] = 1'b1;
  end

  msg_t    m;
  blkno_t  b;
  dstate_e ds, nds;
  vec_t    pr, npr, others;
  logic    dt, ndt, upd_mem, err;
  id_t     rq, nrq, owner;
  block_t  md;

  always_comb begin
    m      = sch_msg[src];
    b      = m.blk;
    ds     = dstate[b];
    pr     = pres[b];
    dt     = dirty[b];
    rq     = reqc[b];
    md     = mem[b];
    nds    = ds;
    npr    = pr;
    ndt    = dt;
    nrq    = rq;
    upd_mem = 1'b0;
    err    = 1'b0;
    others = pr & ~(vec_t'(1) << src);
    owner  = '0;
    for (int k = NPROC - 1; k >= 0; k--) if (pr[k]) owner = id_t'(k);
    rch_valid = '0;
    for (int unsigned k = 0; k < NPROC; k++) rch_msg[k] = mk_msg(MSG_NONE, b, '0);

    if (go) begin
      if (ds == D_FREE) begin
        unique case (m.kind)
          MSG_REQSC:
            if (dt) begin
              nds = D_XDATA; nrq = src;
              rch_valid[owner] = 1'b1; rch_msg[owner] = mk_msg(MSG_UPDM, b, '0);
            end else begin
              npr[src] = 1'b1;
              rch_valid[src] = 1'b1; rch_msg[src] = mk_msg(MSG_DATA, b, md);
            end
          MSG_REQO:
            if (!pr[src]) begin
              rch_valid[src] = 1'b1; rch_msg[src] = mk_msg(MSG_NACK, b, '0);
            end else if (others == '0) begin
              ndt = 1'b1;
              rch_valid[src] = 1'b1; rch_msg[src] = mk_msg(MSG_OSHIP, b, '0);
            end else begin
              nds = D_XOWN; nrq = src;
              for (int unsigned k = 0; k < NPROC; k++)
                if (others[k]) begin
                  rch_valid[k] = 1'b1; rch_msg[k] = mk_msg(MSG_INV, b, '0);
                end
            end
          MSG_REQOC:
            if (dt && owner == src) begin
              // the requester's own write-back is still on its way
              nds = D_SYNC1; nrq = src;
            end else if (others == '0) begin
              ndt = 1'b1; npr[src] = 1'b1;
              rch_valid[src] = 1'b1; rch_msg[src] = mk_msg(MSG_DATA, b, md);
            end else if (dt) begin
              nds = D_XOWNC; nrq = src;
              rch_valid[owner] = 1'b1; rch_msg[owner] = mk_msg(MSG_INVO, b, '0);
            end else begin
              nds = D_XOWNC; nrq = src;
              for (int unsigned k = 0; k < NPROC; k++)
                if (others[k]) begin
                  rch_valid[k] = 1'b1; rch_msg[k] = mk_msg(MSG_INV, b, '0);
                end
            end
          MSG_DOXMR:
            if (dt && pr[src]) begin
              npr[src] = 1'b0; ndt = 1'b0; upd_mem = 1'b1;
            end else begin
              err = 1'b1;
            end
          default: err = 1'b1;
        endcase
      end else begin
        unique case (m.kind)
          MSG_REQSC, MSG_REQO, MSG_REQOC: begin
            rch_valid[src] = 1'b1; rch_msg[src] = mk_msg(MSG_NACK, b, '0);
          end
          MSG_DXM:
            if (ds == D_XDATA) begin
              ndt = 1'b0; upd_mem = 1'b1; npr[rq] = 1'b1; nds = D_FREE;
              rch_valid[rq] = 1'b1; rch_msg[rq] = mk_msg(MSG_DATA, b, m.data);
            end else begin
              err = 1'b1;
            end
          MSG_DOXMR, MSG_SACK:
            if (ds inside {D_XDATA, D_XOWNC, D_SYNC1, D_SYNC2}) begin
              npr[src] = 1'b0; ndt = 1'b0;
              upd_mem  = (m.kind == MSG_DOXMR);
              unique case (ds)
                D_XDATA: nds = D_SYNC2;
                D_XOWNC: nds = D_SYNC1;
                default: begin
                  // Synch1 / Synch2: both halves are in, complete the request
                  npr[rq] = 1'b1; nds = D_FREE;
                  ndt = (ds == D_SYNC1);
                  rch_valid[rq] = 1'b1;
                  rch_msg[rq] = mk_msg(MSG_DATA, b, (m.kind == MSG_DOXMR) ? m.data : md);
                end
              endcase
            end else begin
              err = 1'b1;
            end
          MSG_DOXMU:
            if (ds == D_XOWNC) begin
              upd_mem = 1'b1; npr[src] = 1'b0; npr[rq] = 1'b1; nds = D_FREE;
              rch_valid[rq] = 1'b1; rch_msg[rq] = mk_msg(MSG_DATA, b, m.data);
            end else begin
              err = 1'b1;
            end
          MSG_IACK:
            if (ds inside {D_XOWN, D_XOWNC}) begin
              npr[src] = 1'b0;
              if ((npr & ~(vec_t'(1) << rq)) == '0) begin
                ndt = 1'b1; npr[rq] = 1'b1; nds = D_FREE;
                rch_valid[rq] = 1'b1;
                rch_msg[rq] = (ds == D_XOWN) ? mk_msg(MSG_OSHIP, b, '0)
                                             : mk_msg(MSG_DATA, b, md);
              end
            end else begin
              err = 1'b1;
            end
          default: err = 1'b1;
        endcase
      end
      if (err) begin
        nds = ds; npr = pr; ndt = dt; nrq = rq; upd_mem = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NBLK; k++) begin
        dstate[k] <= D_FREE;
        pres[k]   <= '0;
        dirty[k]  <= 1'b0;
        reqc[k]   <= '0;
        mem[k]    <= '0;
      end
      rr        <= '0;
      proto_err <= 1'b0;
    end else begin
      proto_err <= err;
      if (go) begin
        dstate[b] <= nds;
        pres[b]   <= npr;
        dirty[b]  <= ndt;
        reqc[b]   <= nrq;
        if (upd_mem) mem[b] <= m.data;
        rr <= (int'(src) == NPROC - 1) ? '0 : id_t'(src + 1'b1);
      end
    end
  end

  for (genvar g = 0; g < NBLK; g++) begin : g_obs
    assign dstate_o[g] = dstate[g];
    assign pres_o[g]   = pres[g];
    assign dirty_o[g]  = dirty[g];
    assign mem_o[g]    = mem[g];
  end

  // A dirty block has exactly one presence bit set: its owner.
  for (genvar g = 0; g < NBLK; g++) begin : g_chk
    a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
      (dirty[g] && dstate[g] == D_FREE) |-> $onehot(pres[g]));
  end

endmodule
