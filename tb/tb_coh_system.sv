// tb_coh_system: end-to-end test of the whole coherent memory system at its
// default size (five processors).
//
// Every processor runs a random program of reads, writes and replacements,
// concentrated on block 0 so that requests collide and the interconnect's
// reordering produces the protocol's races. Each write stores a value that
// is unique in the whole run. A read must return the newest value of its
// word at some moment between its issue and its completion; the testbench
// keeps that set of acceptable values per outstanding read. Hits must be
// answered one cycle after they are accepted. At the end the system is
// drained, every word is read back and compared with the last value
// written. Every access must complete within 5000 cycles, so a request
// that is retried forever is caught. The testbench also checks that each
// protocol mechanism occurred: all three transient cache states, NAck
// retries, each locked directory state, both synchronisation states, the
// rejected ReqO of a cache that lost its copy, the ReqOC of the recorded
// owner, invalidations of stale presence bits, write-backs on replacement
// and on misses that evict a modified block, and processor stalls on misses.
module tb_coh_system;
  import coh_pkg::*;

  localparam int unsigned NP   = 5;     // the top's default NPROC
  localparam int          NOPS = 12000;  // accesses per processor

  logic    clk = 0, rst_n = 0;
  logic    p_req_valid [NP];
  op_e     p_req_op    [NP];
  blkno_t  p_req_blk   [NP];
  wordno_t p_req_word  [NP];
  word_t   p_req_wdata [NP];
  logic    p_req_ready [NP];
  logic    p_resp_valid[NP];
  word_t   p_resp_rdata[NP];
  logic    proto_err;

  coh_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // newest value of every word, and the values a pending read may return
  word_t cur [NBLK][WORDS];
  cstate_e cst [NP][NBLK];   // every cache's frame states
  word_t ok_vals [NP][$];
  bit    rd_pending [NP];
  blkno_t rd_blk [NP];
  wordno_t rd_word [NP];
  int    done_cnt = 0;
  int    max_wait = 0;
  int    n_read = 0, n_write = 0, n_repl = 0, n_hit = 0, n_stall = 0;

  task automatic note_write(int blk, int w, word_t v);
    cur[blk][w] = v;
    for (int q = 0; q < NP; q++)
      if (rd_pending[q] && rd_blk[q] == blk && rd_word[q] == w) ok_vals[q].push_back(v);
  endtask

  // one access by processor p; returns the read data
  task automatic access(int p, op_e op, int blk, int w, word_t wd, output word_t rdata);
    int waited;
    bit hit;
    @(negedge clk);
    p_req_valid[p] = 1; p_req_op[p] = op; p_req_blk[p] = blkno_t'(blk);
    p_req_word[p] = wordno_t'(w); p_req_wdata[p] = wd;
    if (op == OP_READ) begin
      rd_pending[p] = 1; rd_blk[p] = blkno_t'(blk); rd_word[p] = wordno_t'(w);
      ok_vals[p].delete();
      ok_vals[p].push_back(cur[blk][w]);
    end
    #1;
    while (!p_req_ready[p]) begin
      @(negedge clk);
      #1;
    end
    hit = (op == OP_REPL) ||
          (op == OP_READ  && cst[p][blk] inside {C_S, C_O}) ||
          (op == OP_WRITE && cst[p][blk] == C_O);
    @(posedge clk);
    #1;
    p_req_valid[p] = 0;
    waited = 0;
    while (!p_resp_valid[p]) begin
      @(posedge clk);
      #1;
      waited++;
    end
    check(waited < 5000, "access completes (no livelock)");
    if (waited > max_wait) max_wait = waited;
    if (hit) begin
      check(waited == 0, "hit answered in one cycle");
      if (op != OP_REPL) n_hit++;
    end else begin
      n_stall++;
    end
    rdata = p_resp_rdata[p];
    if (op == OP_WRITE) note_write(blk, w, wd);
    if (op == OP_READ) begin
      bit found = 0;
      foreach (ok_vals[p][k]) if (ok_vals[p][k] == rdata) found = 1;
      check(found, "read returns a current value");
      rd_pending[p] = 0;
    end
  endtask

  for (genvar p = 0; p < NP; p++) begin : g_proc
    initial begin
      word_t rdata;
      p_req_valid[p] = 0; p_req_op[p] = OP_READ; p_req_blk[p] = '0;
      p_req_word[p] = '0; p_req_wdata[p] = '0;
      rd_pending[p] = 0;
      @(posedge rst_n);
      repeat (p) @(posedge clk);
      for (int n = 0; n < NOPS; n++) begin
        int r, blk, w;
        op_e op;
        r   = $urandom_range(0, 99);
        op  = (r < 45) ? OP_READ : (r < 85) ? OP_WRITE : OP_REPL;
        blk = ($urandom_range(0, 9) < 6) ? 0 : $urandom_range(0, NBLK - 1);
        w   = $urandom_range(0, WORDS - 1);
        access(p, op, blk, w, word_t'((p + 1) << 24 | n << 4 | w), rdata);
        if (op == OP_READ) n_read++; else if (op == OP_WRITE) n_write++; else n_repl++;
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(posedge clk);
      end
      done_cnt++;
    end
  end

  // mechanism counters, sampled on the clock
  int c_txoi = 0, c_txsi = 0, c_txos = 0, c_nack = 0, c_stale_inv = 0, c_doxmr = 0, c_evict = 0;
  int c_xdata = 0, c_xown = 0, c_xownc = 0, c_sync1 = 0, c_sync2 = 0;
  int c_ghost = 0, c_ownreq = 0;

  for (genvar p = 0; p < NP; p++) begin : g_mon
    cstate_e prev [NBLK];
    for (genvar k = 0; k < NBLK; k++) begin : g_st
      assign cst[p][k] = dut.g_bm[p].st[k];
    end
    always @(posedge clk) if (rst_n) begin
      for (int k = 0; k < NBLK; k++) begin
        if (dut.g_bm[p].st[k] != prev[k]) begin
          if (dut.g_bm[p].st[k] == C_TXOI) c_txoi++;
          if (dut.g_bm[p].st[k] == C_TXSI) c_txsi++;
          if (dut.g_bm[p].st[k] == C_TXOS) c_txos++;
        end
        prev[k] = dut.g_bm[p].st[k];
      end
      if (dut.g_bm[p].c_rx_valid && dut.g_bm[p].c_rx_ready) begin
        if (dut.g_bm[p].c_rx_msg.kind == MSG_NACK) c_nack++;
        if (dut.g_bm[p].c_rx_msg.kind == MSG_INV &&
            dut.g_bm[p].st[dut.g_bm[p].c_rx_msg.blk] == C_I) c_stale_inv++;
      end
      if (dut.g_bm[p].c_tx_valid[0] && dut.g_bm[p].c_tx_msg[0].kind == MSG_DOXMR) c_doxmr++;
      // a miss that evicts a modified block sends the write-back with the request
      if (dut.g_bm[p].c_tx_valid == 2'b11 && dut.g_bm[p].c_tx_msg[0].kind == MSG_DOXMR) c_evict++;
    end
  end

  dstate_e dprev [NBLK];
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NBLK; k++) begin
      if (dut.dstate[k] != dprev[k]) begin
        case (dut.dstate[k])
          D_XDATA: c_xdata++;
          D_XOWN:  c_xown++;
          D_XOWNC: c_xownc++;
          D_SYNC1: c_sync1++;
          D_SYNC2: c_sync2++;
          default: ;
        endcase
      end
      dprev[k] = dut.dstate[k];
    end
    if (dut.u_dir.go && dut.u_dir.ds == D_FREE) begin
      if (dut.u_dir.m.kind == MSG_REQO && !dut.u_dir.pr[dut.u_dir.src]) c_ghost++;
      if (dut.u_dir.m.kind == MSG_REQOC && dut.u_dir.dt && dut.u_dir.owner == dut.u_dir.src)
        c_ownreq++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d processors finished", done_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBLK; b++) for (int w = 0; w < WORDS; w++) cur[b][w] = '0;
    for (int k = 0; k < NBLK; k++) dprev[k] = D_FREE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == NP);
    // drain: every directory entry free, every channel empty
    repeat (200) @(posedge clk);
    for (int k = 0; k < NBLK; k++) check(dut.dstate[k] == D_FREE, "directory idle at end");
    // read everything back through processor 0, then through the last one
    for (int b = 0; b < NBLK; b++)
      for (int w = 0; w < WORDS; w++) begin
        word_t v;
        access(0, OP_READ, b, w, '0, v);
        check(v == cur[b][w], "final value of every word");
        access(NP - 1, OP_READ, b, w, '0, v);
        check(v == cur[b][w], "final value seen by another processor");
      end
    check(!proto_err, "no unspecified message reception");
    $display("reads=%0d writes=%0d repl=%0d hits=%0d stalls=%0d max_wait=%0d", n_read, n_write, n_repl, n_hit, n_stall, max_wait);
    $display("TxOI=%0d TxSI=%0d TxOS=%0d NAck=%0d staleInv=%0d DOxMR=%0d evictOnMiss=%0d",
             c_txoi, c_txsi, c_txos, c_nack, c_stale_inv, c_doxmr, c_evict);
    $display("XData=%0d XOwn=%0d XOwnC=%0d Synch1=%0d Synch2=%0d ghostReqO=%0d ownerReqOC=%0d",
             c_xdata, c_xown, c_xownc, c_sync1, c_sync2, c_ghost, c_ownreq);
    check(c_txoi > 0, "TxOI occurred");
    check(c_txsi > 0, "TxSI occurred");
    check(c_txos > 0, "TxOS occurred");
    check(c_nack > 0, "NAck retry occurred");
    check(c_stale_inv > 0, "stale invalidation occurred");
    check(c_doxmr > 0, "replacement write-back occurred");
    check(c_evict > 0, "miss evicted a modified block");
    check(c_xdata > 0, "XData occurred");
    check(c_xown > 0, "XOwn occurred");
    check(c_xownc > 0, "XOwnC occurred");
    check(c_sync1 > 0, "Synch1 occurred");
    check(c_sync2 > 0, "Synch2 occurred");
    check(c_ghost > 0, "ghost ReqO rejected");
    check(c_ownreq > 0, "owner's ReqOC handled");
    check(n_stall > 0 && n_hit > 0, "stalls and hits occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
