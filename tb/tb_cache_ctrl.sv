// tb_cache_ctrl: random test of the cache controller against a reference
// copy of the cache state-transition table kept in this testbench.
//
// The cache has two frames for four blocks, so misses also evict the block
// that holds the frame. Each cycle the testbench offers, at random, a memory-to-cache message
// (any kind, for any block, including kinds the table calls errors), a
// processor request when the processor is free, and sometimes no room on
// the sending channel. The reference predicts the next frame state, the
// reply messages with their data, the processor response and the error
// flag, and every output is compared. A hit must be answered exactly one
// cycle after it is accepted.
module tb_cache_ctrl;
  import coh_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    p_req_valid, p_req_ready, p_resp_valid;
  op_e     p_req_op;
  blkno_t  p_req_blk;
  wordno_t p_req_word;
  word_t   p_req_wdata, p_resp_rdata;
  logic    rx_valid, rx_ready, tx_room2, proto_err;
  msg_t    rx_msg;
  logic [1:0] tx_valid;
  msg_t    tx_msg [2];
  cstate_e st_o [NBLK];

  localparam int unsigned NF = 2;   // frames, the controller's default
  cache_ctrl #(.NFRAMES(NF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state
  cstate_e rs [NBLK];     // per-block view: I when the block is not cached
  blkno_t  rtag [NF];     // which block each frame was last given to
  block_t  rd [NBLK];     // contents of each frame (entries 0..NF-1 used)
  bit      busy;
  blkno_t  pb;
  wordno_t pw;
  word_t   pd;
  int      cover_st [9];
  int      err_seen = 0, pair_seen = 0, hits = 0, backpress = 0, evict_wb = 0, evict_s = 0;

  // Expected outcome of one event.
  typedef struct {
    cstate_e   ns;
    msg_kind_e m0, m1;   // MSG_NONE when absent
    bit        m0_data;  // reply carries the frame contents
    bit        fill;     // frame takes the arriving block
    bit        store;    // pending store is performed
    bit        done;     // pending access completes
    bit        err;
  } expect_t;

  function automatic expect_t ref_msg(cstate_e s, msg_kind_e k);
    expect_t e;
    e = '{ns: s, m0: MSG_NONE, m1: MSG_NONE, m0_data: 0, fill: 0, store: 0, done: 0, err: 0};
    case ({s, k})
      {C_I,   MSG_INV}:   e.m0 = MSG_IACK;
      {C_S,   MSG_INV}:   begin e.ns = C_I; e.m0 = MSG_IACK; end
      {C_RMP, MSG_INV}:   e.ns = C_TXSI;
      {C_WMP, MSG_INV}:   e.m0 = MSG_IACK;
      {C_WHP, MSG_INV}:   begin e.ns = C_WMP; e.m0 = MSG_IACK; end
      {C_I,   MSG_INVO}, {C_RMP, MSG_INVO},
      {C_I,   MSG_UPDM}, {C_RMP, MSG_UPDM}: e.m0 = MSG_SACK;
      {C_O,   MSG_INVO}:  begin e.ns = C_I; e.m0 = MSG_DOXMU; e.m0_data = 1; end
      {C_O,   MSG_UPDM}:  begin e.ns = C_S; e.m0 = MSG_DXM;   e.m0_data = 1; end
      {C_WMP, MSG_INVO}, {C_WHP, MSG_INVO}: e.ns = C_TXOI;
      {C_WMP, MSG_UPDM}, {C_WHP, MSG_UPDM}: e.ns = C_TXOS;
      {C_WHP, MSG_OSHIP}: begin e.ns = C_O; e.store = 1; e.done = 1; end
      {C_TXOI, MSG_OSHIP}: begin e.ns = C_I; e.store = 1; e.done = 1; e.m0 = MSG_DOXMU; e.m0_data = 1; end
      {C_TXOS, MSG_OSHIP}: begin e.ns = C_S; e.store = 1; e.done = 1; e.m0 = MSG_DXM; e.m0_data = 1; end
      {C_RMP, MSG_DATA}:  begin e.ns = C_S; e.fill = 1; e.done = 1; end
      {C_WMP, MSG_DATA}:  begin e.ns = C_O; e.fill = 1; e.store = 1; e.done = 1; end
      {C_TXOI, MSG_DATA}: begin e.ns = C_I; e.fill = 1; e.store = 1; e.done = 1; e.m0 = MSG_DOXMU; e.m0_data = 1; end
      {C_TXSI, MSG_DATA}: begin e.ns = C_I; e.fill = 1; e.done = 1; e.m0 = MSG_IACK; end
      {C_TXOS, MSG_DATA}: begin e.ns = C_S; e.fill = 1; e.store = 1; e.done = 1; e.m0 = MSG_DXM; e.m0_data = 1; end
      {C_RMP, MSG_NACK}:  e.m0 = MSG_REQSC;
      {C_WMP, MSG_NACK}:  e.m0 = MSG_REQOC;
      {C_WHP, MSG_NACK}:  e.m0 = MSG_REQO;
      {C_TXOI, MSG_NACK}, {C_TXOS, MSG_NACK}: begin e.ns = C_WMP; e.m0 = MSG_SACK; e.m1 = MSG_REQOC; end
      {C_TXSI, MSG_NACK}: begin e.ns = C_RMP; e.m0 = MSG_IACK; e.m1 = MSG_REQSC; end
      default: e.err = 1;
    endcase
    return e;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive on the falling edge, check on the rising edge
  initial begin
    p_req_valid = 0; p_req_op = OP_READ; p_req_blk = '0; p_req_word = '0; p_req_wdata = '0;
    rx_valid = 0; rx_msg = '0; tx_room2 = 1;
    for (int k = 0; k < NBLK; k++) begin rs[k] = C_I; rd[k] = '0; end
    for (int k = 0; k < NF; k++) rtag[k] = blkno_t'(k);
    busy = 0;
    foreach (cover_st[k]) cover_st[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      expect_t e;
      bit      take_msg, take_req, exp_resp, exp_read;
      word_t   exp_rdata;
      block_t  cur, arriving;
      blkno_t  b;
      msg_kind_e exp0, exp1;
      block_t  exp0_data;
      blkno_t  exp0_blk;

      @(negedge clk);
      tx_room2 = ($urandom_range(0, 9) != 0);
      // message: mostly ones that make sense for the pending block
      rx_valid = ($urandom_range(0, 2) == 0);
      rx_msg.kind = msg_kind_e'($urandom_range(1, 6));
      if ($urandom_range(0, 60) == 0) rx_msg.kind = msg_kind_e'($urandom_range(7, 14));
      rx_msg.blk  = busy && $urandom_range(0, 3) != 0 ? pb : blkno_t'($urandom);
      if (!(rs[rx_msg.blk] inside {C_I, C_S, C_O}) && rx_msg.blk != pb) rx_msg.blk = pb;
      for (int w = 0; w < WORDS; w++) rx_msg.data[w] = $urandom;
      // processor request (kept stable until taken)
      if (!busy && !p_req_valid && $urandom_range(0, 1) == 0) begin
        p_req_valid = 1;
        p_req_op    = op_e'($urandom_range(0, 2));
        p_req_blk   = blkno_t'($urandom);
        p_req_word  = wordno_t'($urandom);
        p_req_wdata = $urandom;
      end
      #1;
      take_msg = rx_valid && tx_room2;
      take_req = !take_msg && p_req_valid && !busy && tx_room2;
      check(rx_ready == take_msg, "rx_ready");
      check(p_req_ready == (!take_msg && !busy && tx_room2), "p_req_ready");
      if (rx_valid && !tx_room2) backpress++;

      exp_resp = 0; exp_read = 0; exp_rdata = '0; exp0 = MSG_NONE; exp1 = MSG_NONE; exp0_data = '0;
      exp0_blk = '0;
      e = ref_msg(C_I, MSG_NONE);
      e.err = 0;
      if (take_msg) begin
        b = rx_msg.blk;
        exp0_blk = b;
        cur = rd[int'(b) % NF];
        arriving = rx_msg.data;
        e = ref_msg(rs[b], rx_msg.kind);
        if (!e.err) begin
          if (e.fill) cur = arriving;
          if (e.store) cur[pw] = pd;
          exp0 = e.m0; exp1 = e.m1;
          if (e.m0_data) exp0_data = cur;
          if (e.done) begin
            exp_resp = 1;
            // a read returns the word of the arriving block
            if (rs[b] inside {C_RMP, C_TXSI}) begin exp_rdata = arriving[pw]; exp_read = 1; end
            busy = 0;
          end
          if (e.fill || e.store) rd[int'(b) % NF] = cur;
          rs[b] = e.ns;
        end else begin
          err_seen++;
        end
      end else if (take_req) begin
        b = p_req_blk;
        exp0_blk = b;
        unique case (p_req_op)
          OP_READ:
            if (rs[b] inside {C_S, C_O}) begin
              exp_resp = 1; exp_read = 1; exp_rdata = rd[int'(b) % NF][p_req_word]; hits++;
            end else begin
              rs[b] = C_RMP; exp0 = MSG_REQSC; busy = 1;
            end
          OP_WRITE:
            if (rs[b] == C_O) begin
              rd[int'(b) % NF][p_req_word] = p_req_wdata; exp_resp = 1; hits++;
            end else if (rs[b] == C_S) begin
              rs[b] = C_WHP; exp0 = MSG_REQO; busy = 1;
            end else begin
              rs[b] = C_WMP; exp0 = MSG_REQOC; busy = 1;
            end
          default: begin
            if (rs[b] == C_O) begin exp0 = MSG_DOXMR; exp0_data = rd[int'(b) % NF]; end
            rs[b] = C_I; exp_resp = 1;
          end
        endcase
        if (busy) begin
          // a miss takes the block's frame from the block that holds it
          int     fr;
          blkno_t v;
          fr = int'(b) % NF;
          v  = rtag[fr];
          if (v != b && rs[v] == C_O) begin
            exp1 = exp0; exp0 = MSG_DOXMR; exp0_data = rd[int'(v) % NF]; exp0_blk = v;
            evict_wb++;
          end
          if (v != b && rs[v] == C_S) evict_s++;
          if (v != b) rs[v] = C_I;
          rtag[fr] = b;
          pb = b; pw = p_req_word; pd = p_req_wdata;
        end
      end
      // messages sent this cycle
      check(tx_valid[0] == (exp0 != MSG_NONE), "tx_valid[0]");
      check(tx_valid[1] == (exp1 != MSG_NONE), "tx_valid[1]");
      if (exp0 != MSG_NONE) begin
        check(tx_msg[0].kind == exp0 && tx_msg[0].blk == exp0_blk, "tx_msg[0] kind/blk");
        if (exp0 inside {MSG_DXM, MSG_DOXMU, MSG_DOXMR})
          check(tx_msg[0].data == exp0_data, "tx_msg[0] data");
      end
      if (exp1 != MSG_NONE) begin
        check(tx_msg[1].kind == exp1 && tx_msg[1].blk == b, "tx_msg[1] kind/blk");
        pair_seen++;
      end
      @(posedge clk);
      #1;
      if (take_req) p_req_valid = 0;
      check(p_resp_valid == exp_resp, "response pulse one cycle later");
      if (exp_read)
        check(p_resp_rdata == exp_rdata, "read data");
      check(proto_err == (take_msg && e.err), "error flag");
      for (int k = 0; k < NBLK; k++) begin
        check(st_o[k] == rs[k], "frame state");
        cover_st[rs[k]]++;
      end
    end
    for (int k = 0; k < 9; k++) check(cover_st[k] > 0, "every frame state visited");
    check(err_seen > 0 && pair_seen > 0 && hits > 0 && backpress > 0, "events covered");
    check(evict_wb > 0 && evict_s > 0, "misses evicted Owner and Shared blocks");
    $display("errors=%0d pairs=%0d hits=%0d backpressure=%0d evict_wb=%0d evict_s=%0d",
             err_seen, pair_seen, hits, backpress, evict_wb, evict_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
