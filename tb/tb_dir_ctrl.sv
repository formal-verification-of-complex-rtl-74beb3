// tb_dir_ctrl: directed scenarios for the memory controller and directory,
// each one a sequence of cache-to-memory messages with the replies and the
// directory contents worked out by hand from the memory-controller table:
// read misses served from memory and from an owner (XData), ownership
// upgrades with invalidations (XOwn), write misses (XOwnC) answered by an
// owner's DOxMU or by the sharers' IAcks, both synchronisation paths of an
// owner's write-back crossing a forwarded request (Synch1, Synch2, in both
// arrival orders), the rejected ReqO of a cache that lost its copy, the
// ReqOC of the recorded owner, NAck of requests to a locked entry,
// unspecified messages, back-pressure and round-robin service.
module tb_dir_ctrl;
  import coh_pkg::*;

  localparam int unsigned NP = 5;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] sch_valid, sch_ready, rch_valid, rch_room;
  msg_t          sch_msg [NP];
  msg_t          rch_msg [NP];
  logic          proto_err;
  dstate_e       dstate_o [NBLK];
  logic [NP-1:0] pres_o   [NBLK];
  logic [NBLK-1:0] dirty_o;
  block_t        mem_o    [NBLK];

  dir_ctrl #(.NPROC(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // replies seen in the last step
  logic [NP-1:0] got_v;
  msg_t          got_m [NP];
  logic          got_err, got_ready;

  task automatic step(int src, msg_kind_e k, int blk, block_t d);
    @(negedge clk);
    sch_valid = '0;
    sch_valid[src] = 1'b1;
    sch_msg[src] = mk_msg(k, blkno_t'(blk), d);
    #1;
    got_v = rch_valid;
    got_ready = sch_ready[src];
    for (int j = 0; j < NP; j++) got_m[j] = rch_msg[j];
    @(posedge clk);
    #1;
    got_err = proto_err;
    sch_valid = '0;
  endtask

  // exactly the caches in mask receive kind k (with data d when given)
  task automatic expect_out(logic [NP-1:0] mask, msg_kind_e k, bit chk_d, block_t d, string what);
    check(got_ready, {what, ": message taken"});
    check(got_v == mask, {what, ": reply destinations"});
    for (int j = 0; j < NP; j++)
      if (mask[j]) begin
        check(got_m[j].kind == k, {what, ": reply kind"});
        if (chk_d) check(got_m[j].data == d, {what, ": reply data"});
      end
    check(!got_err, {what, ": no error"});
  endtask

  task automatic expect_dir(int blk, dstate_e s, logic [NP-1:0] p, bit dt, string what);
    check(dstate_o[blk] == s, {what, ": entry state"});
    check(pres_o[blk] == p, {what, ": presence bits"});
    check(dirty_o[blk] == dt, {what, ": dirty bit"});
  endtask

  function automatic block_t pat(int n);
    block_t b;
    for (int w = 0; w < WORDS; w++) b[w] = word_t'(32'h1000_0000 * n + w * 17 + 5);
    return b;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sch_valid = '0; rch_room = '1;
    for (int j = 0; j < NP; j++) sch_msg[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // read misses served by memory
    step(0, MSG_REQSC, 0, '0); expect_out(5'b00001, MSG_DATA, 1, '0, "P0 read miss");
    step(1, MSG_REQSC, 0, '0); expect_out(5'b00010, MSG_DATA, 1, '0, "P1 read miss");
    expect_dir(0, D_FREE, 5'b00011, 0, "two sharers");
    // upgrade by P0: invalidate P1
    step(0, MSG_REQO, 0, '0);  expect_out(5'b00010, MSG_INV, 0, '0, "P0 upgrade");
    expect_dir(0, D_XOWN, 5'b00011, 0, "XOwn");
    step(2, MSG_REQSC, 0, '0); expect_out(5'b00100, MSG_NACK, 0, '0, "locked entry rejects");
    step(1, MSG_IACK, 0, '0);  expect_out(5'b00001, MSG_OSHIP, 0, '0, "ownership granted");
    expect_dir(0, D_FREE, 5'b00001, 1, "P0 owner");
    // read miss while owned: XData, owner answers DxM
    step(3, MSG_REQSC, 0, '0); expect_out(5'b00001, MSG_UPDM, 0, '0, "UpdM to owner");
    expect_dir(0, D_XDATA, 5'b00001, 1, "XData");
    step(0, MSG_DXM, 0, pat(1)); expect_out(5'b01000, MSG_DATA, 1, pat(1), "owner data forwarded");
    expect_dir(0, D_FREE, 5'b01001, 0, "owner now sharer");
    check(mem_o[0] == pat(1), "memory updated by DxM");
    // ReqO from a cache whose presence bit is clear (it lost its copy)
    step(2, MSG_REQO, 0, '0);  expect_out(5'b00100, MSG_NACK, 0, '0, "ghost ReqO rejected");
    expect_dir(0, D_FREE, 5'b01001, 0, "unchanged after ghost ReqO");
    // write miss on a shared block: invalidate both sharers at once
    step(2, MSG_REQOC, 0, '0); expect_out(5'b01001, MSG_INV, 0, '0, "write miss invalidates");
    expect_dir(0, D_XOWNC, 5'b01001, 0, "XOwnC");
    step(0, MSG_IACK, 0, '0);  expect_out(5'b00000, MSG_NONE, 0, '0, "first IAck");
    expect_dir(0, D_XOWNC, 5'b01000, 0, "still waiting");
    step(3, MSG_IACK, 0, '0);  expect_out(5'b00100, MSG_DATA, 1, pat(1), "last IAck grants");
    expect_dir(0, D_FREE, 5'b00100, 1, "P2 owner");
    // read miss while the owner's write-back is under way: SAck then DOxMR
    step(4, MSG_REQSC, 0, '0); expect_out(5'b00100, MSG_UPDM, 0, '0, "UpdM to P2");
    step(2, MSG_SACK, 0, '0);  expect_out(5'b00000, MSG_NONE, 0, '0, "SAck first");
    expect_dir(0, D_SYNC2, 5'b00000, 0, "Synch2");
    step(1, MSG_REQOC, 0, '0); expect_out(5'b00010, MSG_NACK, 0, '0, "Synch2 rejects requests");
    step(2, MSG_DOXMR, 0, pat(2)); expect_out(5'b10000, MSG_DATA, 1, pat(2), "write-back forwarded");
    expect_dir(0, D_FREE, 5'b10000, 0, "P4 sharer");
    check(mem_o[0] == pat(2), "memory updated by DOxMR");

    // block 1: DOxMR then SAck
    step(0, MSG_REQOC, 1, '0); expect_out(5'b00001, MSG_DATA, 1, '0, "blk1 write miss, no copies");
    expect_dir(1, D_FREE, 5'b00001, 1, "blk1 owned");
    step(1, MSG_REQSC, 1, '0); expect_out(5'b00001, MSG_UPDM, 0, '0, "blk1 UpdM");
    step(0, MSG_DOXMR, 1, pat(3)); expect_out(5'b00000, MSG_NONE, 0, '0, "blk1 write-back first");
    expect_dir(1, D_SYNC2, 5'b00000, 0, "blk1 Synch2");
    check(mem_o[1] == pat(3), "blk1 memory updated");
    step(0, MSG_SACK, 1, '0);  expect_out(5'b00010, MSG_DATA, 1, pat(3), "blk1 SAck completes");
    expect_dir(1, D_FREE, 5'b00010, 0, "blk1 P1 sharer");

    // block 2: write miss answered by the owner's DOxMU
    step(0, MSG_REQOC, 2, '0); expect_out(5'b00001, MSG_DATA, 1, '0, "blk2 P0 owner");
    step(1, MSG_REQOC, 2, '0); expect_out(5'b00001, MSG_INVO, 0, '0, "blk2 InvO to owner");
    expect_dir(2, D_XOWNC, 5'b00001, 1, "blk2 XOwnC");
    step(0, MSG_DOXMU, 2, pat(4)); expect_out(5'b00010, MSG_DATA, 1, pat(4), "blk2 DOxMU forwarded");
    expect_dir(2, D_FREE, 5'b00010, 1, "blk2 P1 owner");
    // write miss crossing a replacement: DOxMR, then SAck (Synch1)
    step(2, MSG_REQOC, 2, '0); expect_out(5'b00010, MSG_INVO, 0, '0, "blk2 InvO to P1");
    step(1, MSG_DOXMR, 2, pat(5)); expect_out(5'b00000, MSG_NONE, 0, '0, "blk2 write-back crosses");
    expect_dir(2, D_SYNC1, 5'b00000, 0, "blk2 Synch1");
    step(3, MSG_REQSC, 2, '0); expect_out(5'b01000, MSG_NACK, 0, '0, "Synch1 rejects");
    step(1, MSG_SACK, 2, '0);  expect_out(5'b00100, MSG_DATA, 1, pat(5), "blk2 Synch1 completes");
    expect_dir(2, D_FREE, 5'b00100, 1, "blk2 P2 owner");
    // SAck first, then DOxMR
    step(4, MSG_REQOC, 2, '0); expect_out(5'b00100, MSG_INVO, 0, '0, "blk2 InvO to P2");
    step(2, MSG_SACK, 2, '0);  expect_out(5'b00000, MSG_NONE, 0, '0, "blk2 SAck first");
    expect_dir(2, D_SYNC1, 5'b00000, 0, "blk2 Synch1 again");
    step(2, MSG_DOXMR, 2, pat(6)); expect_out(5'b10000, MSG_DATA, 1, pat(6), "blk2 write-back forwarded");
    expect_dir(2, D_FREE, 5'b10000, 1, "blk2 P4 owner");

    // block 3: the recorded owner asks again before its write-back arrives
    step(3, MSG_REQOC, 3, '0); expect_out(5'b01000, MSG_DATA, 1, '0, "blk3 P3 owner");
    step(3, MSG_REQOC, 3, '0); expect_out(5'b00000, MSG_NONE, 0, '0, "owner's ReqOC waits");
    expect_dir(3, D_SYNC1, 5'b01000, 1, "blk3 Synch1 directly");
    step(3, MSG_DOXMR, 3, pat(7)); expect_out(5'b01000, MSG_DATA, 1, pat(7), "own write-back returned");
    expect_dir(3, D_FREE, 5'b01000, 1, "blk3 P3 owner again");
    // plain write-back on a free entry
    step(3, MSG_DOXMR, 3, pat(8)); expect_out(5'b00000, MSG_NONE, 0, '0, "write-back to free entry");
    expect_dir(3, D_FREE, 5'b00000, 0, "blk3 uncached");
    check(mem_o[3] == pat(8), "blk3 memory updated");
    // ReqO with the only copy: ownership without invalidations
    step(1, MSG_REQSC, 3, '0); expect_out(5'b00010, MSG_DATA, 1, pat(8), "blk3 P1 sharer");
    step(1, MSG_REQO, 3, '0);  expect_out(5'b00010, MSG_OSHIP, 0, '0, "sole sharer upgrades");
    expect_dir(3, D_FREE, 5'b00010, 1, "blk3 P1 owner");

    // unspecified messages
    step(2, MSG_IACK, 1, '0);
    check(got_err && got_v == '0, "IAck to a free entry is an error");
    expect_dir(1, D_FREE, 5'b00010, 0, "entry untouched by error");
    step(0, MSG_REQO, 1, '0);  // P0 has no copy of block 1: rejected, not an error
    check(!got_err && got_v == 5'b00001, "rejected ReqO");
    step(1, MSG_REQO, 1, '0);  expect_out(5'b00010, MSG_OSHIP, 0, '0, "blk1 P1 upgrade");
    step(2, MSG_REQSC, 1, '0); expect_out(5'b00010, MSG_UPDM, 0, '0, "blk1 XData");
    step(1, MSG_DOXMU, 1, pat(9));
    check(got_err && got_v == '0, "DOxMU in XData is an error");
    expect_dir(1, D_XDATA, 5'b00010, 1, "XData kept after error");
    step(1, MSG_DXM, 1, pat(9)); expect_out(5'b00100, MSG_DATA, 1, pat(9), "blk1 recovered");

    // back-pressure: a full receiving channel stops the controller
    @(negedge clk);
    rch_room = 5'b11011;
    sch_valid = 5'b00001; sch_msg[0] = mk_msg(MSG_REQSC, 2'd0, '0);
    #1;
    check(sch_ready == '0 && rch_valid == '0, "no service without room everywhere");
    @(negedge clk);
    rch_room = '1;
    sch_valid = '0;

    // round robin between simultaneous senders
    @(negedge clk);
    sch_valid = 5'b10011;
    sch_msg[0] = mk_msg(MSG_REQSC, 2'd0, '0);
    sch_msg[1] = mk_msg(MSG_REQSC, 2'd0, '0);
    sch_msg[4] = mk_msg(MSG_REQSC, 2'd0, '0);
    begin
      int order [3];
      for (int n = 0; n < 3; n++) begin
        #1;
        order[n] = -1;
        for (int j = 0; j < NP; j++) if (sch_ready[j]) order[n] = j;
        check($countones(sch_ready) == 1, "one sender served per cycle");
        @(negedge clk);
        if (order[n] >= 0) sch_valid[order[n]] = 1'b0;
      end
      check(order[0] != order[1] && order[1] != order[2] && order[0] != order[2],
            "each sender served once");
    end
    sch_valid = '0;
    repeat (2) @(negedge clk);
    expect_dir(0, D_FREE, 5'b10011, 0, "three readers");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
