// tb_cache_repl: exhaustive check of the replacement rule. Every frame state
// is applied with a random block; the expected next state and write-back are
// worked out here from the rule (Owner writes back DOxMR, Shared and
// Invalid are dropped silently, anything else is an illegal request).
module tb_cache_repl;
  import coh_pkg::*;

  cstate_e st, st_next;
  blkno_t  blk;
  block_t  data;
  logic    send, bad_state;
  msg_t    msg;
  int      checks = 0, failures = 0;

  cache_repl dut (.st, .blk, .data, .st_next, .send, .msg, .bad_state);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (st=%0d)", what, st);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int s = 0; s <= 8; s++) begin
        st   = cstate_e'(s);
        blk  = blkno_t'($urandom);
        for (int w = 0; w < WORDS; w++) data[w] = $urandom;
        #1;
        if (st == C_O) begin
          check(st_next == C_I, "owner goes invalid");
          check(send && msg.kind == MSG_DOXMR, "owner writes back with DOxMR");
          check(msg.blk == blk && msg.data == data, "write-back carries block and data");
          check(!bad_state, "owner replacement legal");
        end else if (st == C_S || st == C_I) begin
          check(st_next == C_I, "shared/invalid goes invalid");
          check(!send, "no message for a clean copy");
          check(!bad_state, "clean replacement legal");
        end else begin
          check(bad_state, "replacement of a pending frame flagged");
          check(st_next == st && !send, "pending frame untouched");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
