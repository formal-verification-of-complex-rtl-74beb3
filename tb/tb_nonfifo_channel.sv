// tb_nonfifo_channel: pushes uniquely tagged messages through the channel,
// one or two per cycle, while the consumer pops at random. Checks that every
// message comes out exactly once and unchanged, that the room flags match
// the number of messages held, that a full channel is reported, and that
// messages do get reordered (some message overtakes an older one).
module tb_nonfifo_channel;
  import coh_pkg::*;

  localparam int unsigned DEPTH = 8;
  localparam int NMSG = 600;

  logic       clk = 0, rst_n = 0;
  logic [1:0] in_valid;
  msg_t       in_msg [2];
  logic       room1, room2, out_valid, out_ready;
  msg_t       out_msg;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  int sent = 0, got = 0, held = 0;
  int reorders = 0, full_seen = 0, hold_seen = 0, pairs = 0;
  int last_tag = -1;
  bit seen [NMSG];

  nonfifo_channel #(.DEPTH(DEPTH), .SEED(16'h1234), .HOLD(1'b1)) dut (
    .clk, .rst_n, .in_valid, .in_msg, .room1, .room2,
    .out_valid, .out_msg, .out_ready, .count);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic msg_t mk_tag(int t);
    msg_t m;
    m.kind = MSG_REQSC;
    m.blk  = blkno_t'(t);
    m.data = '0;
    m.data[0] = word_t'(t);
    m.data[1] = word_t'(t * 7 + 3);
    return m;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0; in_msg[0] = '0; in_msg[1] = '0; out_ready = 0;
    for (int k = 0; k < NMSG; k++) seen[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (got < NMSG) begin
      @(negedge clk);
      // what the channel reports against what the testbench knows it holds
      check(int'(count) == held, "count matches messages held");
      check(room1 == (held < DEPTH), "room1 flag");
      check(room2 == (held + 2 <= DEPTH), "room2 flag");
      if (held == DEPTH) full_seen++;
      if (held > 0 && !out_valid) hold_seen++;
      // consumer side, sampled before the edge
      out_ready = ($urandom_range(0, 2) != 0) && (sent > 40 || held == DEPTH);
      in_valid = '0;
      if (sent < NMSG && $urandom_range(0, 3) != 0) begin
        if (room2 && sent + 1 < NMSG && $urandom_range(0, 2) == 0) begin
          in_valid = 2'b11; in_msg[0] = mk_tag(sent); in_msg[1] = mk_tag(sent + 1);
          pairs++;
        end else if (room1) begin
          in_valid = 2'b01; in_msg[0] = mk_tag(sent);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) begin
        int t;
        t = int'(out_msg.data[0]);
        check(t >= 0 && t < NMSG && t < sent + 2, "tag in range");
        if (t >= 0 && t < NMSG) begin
          check(!seen[t], "message delivered once");
          seen[t] = 1;
          check(out_msg.data[1] == word_t'(t * 7 + 3) && out_msg.blk == blkno_t'(t),
                "message unchanged");
        end
        if (t < last_tag) reorders++;
        last_tag = t;
        got++;
        held--;
      end
      if (in_valid[0]) begin sent++; held++; end
      if (in_valid[1]) begin sent++; held++; end
    end
    for (int k = 0; k < NMSG; k++) check(seen[k], "no message lost");
    check(reorders > 0, "messages overtook one another");
    check(full_seen > 0, "channel filled up");
    check(hold_seen > 0, "delivery was withheld at times");
    check(pairs > 0, "pairs inserted");
    $display("reorders=%0d full=%0d hold=%0d pairs=%0d", reorders, full_seen, hold_seen, pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
