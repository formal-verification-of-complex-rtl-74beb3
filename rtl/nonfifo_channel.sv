// nonfifo_channel: one direction of the link between a cache and the memory,
// modelling an interconnect that never loses a message but does not keep
// their order.
//
// Messages are kept in DEPTH slots. Up to two messages can be inserted per
// cycle (a cache answers some events with a pair, e.g. SAck then ReqOC); they
// go into the lowest free slots. On the output side one stored message is
// offered at a time. Which one is chosen by a 16-bit LFSR: the search for an
// occupied slot starts at a pseudo-random slot, so any stored message may
// overtake any other. When HOLD is set, the channel also withholds delivery
// in about one cycle out of four, to vary the transit delay. Both the
// reordering and its pseudo-random source are this design's own choice; the
// protocol only requires that messages are not lost.
//
// Interface: in_valid[k]/in_msg[k] are accepted in the cycle they are high;
// the producer must check room (free slots) first: room1 means at least one
// free slot, room2 at least two. out_valid/out_msg is a valid/ready output;
// the message leaves in the cycle out_ready is high. A slot freed by a pop is
// reusable from the next cycle.
module nonfifo_channel
  import coh_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter logic [15:0] SEED  = 16'hACE1,
  parameter bit          HOLD  = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] in_valid,
  input  msg_t       in_msg [2],
  output logic       room1,
  output logic       room2,
  output logic       out_valid,
  output msg_t       out_msg,
  input  logic       out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  msg_t             slot  [DEPTH];
  logic [DEPTH-1:0] used;
  logic [15:0]      lfsr;

  // Free-slot search: the two lowest free slots.
  logic          f0_ok, f1_ok;
  logic [IW-1:0] f0, f1;
  always_comb begin
    f0_ok = 1'b0; f1_ok = 1'b0; f0 = '0; f1 = '0;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      if (!used[k]) begin
        if (!f0_ok) begin
          f0_ok = 1'b1; f0 = IW'(k);
        end else if (!f1_ok) begin
          f1_ok = 1'b1; f1 = IW'(k);
        end
      end
    end
  end
  assign room1 = f0_ok;
  assign room2 = f1_ok;

  // Output selection: first occupied slot at or after a pseudo-random start.
  logic [IW-1:0] start, sel;
  logic          any;
  always_comb begin
    start = IW'(lfsr[7:0] % DEPTH);
    sel   = '0;
    any   = 1'b0;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      int unsigned idx;
      idx = (int'(start) + k) % DEPTH;
      if (!any && used[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
  end

  assign out_valid = any && !(HOLD && (lfsr[9:8] == 2'b00));
  assign out_msg   = slot[sel];

  always_comb begin
    count = '0;
    for (int unsigned k = 0; k < DEPTH; k++) count += used[k];
  end

  // Second insert goes to the first free slot when only port 1 is used.
  logic [IW-1:0] w1;
  assign w1 = in_valid[0] ? f1 : f0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0;
      lfsr <= SEED;
      for (int unsigned k = 0; k < DEPTH; k++) slot[k] <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (out_valid && out_ready) used[sel] <= 1'b0;
      if (in_valid[0]) begin
        used[f0] <= 1'b1;
        slot[f0] <= in_msg[0];
      end
      if (in_valid[1]) begin
        used[w1] <= 1'b1;
        slot[w1] <= in_msg[1];
      end
    end
  end

  // A producer must never write more messages than there are free slots.
  a_no_overflow0: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid[0] |-> f0_ok);
  a_no_overflow1: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid[1] |-> (in_valid[0] ? f1_ok : f0_ok));

endmodule
