// cache_repl: replacement (eviction) of one cache block frame.
//
// Combinational. Given the stable state and contents of the frame being
// evicted it returns the frame's next state and the message, if any, to put
// on the cache's sending channel:
//   Owner  -> Invalid, and the modified block is written back with DOxMR;
//   Shared -> Invalid, silently (the directory's presence bit is left set,
//             trading extra invalidations later for less traffic now);
//   Invalid-> unchanged.
// This follows the protocol's replacement rule. Replacement is never applied
// to a frame in a pending or transient state (the processor is stalled then);
// such a request is flagged on bad_state and leaves the frame unchanged.
module cache_repl
  import coh_pkg::*;
(
  input  cstate_e st,
  input  blkno_t  blk,
  input  block_t  data,
  output cstate_e st_next,
  output logic    send,
  output msg_t    msg,
  output logic    bad_state
);

  always_comb begin
    st_next   = st;
    send      = 1'b0;
    msg       = mk_msg(MSG_NONE, blk, '0);
    bad_state = 1'b0;
    unique case (st)
      C_O: begin
        st_next = C_I;
        send    = 1'b1;
        msg     = mk_msg(MSG_DOXMR, blk, data);
      end
      C_S:     st_next = C_I;
      C_I:     st_next = C_I;
      default: bad_state = 1'b1;
    endcase
  end

endmodule
