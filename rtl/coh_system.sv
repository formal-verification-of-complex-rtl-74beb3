// coh_system: a shared-memory multiprocessor memory system kept coherent by a
// full-map, write-invalidate directory protocol over an interconnect that
// may reorder messages.
//
// NPROC base machines surround one shared memory with its directory. A base
// machine is a cache controller (cache_ctrl) with its own sending channel
// (cache to memory) and receiving channel (memory to cache), both
// nonfifo_channel instances, so messages between one cache and the memory
// may overtake one another. The processors are outside: each one's request
// and response signals are ports of this module.
//
// Processor interface, per processor p (all arrays indexed by p):
//   p_req_valid/p_req_ready handshake; p_req_op (read, write, replace),
//   p_req_blk, p_req_word, p_req_wdata. Exactly one p_resp_valid pulse,
//   with p_resp_rdata for a read, answers each accepted request; a processor
//   must wait for it before its next request.
// proto_err is a sticky flag: some controller received a message that the
// protocol does not define for its state.
//
// Each cache is direct mapped with FRAMES frames for the NBLK memory blocks,
// so misses also evict blocks.
//
// Channel depth: per block, a cache has at most one request and a handful of
// replies in flight, so CH_DEPTH = 4 * NBLK slots are never all used; the
// channels check this with assertions. This depth is this design's choice.
module coh_system
  import coh_pkg::*;
#(
  parameter int unsigned NPROC    = 5,
  parameter int unsigned FRAMES   = 2,
  parameter int unsigned CH_DEPTH = 4 * NBLK,
  parameter bit          CH_HOLD  = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    p_req_valid [NPROC],
  input  op_e     p_req_op    [NPROC],
  input  blkno_t  p_req_blk   [NPROC],
  input  wordno_t p_req_word  [NPROC],
  input  word_t   p_req_wdata [NPROC],
  output logic    p_req_ready [NPROC],
  output logic    p_resp_valid[NPROC],
  output word_t   p_resp_rdata[NPROC],
  output logic    proto_err
);

  logic [NPROC-1:0] sch_valid, sch_ready, rch_valid, rch_room, cache_err;
  msg_t             sch_msg [NPROC];
  msg_t             rch_msg [NPROC];
  logic             dir_err;

  for (genvar p = 0; p < NPROC; p++) begin : g_bm
    logic [1:0] c_tx_valid;
    msg_t       c_tx_msg [2];
    logic       c_tx_room2;
    logic       c_rx_valid, c_rx_ready;
    msg_t       c_rx_msg;
    msg_t       d_in [2];
    logic       s_room1, r_room2;
    logic [$clog2(CH_DEPTH+1)-1:0] s_count, r_count;
    cstate_e    st [NBLK];

    cache_ctrl #(.NFRAMES(FRAMES)) u_cache (
      .clk         (clk),
      .rst_n       (rst_n),
      .p_req_valid (p_req_valid[p]),
      .p_req_op    (p_req_op[p]),
      .p_req_blk   (p_req_blk[p]),
      .p_req_word  (p_req_word[p]),
      .p_req_wdata (p_req_wdata[p]),
      .p_req_ready (p_req_ready[p]),
      .p_resp_valid(p_resp_valid[p]),
      .p_resp_rdata(p_resp_rdata[p]),
      .rx_valid    (c_rx_valid),
      .rx_msg      (c_rx_msg),
      .rx_ready    (c_rx_ready),
      .tx_valid    (c_tx_valid),
      .tx_msg      (c_tx_msg),
      .tx_room2    (c_tx_room2),
      .proto_err   (cache_err[p]),
      .st_o        (st)
    );

    // cache to memory
    nonfifo_channel #(
      .DEPTH(CH_DEPTH), .SEED(16'hACE1 ^ 16'(p * 16'h1F35)), .HOLD(CH_HOLD)
    ) u_sch (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (c_tx_valid),
      .in_msg   (c_tx_msg),
      .room1    (s_room1),
      .room2    (c_tx_room2),
      .out_valid(sch_valid[p]),
      .out_msg  (sch_msg[p]),
      .out_ready(sch_ready[p]),
      .count    (s_count)
    );

    // memory to cache
    assign d_in[0] = rch_msg[p];
    assign d_in[1] = rch_msg[p];
    nonfifo_channel #(
      .DEPTH(CH_DEPTH), .SEED(16'h5EED ^ 16'(p * 16'h2B71)), .HOLD(CH_HOLD)
    ) u_rch (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid ({1'b0, rch_valid[p]}),
      .in_msg   (d_in),
      .room1    (rch_room[p]),
      .room2    (r_room2),
      .out_valid(c_rx_valid),
      .out_msg  (c_rx_msg),
      .out_ready(c_rx_ready),
      .count    (r_count)
    );
  end

  dstate_e          dstate [NBLK];
  logic [NPROC-1:0] pres   [NBLK];
  logic [NBLK-1:0]  dirty;
  block_t           mem    [NBLK];

  dir_ctrl #(.NPROC(NPROC)) u_dir (
    .clk      (clk),
    .rst_n    (rst_n),
    .sch_valid(sch_valid),
    .sch_msg  (sch_msg),
    .sch_ready(sch_ready),
    .rch_valid(rch_valid),
    .rch_msg  (rch_msg),
    .rch_room (rch_room),
    .proto_err(dir_err),
    .dstate_o (dstate),
    .pres_o   (pres),
    .dirty_o  (dirty),
    .mem_o    (mem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) proto_err <= 1'b0;
    else if (dir_err || (|cache_err)) proto_err <= 1'b1;
  end

endmodule
