// Processor cache of one node, between the processor port and the node
// interface. Direct mapped, LINES lines of LINE_WORDS (4) words, write
// through with update on a hit and no allocation on a write miss. Local and
// remote data are both cached; a line is identified by its node number and
// the upper local address bits.
//
//  * one-word read, hit : answered from the cache, proc_done the next cycle;
//  * one-word read, miss: the whole line is read through the node interface
//    (a four-word read: one local access sequence, or one request and two
//    data packets on the ring), stored, and the word returned;
//  * write              : updates the line on a hit, then is forwarded;
//  * multi-word read    : forwarded uncached;
//  * LONG_READ          : forwarded; while the processor waits, every line
//    of the local destination range is invalidated, because the block is
//    written into local memory behind the cache's back.
// There is no coherence between the caches of different nodes: a line of
// another node's memory stays valid even if that memory changes.
//
// Interface: p_* is the processor side, n_* the node-interface side; both
// use the request/ready/done protocol of bt_node_if (a request is taken on a
// clock edge with valid and ready high; done pulses for one cycle with the
// read data). A forwarded request is presented to the node interface in the
// cycle after the processor's request was taken; proc_done follows one
// cycle after the node interface's done (and after the invalidation walk).
// The source design places a cache between each processor and the node's
// bus and sends read misses to the local memory or the network; its size,
// organisation and policies are this design's own choice.
module bt_cache
  import bt_pkg::*;
#(
  parameter int unsigned LINES = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  node_id_t  my_id,
  // processor side
  input  logic      p_req_valid,
  input  proc_req_t p_req,
  output logic      p_req_ready,
  output logic      p_done,
  output word_t     p_rdata [LINE_WORDS],
  // node-interface side
  output logic      n_req_valid,
  output proc_req_t n_req,
  input  logic      n_req_ready,
  input  logic      n_done,
  input  word_t     n_rdata [LINE_WORDS]
);
  localparam int unsigned OFFW = $clog2(LINE_WORDS);
  localparam int unsigned IDXW = $clog2(LINES);
  localparam int unsigned TAGW = NODE_BITS + LADDR_BITS - IDXW - OFFW;
  typedef logic [IDXW-1:0] idx_t;
  typedef logic [TAGW-1:0] tag_t;

  logic  valid [LINES];
  tag_t  tags  [LINES];
  word_t data  [LINES][LINE_WORDS];

  typedef enum logic [1:0] {C_IDLE, C_FILL, C_PASS, C_DONE} c_state_e;
  c_state_e  state;
  proc_req_t cur;
  logic      sent, got;
  laddr_t    inv_addr;   // next line of the LONG_READ destination to invalidate
  len_t      inv_left;   // lines still to look at

  function automatic idx_t idx_of(laddr_t a);
    return a[OFFW +: IDXW];
  endfunction
  function automatic tag_t tag_of(node_id_t n, laddr_t a);
    return {n, a[LADDR_BITS-1:OFFW+IDXW]};
  endfunction

  logic     cacheable, hit;
  idx_t     p_idx;
  assign p_idx     = idx_of(p_req.addr);
  assign cacheable = (p_req.op == OP_READ) && (p_req.len == len_t'(1));
  assign hit       = valid[p_idx] && (tags[p_idx] == tag_of(p_req.node, p_req.addr));

  assign p_req_ready = (state == C_IDLE);
  assign p_done      = (state == C_DONE);
  assign n_req_valid = ((state == C_FILL) || (state == C_PASS)) && !sent;

  always_comb begin
    n_req = cur;
    if (state == C_FILL) begin
      n_req.addr = {cur.addr[LADDR_BITS-1:OFFW], OFFW'(0)};
      n_req.len  = len_t'(LINE_WORDS);
    end
  end

  // invalidation walk over the lines of a LONG_READ destination
  idx_t inv_idx;
  logic inv_match;
  assign inv_idx   = idx_of(inv_addr);
  assign inv_match = (inv_left != '0) && valid[inv_idx] && (tags[inv_idx] == tag_of(my_id, inv_addr));

  // data and tag arrays (not reset; guarded by the valid bits)
  logic fill_we, upd_we;
  assign fill_we = (state == C_FILL) && n_done;
  assign upd_we  = (state == C_IDLE) && p_req_valid && (p_req.op == OP_WRITE) && hit;

  always_ff @(posedge clk) begin
    if (fill_we) begin
      for (int k = 0; k < LINE_WORDS; k++) data[idx_of(cur.addr)][k] <= n_rdata[k];
      tags[idx_of(cur.addr)] <= tag_of(cur.node, cur.addr);
    end else if (upd_we) begin
      data[p_idx][p_req.addr[OFFW-1:0]] <= p_req.wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
      state    <= C_IDLE;
      cur      <= '0;
      sent     <= 1'b0;
      got      <= 1'b0;
      inv_addr <= '0;
      inv_left <= '0;
      for (int k = 0; k < LINE_WORDS; k++) p_rdata[k] <= '0;
    end else begin
      if (n_req_valid && n_req_ready) sent <= 1'b1;
      if (inv_left != '0) begin
        if (inv_match) valid[inv_idx] <= 1'b0;
        inv_addr <= inv_addr + laddr_t'(LINE_WORDS);
        inv_left <= inv_left - 1'b1;
      end
      unique case (state)
        C_IDLE: if (p_req_valid) begin
          cur  <= p_req;
          sent <= 1'b0;
          got  <= 1'b0;
          if (cacheable && hit) begin
            p_rdata[0] <= data[p_idx][p_req.addr[OFFW-1:0]];
            state      <= C_DONE;
          end else if (cacheable) begin
            state <= C_FILL;
          end else begin
            if (p_req.op == OP_LONG_READ) begin
              inv_addr <= {p_req.local_base[LADDR_BITS-1:OFFW], OFFW'(0)};
              inv_left <= len_t'((32'(p_req.local_base[OFFW-1:0]) + 32'(p_req.len) + LINE_WORDS - 1) / LINE_WORDS);
            end
            state <= C_PASS;
          end
        end
        C_FILL: if (n_done) begin
          valid[idx_of(cur.addr)] <= 1'b1;
          p_rdata[0] <= n_rdata[cur.addr[OFFW-1:0]];
          state      <= C_DONE;
        end
        C_PASS: begin
          if (n_done) begin
            got     <= 1'b1;
            p_rdata <= n_rdata;
          end
          if ((n_done || got) && inv_left == '0) state <= C_DONE;
        end
        C_DONE: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  a_line_fill_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (n_req_valid && state == C_FILL) |-> (n_req.addr[OFFW-1:0] == '0));
endmodule
