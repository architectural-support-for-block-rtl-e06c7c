// Shared-memory multiprocessor with hardware block transfers: N_NODES nodes
// on a unidirectional bit-parallel slotted ring. Each node has a processor
// port, a cache (bt_cache), a node interface (bt_node_if), a cache-memory
// buffer, a memory controller and a local memory. Any processor can read or write any
// node's memory, and can copy a block of up to BLOCK_WORDS words from a
// remote memory into its local memory with one LONG_READ request.
//
// Ring wiring: node i receives the slot that node i-1 registered in the
// previous cycle (node 0 receives from node N_NODES-1), so a packet moves
// one node per clock and there is one slot per node. Node i has node
// number i.
//
// Processor port of node i: proc_req[i] is taken when proc_req_valid[i]
// and proc_req_ready[i] are both high; proc_done[i] pulses when it is
// complete, with proc_rdata[i] holding the words of a read. A processor has
// at most one request outstanding. The processors and their caches are
// outside this design; their accesses enter through these ports and pass
// through the node's cache.
// Following the source design: 16 nodes, one slot per node, 4 KB blocks,
// round-robin memory buffers. This design's own choices: the memory size
// (64 KB per node), the memory access time (5 cycles per word), the depth
// of the two memory buffers (2 requests) and the cache (256 lines of
// 4 words, direct mapped, write through).
module bt_ring_system
  import bt_pkg::*;
#(
  parameter int unsigned N_NODES     = 16,
  parameter int unsigned BLOCK_WORDS = 1024,
  parameter int unsigned MEM_WORDS   = 16384,
  parameter int unsigned MEM_CYCLES  = 5,
  parameter int unsigned BUF_DEPTH   = 2,
  parameter int unsigned CACHE_LINES = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      proc_req_valid [N_NODES],
  input  proc_req_t proc_req       [N_NODES],
  output logic      proc_req_ready [N_NODES],
  output logic      proc_done      [N_NODES],
  output word_t     proc_rdata     [N_NODES][LINE_WORDS]
);
  localparam int unsigned BW = $clog2(BUF_DEPTH + 1);

  slot_t ring [N_NODES];   // slot registered by each node

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    logic     cm_push, cm_full, cm_empty, cm_pop, cm_resp_valid;
    mem_req_t cm_req, cm_head;
    logic     im_valid, im_pop, im_resp_valid, resp_we;
    mem_req_t im_req;
    word_t    resp_rdata;
    logic [BW-1:0] cm_count_unused, cm_free_unused;
    logic      n_req_valid, n_req_ready, n_done;
    proc_req_t n_req;
    word_t     n_rdata [LINE_WORDS];

    bt_cache #(.LINES(CACHE_LINES)) u_cache (
      .clk, .rst_n,
      .my_id       (node_id_t'(i)),
      .p_req_valid (proc_req_valid[i]),
      .p_req       (proc_req[i]),
      .p_req_ready (proc_req_ready[i]),
      .p_done      (proc_done[i]),
      .p_rdata     (proc_rdata[i]),
      .n_req_valid, .n_req, .n_req_ready, .n_done, .n_rdata
    );

    bt_node_if #(.BLOCK_WORDS(BLOCK_WORDS), .IM_DEPTH(BUF_DEPTH)) u_ni (
      .clk, .rst_n,
      .my_id          (node_id_t'(i)),
      .slot_in        (ring[(i + N_NODES - 1) % N_NODES]),
      .slot_out       (ring[i]),
      .proc_req_valid (n_req_valid),
      .proc_req       (n_req),
      .proc_req_ready (n_req_ready),
      .proc_done      (n_done),
      .proc_rdata     (n_rdata),
      .cm_push, .cm_req, .cm_full, .cm_resp_valid,
      .im_valid, .im_req, .im_pop, .im_resp_valid,
      .resp_we, .resp_rdata
    );

    // cache-memory buffer
    bt_fifo #(.T(mem_req_t), .DEPTH(BUF_DEPTH)) u_cmbuf (
      .clk, .rst_n,
      .push (cm_push), .wdata (cm_req),
      .pop  (cm_pop),  .rdata (cm_head),
      .empty (cm_empty), .full (cm_full),
      .count (cm_count_unused), .free (cm_free_unused)
    );

    bt_mem_ctrl #(.MEM_WORDS(MEM_WORDS), .MEM_CYCLES(MEM_CYCLES)) u_mc (
      .clk, .rst_n,
      .cm_valid (!cm_empty), .cm_req (cm_head), .cm_pop,
      .im_valid, .im_req, .im_pop,
      .cm_resp_valid, .im_resp_valid, .resp_we, .resp_rdata
    );
  end
endmodule
