// Node interface of the enhanced (block-transfer) node. It connects the
// node's processor and memory to the slotted ring and contains the ring
// stage (latches and empty-slot multiplexer), UNPACK, PACK, Q_out, Q_write
// and the interface-memory buffer. The cache-memory buffer and the memory
// controller sit outside, on the node's bus.
//
// Requester side (serves this node's processor, one request at a time):
//  * READ/WRITE of the local memory go straight into the cache-memory
//    buffer;
//  * READ/WRITE of another node's memory become a request packet in Q_out;
//    a request returned with a negative acknowledgement is sent again; the
//    answer (one or two data packets, or a write acknowledgement) ends it;
//  * LONG_READ (block transfer) sends one block read request. The block's
//    data packets are unpacked into Q_write and written to local memory
//    through the cache-memory buffer (write phase); the processor is told
//    to continue (proc_done) once every word has been written.
// Server side (requests arriving from other nodes): a request is refused,
// and sent back with a negative acknowledgement, while the interface is
// still busy with an earlier request or Q_out lacks room for the whole
// answer. An accepted read (simple or block) is turned into word reads in
// the interface-memory buffer; PACK packs the returned words two by two into
// Q_out (read phase). For a block the interface stays busy until the whole
// block has been read. An accepted write is done in memory and acknowledged.
//
// Timing: proc_req is taken when proc_req_ready is high; proc_done pulses
// for one cycle when the request is complete, with proc_rdata holding the
// words of a read. Q_out holds a whole block plus the node's own request;
// Q_write holds a whole block.
// From the source design: the three phases of a block transfer, the queue
// sizes, refusal of requests while busy, the two memory paths. This
// design's own: the packet format, write acknowledgements, the Q_out room
// check on acceptance, immediate retry after a negative acknowledgement.
module bt_node_if
  import bt_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 1024,
  parameter int unsigned IM_DEPTH    = 2,
  localparam int unsigned BLOCK_PKTS = (BLOCK_WORDS + WORDS_PER_PKT - 1) / WORDS_PER_PKT,
  localparam int unsigned QOUT_DEPTH = BLOCK_PKTS + 1,
  localparam int unsigned QW_DEPTH   = BLOCK_PKTS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  node_id_t  my_id,
  // ring
  input  slot_t     slot_in,
  output slot_t     slot_out,
  // processor
  input  logic      proc_req_valid,
  input  proc_req_t proc_req,
  output logic      proc_req_ready,
  output logic      proc_done,
  output word_t     proc_rdata [LINE_WORDS],
  // cache-memory buffer (outside this block)
  output logic      cm_push,
  output mem_req_t  cm_req,
  input  logic      cm_full,
  input  logic      cm_resp_valid,
  // interface-memory buffer to the memory controller
  output logic      im_valid,
  output mem_req_t  im_req,
  input  logic      im_pop,
  input  logic      im_resp_valid,
  // memory controller response data
  input  logic      resp_we,
  input  word_t     resp_rdata
);
  localparam int unsigned QOW = $clog2(QOUT_DEPTH + 1);
  localparam int unsigned QWW = $clog2(QW_DEPTH + 1);
  localparam int unsigned IMW = $clog2(IM_DEPTH + 1);

  // ------------------------------------------------------------------
  // Ring stage, UNPACK, Q_out
  // ------------------------------------------------------------------
  logic      rx_valid, rx_reject;
  slot_t     rx_slot;
  logic      qout_push, qout_pop, qout_empty, qout_full;
  slot_t     qout_wdata, qout_head;
  logic [QOW-1:0] qout_count, qout_free;

  bt_ring_stage u_ring (
    .clk, .rst_n, .my_id,
    .slot_in, .slot_out,
    .rx_valid, .rx_slot, .rx_reject,
    .qout_valid (!qout_empty),
    .qout_head,
    .qout_pop
  );

  bt_fifo #(.T(slot_t), .DEPTH(QOUT_DEPTH)) u_qout (
    .clk, .rst_n,
    .push (qout_push), .wdata (qout_wdata),
    .pop  (qout_pop),  .rdata (qout_head),
    .empty (qout_empty), .full (qout_full),
    .count (qout_count), .free (qout_free)
  );

  proc_req_t cur;          // the processor's current request
  logic      u_req_valid, u_nack, u_ack, u_rd_valid, u_rd_two, wq_push;
  pkt_kind_e u_req_kind;
  node_id_t  u_req_src;
  laddr_t    u_req_addr;
  len_t      u_req_len, u_rd_offset;
  word_t     u_req_wdata, u_rd_w0, u_rd_w1;
  wq_entry_t wq_in, wq_head;

  bt_unpack u_unpack (
    .rx_valid, .rx_slot,
    .local_base (cur.local_base),
    .req_valid (u_req_valid), .req_kind (u_req_kind), .req_src (u_req_src),
    .req_addr (u_req_addr), .req_len (u_req_len), .req_wdata (u_req_wdata),
    .nack_valid (u_nack), .ack_valid (u_ack),
    .rd_valid (u_rd_valid), .rd_offset (u_rd_offset), .rd_two (u_rd_two),
    .rd_word0 (u_rd_w0), .rd_word1 (u_rd_w1),
    .wq_push, .wq_entry (wq_in)
  );

  // ------------------------------------------------------------------
  // Server: requests from other nodes
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_ACK} srv_state_e;
  srv_state_e s_state;
  node_id_t   s_src;
  laddr_t     s_addr;      // next word address to read / write address
  len_t       s_left;      // reads still to issue
  word_t      s_wdata;
  logic       s_busy, s_accept, s_room;
  len_t       need_pkts;
  logic       im_push, im_full, im_empty;
  mem_req_t   im_wreq;
  logic [IMW-1:0] im_count_unused, im_free_unused;
  logic       pk_push, pk_busy, pk_start;
  slot_t      pk_pkt;

  always_comb begin
    if (u_req_kind == PK_WRITE_REQ) need_pkts = len_t'(1);
    else                            need_pkts = (u_req_len + 1'b1) >> 1;
  end
  assign s_busy    = (s_state != S_IDLE) || pk_busy;
  assign s_room    = (QOW'(need_pkts) + QOW'(1)) <= qout_free;
  // rx_reject is looked at by the ring stage only for requests addressed here
  assign rx_reject = s_busy || !s_room;
  assign s_accept  = u_req_valid;   // ring stage hands over only accepted requests
  assign pk_start  = s_accept && (u_req_kind != PK_WRITE_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_state <= S_IDLE;
      s_src   <= '0;
      s_addr  <= '0;
      s_left  <= '0;
      s_wdata <= '0;
    end else begin
      unique case (s_state)
        S_IDLE: if (s_accept) begin
          s_src   <= u_req_src;
          s_addr  <= u_req_addr;
          s_left  <= u_req_len;
          s_wdata <= u_req_wdata;
          s_state <= (u_req_kind == PK_WRITE_REQ) ? S_WRITE : S_READ;
        end
        S_READ: if (!im_full) begin
          s_addr <= s_addr + 1'b1;
          s_left <= s_left - 1'b1;
          if (s_left == len_t'(1)) s_state <= S_IDLE;  // PACK keeps s_busy up
        end
        S_WRITE: if (im_resp_valid && resp_we) s_state <= S_ACK;
        S_ACK:   s_state <= S_IDLE;   // acknowledgement pushed this cycle
        default: s_state <= S_IDLE;
      endcase
    end
  end

  // The write request is pushed once, on the cycle after acceptance.
  logic s_wr_sent;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            s_wr_sent <= 1'b0;
    else if (s_state != S_WRITE)           s_wr_sent <= 1'b0;
    else if (!im_full)                     s_wr_sent <= 1'b1;
  end

  assign im_push       = ((s_state == S_READ) || (s_state == S_WRITE && !s_wr_sent)) && !im_full;
  assign im_wreq.we    = (s_state == S_WRITE);
  assign im_wreq.addr  = s_addr;
  assign im_wreq.wdata = s_wdata;

  bt_fifo #(.T(mem_req_t), .DEPTH(IM_DEPTH)) u_imbuf (
    .clk, .rst_n,
    .push (im_push), .wdata (im_wreq),
    .pop  (im_pop),  .rdata (im_req),
    .empty (im_empty), .full (im_full),
    .count (im_count_unused), .free (im_free_unused)
  );
  assign im_valid = !im_empty;

  bt_pack u_pack (
    .clk, .rst_n, .my_id,
    .start      (pk_start),
    .start_dst  (u_req_src),
    .start_kind ((u_req_kind == PK_BLOCK_REQ) ? PK_BLOCK_DATA : PK_READ_DATA),
    .start_len  (u_req_len),
    .word_valid (im_resp_valid && !resp_we),
    .word       (resp_rdata),
    .push       (pk_push),
    .pkt        (pk_pkt),
    .busy       (pk_busy)
  );

  // ------------------------------------------------------------------
  // Requester: this node's processor
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {R_IDLE, R_LOCAL, R_SEND, R_WAIT, R_DONE} req_state_e;
  req_state_e r_state;
  len_t       r_issued;    // local: words pushed to the cache-memory buffer
  len_t       r_got;       // words answered (read data, or block words written)
  logic       r_remote, r_push;
  slot_t      r_pkt;
  logic       ack_push;
  slot_t      ack_pkt;

  assign r_remote = (proc_req.node != my_id) || (proc_req.op == OP_LONG_READ);

  // request packet of the current request
  always_comb begin
    r_pkt      = EMPTY_SLOT;
    r_pkt.full = 1'b1;
    r_pkt.dst  = cur.node;
    r_pkt.src  = my_id;
    unique case (cur.op)
      OP_READ:      r_pkt.kind = PK_READ_REQ;
      OP_WRITE:     r_pkt.kind = PK_WRITE_REQ;
      default:      r_pkt.kind = PK_BLOCK_REQ;
    endcase
    r_pkt.payload = {32'(cur.addr), (cur.op == OP_WRITE) ? cur.wdata : 32'(cur.len)};
  end

  always_comb begin
    ack_pkt      = EMPTY_SLOT;
    ack_pkt.full = 1'b1;
    ack_pkt.kind = PK_WRITE_ACK;
    ack_pkt.dst  = s_src;
    ack_pkt.src  = my_id;
  end

  // Q_out writers: PACK, then the write acknowledgement, then the own request.
  assign ack_push = (s_state == S_ACK);
  assign r_push   = (r_state == R_SEND) && !pk_push && !ack_push && !qout_full;
  assign qout_push  = pk_push || ack_push || r_push;
  assign qout_wdata = pk_push ? pk_pkt : (ack_push ? ack_pkt : r_pkt);

  // Write phase: Q_write entries become word writes in the cache-memory buffer.
  logic wq_pop, wq_empty, wq_full, w_sub;
  logic [QWW-1:0] wq_count, wq_free_unused;
  logic l_push;
  mem_req_t l_req;

  bt_fifo #(.T(wq_entry_t), .DEPTH(QW_DEPTH)) u_qwrite (
    .clk, .rst_n,
    .push (wq_push), .wdata (wq_in),
    .pop  (wq_pop),  .rdata (wq_head),
    .empty (wq_empty), .full (wq_full),
    .count (wq_count), .free (wq_free_unused)
  );

  logic w_push;
  assign w_push = !wq_empty && !cm_full;
  assign wq_pop = w_push && (w_sub || !wq_head.two);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      w_sub <= 1'b0;
    else if (w_push) w_sub <= !w_sub && wq_head.two;
  end

  // local access
  assign l_push      = (r_state == R_LOCAL) && (r_issued != cur.len) && !cm_full;
  assign l_req.we    = (cur.op == OP_WRITE);
  assign l_req.addr  = cur.addr + laddr_t'(r_issued);
  assign l_req.wdata = cur.wdata;

  // The processor is stalled during a block write, so the two never overlap.
  assign cm_push = w_push || l_push;
  always_comb begin
    if (w_push) begin
      cm_req.we    = 1'b1;
      cm_req.addr  = wq_head.addr + laddr_t'(w_sub);
      cm_req.wdata = w_sub ? wq_head.data[63:32] : wq_head.data[31:0];
    end else begin
      cm_req = l_req;
    end
  end

  assign proc_req_ready = (r_state == R_IDLE);
  assign proc_done      = (r_state == R_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_state  <= R_IDLE;
      cur      <= '0;
      r_issued <= '0;
      r_got    <= '0;
      for (int i = 0; i < LINE_WORDS; i++) proc_rdata[i] <= '0;
    end else begin
      unique case (r_state)
        R_IDLE: if (proc_req_valid) begin
          cur      <= proc_req;
          if (proc_req.op == OP_WRITE) cur.len <= len_t'(1);
          r_issued <= '0;
          r_got    <= '0;
          r_state  <= r_remote ? R_SEND : R_LOCAL;
        end
        R_LOCAL: begin
          if (l_push) r_issued <= r_issued + 1'b1;
          if (cm_resp_valid) begin
            if (!resp_we) proc_rdata[r_got[1:0]] <= resp_rdata;
            r_got <= r_got + 1'b1;
            if (r_got + 1'b1 == cur.len) r_state <= R_DONE;
          end
        end
        R_SEND: if (r_push) r_state <= R_WAIT;
        R_WAIT: begin
          if (u_nack) r_state <= R_SEND;                       // retry
          else if (u_ack) r_state <= R_DONE;
          else if (u_rd_valid) begin
            proc_rdata[u_rd_offset[1:0]] <= u_rd_w0;
            if (u_rd_two) proc_rdata[u_rd_offset[1:0] + 2'd1] <= u_rd_w1;
            if (u_rd_offset + (u_rd_two ? len_t'(2) : len_t'(1)) >= cur.len)
              r_state <= R_DONE;
          end
          // block write phase: count words written to local memory
          if (cur.op == OP_LONG_READ && cm_resp_valid && resp_we) begin
            r_got <= r_got + 1'b1;
            if (r_got + 1'b1 == cur.len) r_state <= R_DONE;
          end
        end
        R_DONE: r_state <= R_IDLE;
        default: r_state <= R_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // Rules of the design
  // ------------------------------------------------------------------
  a_block_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (r_state == R_IDLE && proc_req_valid && proc_req.op == OP_LONG_READ)
      |-> (proc_req.len != '0 && proc_req.len <= len_t'(BLOCK_WORDS)));
  a_read_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (r_state == R_IDLE && proc_req_valid && proc_req.op == OP_READ)
      |-> (proc_req.len != '0 && proc_req.len <= len_t'(LINE_WORDS)));
  a_qwrite_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wq_push && wq_full));
endmodule
