// UNPACK: takes apart a packet that the ring stage has removed for this
// node and steers it to where it is used.
//  * request (simple read, simple write, block read): its fields go to the
//    remote-request server of the node interface (req_*), and from there
//    through the interface-memory buffer to memory;
//  * data of a simple read: the two words and their offset go to the
//    processor's response register (rd_*);
//  * data of a block read: the packet becomes a Q_write entry whose local
//    address is the transfer's local base plus the packet's word offset
//    (wq_push / wq_entry), to be written to memory through the
//    cache-memory buffer;
//  * a write acknowledgement or a request returned with a negative
//    acknowledgement is reported to the requester (ack_valid, nack_valid).
// Purely combinational. The routing follows the source design (data of a
// simple read to the cache side, block data to Q_write, requests to the
// interface-memory buffer); the field layout is this design's own.
module bt_unpack
  import bt_pkg::*;
(
  input  logic      rx_valid,
  input  slot_t     rx_slot,
  input  laddr_t    local_base,   // destination of the running block transfer
  // remote request
  output logic      req_valid,
  output pkt_kind_e req_kind,
  output node_id_t  req_src,
  output laddr_t    req_addr,
  output len_t      req_len,
  output word_t     req_wdata,
  // answers to this node's own request
  output logic      nack_valid,
  output logic      ack_valid,
  output logic      rd_valid,
  output len_t      rd_offset,
  output logic      rd_two,
  output word_t     rd_word0,
  output word_t     rd_word1,
  // block data to Q_write
  output logic      wq_push,
  output wq_entry_t wq_entry
);
  logic live;
  assign live = rx_valid && !rx_slot.nack;

  assign req_valid  = live && is_request(rx_slot.kind);
  assign req_kind   = rx_slot.kind;
  assign req_src    = rx_slot.src;
  assign req_addr   = laddr_t'(rx_slot.payload[63:32]);
  assign req_len    = len_t'(rx_slot.payload[31:0]);
  assign req_wdata  = rx_slot.payload[31:0];

  assign nack_valid = rx_valid && rx_slot.nack;
  assign ack_valid  = live && (rx_slot.kind == PK_WRITE_ACK);

  assign rd_valid   = live && (rx_slot.kind == PK_READ_DATA);
  assign rd_offset  = rx_slot.offset;
  assign rd_two     = rx_slot.two;
  assign rd_word0   = rx_slot.payload[31:0];
  assign rd_word1   = rx_slot.payload[63:32];

  assign wq_push       = live && (rx_slot.kind == PK_BLOCK_DATA);
  assign wq_entry.addr = local_base + laddr_t'(rx_slot.offset);
  assign wq_entry.two  = rx_slot.two;
  assign wq_entry.data = rx_slot.payload;
endmodule
