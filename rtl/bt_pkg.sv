// Shared types and constants of the block-transfer ring multiprocessor.
//
// The machine is a unidirectional slotted ring of N_NODES nodes. Every ring
// slot carries one packet: either a request message or 8 bytes of data,
// plus the overhead fields (full/negative-acknowledge flags, destination and
// source node numbers). A node's memory is addressed in 32-bit words; a
// global word address is {node number, local word address}.
//
// From the source design: 16 nodes, 4 KB blocks (the page size), 8 data
// bytes per slot, one slot per node. This design's own choices: the 32-bit
// word, the 16-bit local word address, the packet kind encoding
// and the field layout of a slot.
package bt_pkg;

  // ---- sizes -----------------------------------------------------------
  localparam int unsigned N_NODES_DEF    = 16;    // nodes on the ring
  localparam int unsigned NODE_BITS      = 4;     // enough for 16 nodes
  localparam int unsigned WORD_BITS      = 32;    // memory / processor word
  localparam int unsigned PKT_DATA_BITS  = 64;    // 8 bytes of data per slot
  localparam int unsigned WORDS_PER_PKT  = PKT_DATA_BITS / WORD_BITS;  // 2
  localparam int unsigned LADDR_BITS     = 16;    // local word address field
  localparam int unsigned LEN_BITS       = 11;    // transfer length in words (max 1024)
  localparam int unsigned BLOCK_WORDS_DEF= 1024;  // 4 KB page / 4-byte words
  localparam int unsigned LINE_WORDS     = 4;     // largest simple read: one or two packets

  typedef logic [NODE_BITS-1:0]  node_id_t;
  typedef logic [LADDR_BITS-1:0] laddr_t;
  typedef logic [WORD_BITS-1:0]  word_t;
  typedef logic [LEN_BITS-1:0]   len_t;

  // ---- ring packets ----------------------------------------------------
  typedef enum logic [2:0] {
    PK_READ_REQ   = 3'd0,  // simple read of 1..LINE_WORDS words
    PK_WRITE_REQ  = 3'd1,  // simple write of one word
    PK_BLOCK_REQ  = 3'd2,  // block read request (LONG_READ)
    PK_READ_DATA  = 3'd3,  // data returned for a simple read
    PK_BLOCK_DATA = 3'd4,  // data returned for a block read
    PK_WRITE_ACK  = 3'd5   // completion of a remote write
  } pkt_kind_e;

  // One ring slot. For requests payload = {laddr (32 bits), len or wdata (32 bits)};
  // for data packets payload = {word at offset+1, word at offset}.
  typedef struct packed {
    logic      full;     // slot holds a packet
    logic      nack;     // request refused by its destination, on its way back
    pkt_kind_e kind;
    node_id_t  dst;
    node_id_t  src;
    len_t      offset;   // data packets: word offset of the first word in the transfer
    logic      two;      // data packets: both words of the payload are valid
    logic [PKT_DATA_BITS-1:0] payload;
  } slot_t;

  localparam slot_t EMPTY_SLOT = '0;

  function automatic logic is_request(pkt_kind_e k);
    return (k == PK_READ_REQ) || (k == PK_WRITE_REQ) || (k == PK_BLOCK_REQ);
  endfunction

  // ---- memory ports ----------------------------------------------------
  typedef struct packed {
    logic   we;
    laddr_t addr;
    word_t  wdata;
  } mem_req_t;

  // Entry of Q_write: one unpacked data packet and its local address.
  typedef struct packed {
    laddr_t addr;
    logic   two;
    logic [PKT_DATA_BITS-1:0] data;
  } wq_entry_t;

  // ---- processor port --------------------------------------------------
  typedef enum logic [1:0] {
    OP_READ      = 2'd0,   // read len (1..LINE_WORDS) words at addr
    OP_WRITE     = 2'd1,   // write wdata at addr
    OP_LONG_READ = 2'd2    // copy len words from remote addr to local_base
  } proc_op_e;

  typedef struct packed {
    proc_op_e op;
    node_id_t node;        // node holding addr
    laddr_t   addr;        // word address in that node
    laddr_t   local_base;  // OP_LONG_READ: destination in the local memory
    len_t     len;         // words
    word_t    wdata;
  } proc_req_t;

endpackage
