// PACK: turns the words that the memory returns for a remote read into
// data return packets for Q_out. Eight bytes, that is two 32-bit words, go
// into each packet, so a simple read of up to four words gives one or two
// packets and a 4 KB block read gives 512.
//
// start (one cycle) loads the destination node, the packet kind and the
// number of words to expect. Each word_valid delivers the next word in
// address order. The first word of a pair is held; the packet is pushed
// (push/pkt) when the second word arrives, or with one valid word if it was
// the last. pkt.offset is the word offset of the packet's first word in
// the transfer. busy is high from start until the last packet is pushed.
// The pushed packet goes to Q_out in the same cycle as the word arrives;
// the node interface reserves room in Q_out for the whole answer before it
// starts, so push is never refused.
// Packing two words per packet follows the source design; the word width,
// the offset field and the one-word last packet are this design's choices.
module bt_pack
  import bt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  node_id_t  my_id,
  input  logic      start,
  input  node_id_t  start_dst,
  input  pkt_kind_e start_kind,
  input  len_t      start_len,
  input  logic      word_valid,
  input  word_t     word,
  output logic      push,
  output slot_t     pkt,
  output logic      busy
);
  node_id_t  dst;
  pkt_kind_e kind;
  len_t      remaining;   // words still to arrive
  len_t      offset;      // offset of the next word to arrive
  logic      half;        // a first word is held
  word_t     held;
  logic      last;

  assign busy = (remaining != '0);
  assign last = (remaining == len_t'(1));

  always_comb begin
    push = word_valid && busy && (half || last);
    pkt         = EMPTY_SLOT;
    pkt.full    = 1'b1;
    pkt.kind    = kind;
    pkt.dst     = dst;
    pkt.src     = my_id;
    pkt.two     = half;
    pkt.offset  = half ? offset - 1'b1 : offset;
    pkt.payload = half ? {word, held} : {word_t'(0), word};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst       <= '0;
      kind      <= PK_READ_DATA;
      remaining <= '0;
      offset    <= '0;
      half      <= 1'b0;
      held      <= '0;
    end else if (start) begin
      dst       <= start_dst;
      kind      <= start_kind;
      remaining <= start_len;
      offset    <= '0;
      half      <= 1'b0;
    end else if (word_valid && busy) begin
      remaining <= remaining - 1'b1;
      offset    <= offset + 1'b1;
      half      <= !half && !last;
      held      <= word;
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy));
endmodule
