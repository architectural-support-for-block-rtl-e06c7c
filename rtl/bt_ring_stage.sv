// Ring access of one node interface: the latches that hold this node's
// ring slot and the multiplexer that fills an empty slot from Q_out.
//
// Each clock the slot coming from the previous node (slot_in) is examined:
//  * a full slot addressed to this node is handed to UNPACK (rx_valid);
//    a request that the node refuses (rx_reject, computed combinationally
//    from rx_slot) is marked with a negative acknowledgement and sent back
//    to its source instead, keeping the slot full;
//  * a slot addressed elsewhere passes on unchanged;
//  * an empty slot, or a slot just emptied by this node, is filled with the
//    head of Q_out (qout_pop) if Q_out holds a packet.
// The result is registered, so a packet moves one node per clock cycle.
// From the source design: unidirectional slotted ring, one slot per node,
// one hop per cycle, first empty slot taken, refused requests returned
// marked with a negative acknowledgement. This design's own choice: a slot
// emptied by its destination may be refilled by that node in the same cycle.
module bt_ring_stage
  import bt_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  node_id_t my_id,
  input  slot_t    slot_in,
  output slot_t    slot_out,
  // packet for this node
  output logic     rx_valid,
  output slot_t    rx_slot,
  input  logic     rx_reject,
  // Q_out head
  input  logic     qout_valid,
  input  slot_t    qout_head,
  output logic     qout_pop
);
  slot_t nxt;
  logic  for_me, nack_back;

  assign for_me    = slot_in.full && (slot_in.dst == my_id);
  assign rx_slot   = slot_in;
  assign nack_back = for_me && !slot_in.nack && is_request(slot_in.kind) && rx_reject;
  assign rx_valid  = for_me && !nack_back;

  always_comb begin
    nxt      = slot_in;
    qout_pop = 1'b0;
    if (nack_back) begin
      nxt.nack = 1'b1;
      nxt.dst  = slot_in.src;
      nxt.src  = my_id;
    end else if (for_me || !slot_in.full) begin
      nxt = EMPTY_SLOT;
      if (qout_valid) begin
        nxt      = qout_head;
        nxt.full = 1'b1;
        qout_pop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot_out <= EMPTY_SLOT;
    else        slot_out <= nxt;
  end
endmodule
