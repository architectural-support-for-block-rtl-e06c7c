// Synchronous first-in first-out queue, used for every queue and buffer of
// a node: Q_out (packets waiting for an empty ring slot), Q_write (block
// data waiting to be written to local memory), the cache-memory buffer and
// the interface-memory buffer in front of the memory controller.
//
// The entries live in a circular array with read and write pointers and an
// occupancy count. push is ignored when full, pop when empty; the head
// entry (rdata) is visible combinationally while not empty. free gives the
// number of free entries so that a producer can reserve room for a whole
// block before it starts. One push and one pop may happen in the same cycle.
// The queues themselves are from the source design; the depths of the two
// memory buffers and the circular-array form are this design's choice.
module bt_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              wdata,
  input  logic          pop,
  output T              rdata,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count,
  output logic [CW-1:0] free
);
  T                mem [DEPTH];
  logic [AW-1:0]   rp, wp;
  logic            do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign free    = CW'(DEPTH) - count;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  // A producer must never push into a full queue: the design sizes or
  // reserves every queue so that it cannot overflow.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
endmodule
