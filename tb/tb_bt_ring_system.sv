// End-to-end test of the ring multiprocessor at reduced size: 8 nodes,
// 32-word blocks, 2-cycle memory, 256-word memories. See tb_ring_env for
// what is tested.
module tb_bt_ring_system;
  tb_ring_env #(.FULL(1'b0), .N(8), .L(32), .M(2), .MW(256), .MAX_CYCLES(200000)) env ();
endmodule
