// End-to-end test of the ring multiprocessor with every parameter at its
// default: 16 nodes, 4 KB (1024-word) blocks, 5-cycle memory, 16384-word
// memories. See tb_ring_env for what is tested.
module tb_bt_ring_system_full;
  tb_ring_env #(.FULL(1'b1), .N(16), .L(1024), .M(5), .MW(16384), .MAX_CYCLES(2000000)) env ();
endmodule
