// Self-checking test of bt_unpack. Random packets (every kind, with and
// without nack) are presented with a random local base; each output is
// compared with the routing rules: requests to the server, simple read
// data to the processor side, block data to Q_write at local base plus
// offset, acknowledgements and refusals to the requester.
module tb_bt_unpack;
  import bt_pkg::*;

  logic rx_valid;
  slot_t rx_slot;
  laddr_t local_base;
  logic req_valid, nack_valid, ack_valid, rd_valid, rd_two, wq_push;
  pkt_kind_e req_kind;
  node_id_t req_src;
  laddr_t req_addr;
  len_t req_len, rd_offset;
  word_t req_wdata, rd_word0, rd_word1;
  wq_entry_t wq_entry;
  int checks = 0, failures = 0;
  int seen [6];

  bt_unpack dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) seen[k] = 0;
    for (int i = 0; i < 4000; i++) begin
      bit live;
      int k;
      rx_slot    = slot_t'({$urandom, $urandom, $urandom});
      k          = $urandom_range(0, 5);
      rx_slot.kind = pkt_kind_e'(k);
      rx_slot.nack = ($urandom_range(0, 4) == 0);
      rx_valid   = ($urandom_range(0, 5) != 0);
      local_base = laddr_t'($urandom);
      #1;
      live = rx_valid && !rx_slot.nack;
      if (live) seen[k]++;
      check(req_valid == (live && k <= 2), $sformatf("req_valid kind %0d", k));
      check(nack_valid == (rx_valid && rx_slot.nack), "nack_valid");
      check(ack_valid == (live && k == 5), "ack_valid");
      check(rd_valid == (live && k == 3), "rd_valid");
      check(wq_push == (live && k == 4), "wq_push");
      if (req_valid) begin
        check(req_src == rx_slot.src && req_kind == rx_slot.kind, "request source/kind");
        check(req_addr == rx_slot.payload[32 +: LADDR_BITS], "request address");
        if (k == 1) check(req_wdata == rx_slot.payload[31:0], "write data");
        else        check(req_len == rx_slot.payload[LEN_BITS-1:0], "request length");
      end
      if (rd_valid)
        check(rd_offset == rx_slot.offset && rd_two == rx_slot.two &&
              rd_word0 == rx_slot.payload[31:0] && rd_word1 == rx_slot.payload[63:32], "read data fields");
      if (wq_push)
        check(wq_entry.addr == laddr_t'(local_base + laddr_t'(rx_slot.offset)) && wq_entry.two == rx_slot.two &&
              wq_entry.data == rx_slot.payload, "Q_write entry");
    end
    for (int k2 = 0; k2 < 6; k2++) check(seen[k2] > 0, $sformatf("kind %0d never seen", k2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
