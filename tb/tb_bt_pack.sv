// Self-checking test of bt_pack. For answers of random length (1 to 11
// words, odd and even) with random gaps between the words, the packets
// pushed are collected and compared with the expected packing: two words
// per packet in address order, a one-word last packet for an odd length,
// the right offsets, destination, source and kind, ceil(len/2) packets,
// each pushed in the cycle its last word arrived; busy must fall after the
// last word.
module tb_bt_pack;
  import bt_pkg::*;
  localparam node_id_t ME = node_id_t'(9);

  logic clk = 1'b0, rst_n = 1'b0;
  node_id_t my_id, start_dst;
  logic start, word_valid, push, busy;
  pkt_kind_e start_kind;
  len_t start_len;
  word_t word;
  slot_t pkt;
  int checks = 0, failures = 0;
  slot_t got [$];

  always #5 clk = !clk;

  bt_pack dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (push) got.push_back(pkt);

  initial begin
    my_id = ME; start = 0; word_valid = 0; word = '0; start_dst = '0; start_kind = PK_READ_DATA; start_len = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int len;
      word_t w [12];
      node_id_t d;
      pkt_kind_e kd;
      len = $urandom_range(1, 11);
      d   = node_id_t'($urandom);
      kd  = ($urandom_range(0, 1) != 0) ? PK_BLOCK_DATA : PK_READ_DATA;
      got.delete();
      @(negedge clk);
      check(!busy, "busy before start");
      start = 1; start_dst = d; start_kind = kd; start_len = len_t'(len);
      @(negedge clk);
      start = 0;
      check(busy, "not busy after start");
      for (int i = 0; i < len; i++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        w[i] = $urandom;
        word_valid = 1; word = w[i];
        #1;
        check(push == ((i % 2 == 1) || (i == len - 1)), $sformatf("len %0d word %0d push=%0b", len, i, push));
        @(negedge clk);
        word_valid = 0;
      end
      #1;
      check(!busy, "still busy after the last word");
      check(got.size() == (len + 1) / 2, $sformatf("len %0d: %0d packets", len, got.size()));
      foreach (got[p]) begin
        bit two;
        two = (2*p + 1 < len);
        check(got[p].full && got[p].dst == d && got[p].src == ME && got[p].kind == kd && !got[p].nack,
              "packet header");
        check(got[p].offset == len_t'(2*p), $sformatf("packet %0d offset %0d", p, got[p].offset));
        check(got[p].two == two, "two-word flag");
        check(got[p].payload[31:0] == w[2*p], "first word");
        if (two) check(got[p].payload[63:32] == w[2*p+1], "second word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
