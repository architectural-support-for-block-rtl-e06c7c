// Self-checking test of bt_ring_stage (node number 3). Random slots arrive
// from the previous node, with random refusals and a random Q_out head.
// The expected output slot one cycle later, the hand-over to UNPACK and the
// Q_out pop are worked out from the ring rules:
//  - a slot for another node passes unchanged;
//  - a slot for this node is taken off the ring, unless it is a request
//    being refused: then it goes back to its source with nack set;
//  - an empty or emptied slot takes the Q_out head if there is one.
// Counts how often each case happened and fails if one never did.
module tb_bt_ring_stage;
  import bt_pkg::*;
  localparam node_id_t ME = node_id_t'(3);

  logic clk = 1'b0, rst_n = 1'b0;
  node_id_t my_id;
  slot_t slot_in, slot_out, rx_slot, qout_head;
  logic rx_valid, rx_reject, qout_valid, qout_pop;
  int checks = 0, failures = 0;
  int n_pass = 0, n_take = 0, n_nack = 0, n_fill_empty = 0, n_fill_taken = 0;

  always #5 clk = !clk;

  bt_ring_stage dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic slot_t rnd_slot();
    slot_t s;
    s = slot_t'({$urandom, $urandom, $urandom});
    s.kind = pkt_kind_e'($urandom_range(0, 5));
    if ($urandom_range(0, 2) == 0) s.dst = ME;
    return s;
  endfunction

  initial begin
    my_id = ME; slot_in = EMPTY_SLOT; rx_reject = 0; qout_valid = 0; qout_head = EMPTY_SLOT;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      slot_t exp;
      bit    exp_rx, exp_pop, mine, req;
      @(negedge clk);
      slot_in    = rnd_slot();
      if ($urandom_range(0, 3) == 0) slot_in.full = 0;
      rx_reject  = 1'($urandom_range(0, 1));
      qout_valid = 1'($urandom_range(0, 1));
      qout_head  = rnd_slot();
      #1;
      mine = slot_in.full && slot_in.dst == ME;
      req  = (slot_in.kind == PK_READ_REQ || slot_in.kind == PK_WRITE_REQ || slot_in.kind == PK_BLOCK_REQ);
      exp_pop = 0;
      exp_rx  = 0;
      if (mine && req && !slot_in.nack && rx_reject) begin
        exp = slot_in; exp.nack = 1; exp.dst = slot_in.src; exp.src = ME;
        n_nack++;
      end else if (slot_in.full && !mine) begin
        exp = slot_in;
        n_pass++;
      end else begin
        exp_rx = mine;
        if (mine) n_take++;
        if (qout_valid) begin
          exp = qout_head; exp.full = 1; exp_pop = 1;
          if (mine) n_fill_taken++; else n_fill_empty++;
        end else exp = EMPTY_SLOT;
      end
      check(rx_valid == exp_rx, $sformatf("step %0d rx_valid=%0b expected %0b", i, rx_valid, exp_rx));
      if (exp_rx) check(rx_slot == slot_in, "rx_slot differs from the arriving slot");
      check(qout_pop == exp_pop, $sformatf("step %0d qout_pop=%0b expected %0b", i, qout_pop, exp_pop));
      @(posedge clk);
      #1;
      check(slot_out == exp, $sformatf("step %0d slot_out %h expected %h", i, slot_out, exp));
    end
    $display("pass=%0d taken=%0d refused=%0d filled_empty=%0d refilled=%0d", n_pass, n_take, n_nack, n_fill_empty, n_fill_taken);
    check(n_pass > 0 && n_take > 0 && n_nack > 0 && n_fill_empty > 0 && n_fill_taken > 0, "a case never happened");
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
