// Self-checking test of bt_mem_ctrl. Two request queues in the testbench
// play the cache-memory and interface-memory buffers. Checked: every
// response comes on the port its request came from, exactly MEM_CYCLES
// cycles after the request was popped; read data matches a memory model;
// while both queues hold requests the grants alternate (round robin); a
// new grant follows a response at once (one access per MEM_CYCLES cycles).
module tb_bt_mem_ctrl;
  import bt_pkg::*;
  localparam int unsigned MEM_CYCLES = 3;
  localparam int unsigned WORDS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cm_valid, im_valid, cm_pop, im_pop, cm_resp_valid, im_resp_valid, resp_we;
  mem_req_t cm_req, im_req;
  word_t resp_rdata;
  mem_req_t q [2][$];
  word_t model [WORDS];
  int checks = 0, failures = 0;
  int cyc = 0;

  // request in service
  bit       pend = 0;
  int       pend_port, pend_at;
  mem_req_t pend_req;
  int       last_grant = -1;
  int       grants_both = 0, alternations = 0;

  always #5 clk = !clk;

  bt_mem_ctrl #(.MEM_WORDS(WORDS), .MEM_CYCLES(MEM_CYCLES)) dut (.*);

  // traffic generation: 0 idle, 1 clear memory, 2 random
  int phase = 0;
  int gen_left = 0;

  function automatic void refresh();
    cm_valid = q[0].size() != 0;
    im_valid = q[1].size() != 0;
    cm_req   = cm_valid ? q[0][0] : '0;
    im_req   = im_valid ? q[1][0] : '0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: cycle %0d %s", cyc, what); end
  endtask

  // monitor, sampled in the middle of each cycle
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cm_resp_valid || im_resp_valid) begin
      check(pend, "response without request");
      check(!(cm_resp_valid && im_resp_valid), "two responses at once");
      check((im_resp_valid ? 1 : 0) == pend_port, "response on the wrong port");
      check(cyc - pend_at == MEM_CYCLES, $sformatf("latency %0d", cyc - pend_at));
      check(resp_we == pend_req.we, "response kind");
      if (!pend_req.we)
        check(resp_rdata == model[pend_req.addr[5:0]],
              $sformatf("read %h expected %h", resp_rdata, model[pend_req.addr[5:0]]));
      pend = 0;
    end
    if (cm_pop || im_pop) begin
      check(!pend, "grant while busy");
      check(!(cm_pop && im_pop), "two grants at once");
      if (cm_valid && im_valid) begin
        grants_both++;
        if (last_grant >= 0) begin
          check((im_pop ? 1 : 0) != last_grant, "round robin: same port served twice while both waited");
          alternations++;
        end
      end
      pend = 1; pend_port = im_pop ? 1 : 0; pend_at = cyc;
      pend_req = im_pop ? q[1][0] : q[0][0];
      if (pend_req.we) model[pend_req.addr[5:0]] = pend_req.wdata;
      last_grant = pend_port;
    end else if (!pend && (cm_valid || im_valid)) begin
      check(0, "request waiting while the memory is idle");
    end
  end

  // Pop the queues on the clock edge that the controller popped, then add
  // new requests; all changes are made just after the edge.
  always @(posedge clk) begin
    automatic bit pc = cm_pop, pi = im_pop;
    #1;
    if (pc) void'(q[0].pop_front());
    if (pi) void'(q[1].pop_front());
    if (phase == 2 && gen_left > 0) begin
      gen_left--;
      for (int p = 0; p < 2; p++)
        if ($urandom_range(0, 99) < 30 && q[p].size() < 2)
          q[p].push_back('{we: 1'($urandom_range(0, 1)), addr: laddr_t'($urandom_range(0, WORDS - 1)), wdata: $urandom});
    end
    refresh();
  end

  initial begin
    for (int a = 0; a < WORDS; a++) model[a] = '0;
    refresh();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clear the memory through port 0
    @(posedge clk); #2;
    for (int a = 0; a < WORDS; a++) q[0].push_back('{we: 1'b1, addr: laddr_t'(a), wdata: '0});
    refresh();
    while (q[0].size() != 0) @(posedge clk);
    // random traffic on both ports
    gen_left = 1500;
    phase = 2;
    while (gen_left > 0 || q[0].size() != 0 || q[1].size() != 0) @(posedge clk);
    repeat (MEM_CYCLES + 2) @(posedge clk);
    check(grants_both > 20, $sformatf("only %0d grants with both ports waiting", grants_both));
    $display("grants with both waiting: %0d", grants_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
