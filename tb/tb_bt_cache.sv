// Self-checking test of bt_cache (node 1). A behavioural model of the node
// interface answers forwarded requests after a random delay from a model of
// every node's memory, and carries out writes and LONG_READs on it. Only
// this cache changes the memories, so the model is the truth for every
// read. Random one-word reads (over a small address range, so lines are
// reused and evicted), writes, multi-word reads and LONG_READs into node
// 1's memory are issued. Checked: every read value; a hit answers in one
// cycle without a request to the node interface; a miss asks for one
// aligned four-word line; a word cached before a LONG_READ overwrites it
// reads back new; hits, fills and invalidations all happen.
module tb_bt_cache;
  import bt_pkg::*;
  localparam int LINES = 8;
  localparam int NN = 4;
  localparam int AW = 64;
  localparam node_id_t ME = node_id_t'(1);

  logic clk = 1'b0, rst_n = 1'b0;
  node_id_t my_id;
  logic p_req_valid, p_req_ready, p_done, n_req_valid, n_req_ready, n_done;
  proc_req_t p_req, n_req;
  word_t p_rdata [LINE_WORDS], n_rdata [LINE_WORDS];
  word_t gm [NN][AW];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int n_requests = 0, n_fills = 0, n_hits = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  bt_cache #(.LINES(LINES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: cycle %0d %s", cyc, what); end
  endtask

  // ---- behavioural node interface ----
  initial begin
    n_req_ready = 1'b1; n_done = 1'b0;
    for (int k = 0; k < LINE_WORDS; k++) n_rdata[k] = '0;
    forever begin
      proc_req_t r;
      @(negedge clk);
      if (n_req_valid) begin
        r = n_req;
        n_requests++;
        @(negedge clk);
        n_req_ready = 1'b0;
        repeat ($urandom_range(2, 9)) @(negedge clk);
        unique case (r.op)
          OP_READ: begin
            if (r.len == len_t'(LINE_WORDS)) begin
              n_fills++;
            end
            for (int k = 0; k < LINE_WORDS; k++)
              n_rdata[k] = (k < int'(r.len)) ? gm[int'(r.node)][int'(r.addr) + k] : '0;
          end
          OP_WRITE: gm[int'(r.node)][int'(r.addr)] = r.wdata;
          default:
            for (int k = 0; k < int'(r.len); k++) gm[int'(ME)][int'(r.local_base) + k] = gm[int'(r.node)][int'(r.addr) + k];
        endcase
        n_done = 1'b1;
        @(negedge clk);
        n_done = 1'b0;
        n_req_ready = 1'b1;
      end
    end
  end

  // a forwarded line fill must be aligned
  always @(negedge clk)
    if (n_req_valid && n_req.op == OP_READ && n_req.len == len_t'(LINE_WORDS) && dut.state == 2'd1)
      check(n_req.addr[1:0] == 2'b00, "line fill not aligned");

  // ---- processor ----
  int lat;
  task automatic issue(input proc_req_t r);
    int unsigned t0;
    @(negedge clk);
    p_req_valid = 1'b1; p_req = r;
    while (!p_req_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    p_req_valid = 1'b0;
    while (!p_done) @(negedge clk);
    lat = int'(cyc - t0);
  endtask

  function automatic proc_req_t mk(proc_op_e op, int node, int addr, int len, int lb, word_t wd);
    proc_req_t r;
    r.op = op; r.node = node_id_t'(node); r.addr = laddr_t'(addr);
    r.len = len_t'(len); r.local_base = laddr_t'(lb); r.wdata = wd;
    return r;
  endfunction

  task automatic read1(input int node, input int a);
    int n_before;
    n_before = n_requests;
    issue(mk(OP_READ, node, a, 1, 0, '0));
    check(p_rdata[0] == gm[node][a], $sformatf("read %0d:%0d = %h expected %h", node, a, p_rdata[0], gm[node][a]));
    if (n_requests == n_before) begin
      n_hits++;
      check(lat == 1, $sformatf("hit took %0d cycles", lat));
    end else
      check(n_requests == n_before + 1, "more than one request for a miss");
  endtask

  initial begin
    my_id = ME; p_req_valid = 0; p_req = '0;
    for (int n = 0; n < NN; n++) for (int a = 0; a < AW; a++) gm[n][a] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: miss, hit, invalidation by LONG_READ
    read1(2, 5);
    read1(2, 6);
    check(n_hits == 1, "second word of a line did not hit");
    read1(1, 41);                                           // cache a line of node 1
    issue(mk(OP_LONG_READ, 3, 0, 10, 36, '0));              // overwrites node 1 words 36..45
    read1(1, 41);
    check(gm[1][41] == gm[3][5], "model LONG_READ");
    // random mix
    for (int i = 0; i < 3000; i++) begin
      int r, node, a;
      r = $urandom_range(0, 99);
      node = $urandom_range(0, NN - 1);
      a = $urandom_range(0, AW - 8);
      if (r < 70) read1(node, a);
      else if (r < 85) issue(mk(OP_WRITE, node, a, 1, 0, $urandom));
      else if (r < 95) begin
        int len;
        len = $urandom_range(2, 4);
        issue(mk(OP_READ, node, a, len, 0, '0));
        for (int k = 0; k < len; k++) check(p_rdata[k] == gm[node][a+k], "uncached multi-word read");
      end else begin
        int src;
        src = (1 + $urandom_range(1, NN - 1)) % NN;
        issue(mk(OP_LONG_READ, src, $urandom_range(0, 40), $urandom_range(1, 16), $urandom_range(0, 40), '0));
      end
    end
    $display("requests=%0d fills=%0d hits=%0d", n_requests, n_fills, n_hits);
    check(n_hits > 100 && n_fills > 100, "too few hits or fills");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
