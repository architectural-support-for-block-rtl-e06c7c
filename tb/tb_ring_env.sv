// End-to-end test environment of the ring multiprocessor, shared by the
// reduced-size test (tb_bt_ring_system) and the default-size test
// (tb_bt_ring_system_full). With FULL=1 the design is instantiated with its
// own default parameters; otherwise with N, L, M, MW.
//
// A reference copy of every node's memory is kept in the testbench and
// updated on every write the test issues. The phases:
//  1. every node writes a pattern into words [0, L) of its own memory;
//  2. idle ring: remote one-word reads from node 0 to every other node,
//     a four-word (two-packet) read, a remote write, local accesses, all
//     with their exact cycle counts;
//  3. idle ring: one LONG_READ of L words with its exact cycle count;
//  4. contention: several nodes copy from, and read, the same node at once
//     (refusals with negative acknowledgement and retries, round-robin
//     sharing of a memory between a block write and a remote request,
//     Q_write backlog);
//  5. every node copies a block from its successor at the same time, so
//     that all data crosses nearly the whole ring (Q_out backlog).
// Every copied block is read back word by word through the processor ports.
// Expected cycle counts on an idle ring (cycles from the accepting clock
// edge to the cycle proc_done is high), derived from the pipeline; the
// cache adds two cycles to every request it forwards:
//  one-word read, cache hit       : 1
//  one-word remote read, miss     : 8 + 4*M + N  (line fill, two packets;
//                                   the round trip is always N hops)
//  remote read of k > 1 words     : 8 + k*M + N  (uncached)
//  remote write                   : 9 + M + N
//  local read of k > 1 words      : 5 + k*M
//  LONG_READ of L words           : 10 + (L+2)*M + N
// A word cached before a LONG_READ overwrites it must read back new.
module tb_ring_env
  import bt_pkg::*;
#(
  parameter bit          FULL = 1'b0,
  parameter int unsigned N    = 8,
  parameter int unsigned L    = 32,
  parameter int unsigned M    = 2,
  parameter int unsigned MW   = 256,
  parameter int unsigned MAX_CYCLES = 200000
);
  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      pv   [N];
  proc_req_t pr   [N];
  logic      prdy [N];
  logic      pdone[N];
  word_t     prd  [N][LINE_WORDS];

  always #5 clk = !clk;

  if (FULL) begin : g_full
    bt_ring_system dut (
      .clk, .rst_n,
      .proc_req_valid (pv), .proc_req (pr), .proc_req_ready (prdy),
      .proc_done (pdone), .proc_rdata (prd)
    );
  end else begin : g_small
    bt_ring_system #(.N_NODES(N), .BLOCK_WORDS(L), .MEM_WORDS(MW), .MEM_CYCLES(M)) dut (
      .clk, .rst_n,
      .proc_req_valid (pv), .proc_req (pr), .proc_req_ready (prdy),
      .proc_done (pdone), .proc_rdata (prd)
    );
  end

  int unsigned cyc = 0;
  int          checks = 0, failures = 0;
  word_t       shadow [N][MW];
  int          lat [N];
  word_t       rdv [N][LINE_WORDS];
  word_t       salt;

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int n_nack_sent [N], n_retry [N], n_rr [N], n_qw_backlog [N], n_qout_backlog [N];
  int n_two_pkt_reads = 0, n_remote_writes = 0, n_blocks = 0, n_local = 0;
  int n_hit [N], n_inval [N], n_serve_in_write [N];
  initial
    for (int i = 0; i < N; i++) begin
      n_nack_sent[i] = 0; n_retry[i] = 0; n_rr[i] = 0; n_qw_backlog[i] = 0; n_qout_backlog[i] = 0;
      n_hit[i] = 0; n_inval[i] = 0; n_serve_in_write[i] = 0;
    end

  for (genvar i = 0; i < N; i++) begin : g_cnt
    if (FULL) begin : g_f
      always @(posedge clk) if (rst_n) begin
        if (g_full.dut.g_node[i].u_ni.u_ring.nack_back) n_nack_sent[i]++;
        if (g_full.dut.g_node[i].u_ni.u_nack)           n_retry[i]++;
        if (g_full.dut.g_node[i].u_mc.cm_valid && g_full.dut.g_node[i].u_mc.im_valid &&
            !g_full.dut.g_node[i].u_mc.busy)             n_rr[i]++;
        if (g_full.dut.g_node[i].u_ni.wq_count >= 2)     n_qw_backlog[i]++;
        if (g_full.dut.g_node[i].u_ni.qout_count >= 2)   n_qout_backlog[i]++;
        if (g_full.dut.g_node[i].u_ni.s_accept && !g_full.dut.g_node[i].u_ni.wq_empty) n_serve_in_write[i]++;
        if (g_full.dut.g_node[i].u_cache.inv_match)      n_inval[i]++;
        if (g_full.dut.g_node[i].u_cache.state == 2'd0 && pv[i] &&
            g_full.dut.g_node[i].u_cache.cacheable && g_full.dut.g_node[i].u_cache.hit) n_hit[i]++;
      end
    end else begin : g_s
      always @(posedge clk) if (rst_n) begin
        if (g_small.dut.g_node[i].u_ni.u_ring.nack_back) n_nack_sent[i]++;
        if (g_small.dut.g_node[i].u_ni.u_nack)           n_retry[i]++;
        if (g_small.dut.g_node[i].u_mc.cm_valid && g_small.dut.g_node[i].u_mc.im_valid &&
            !g_small.dut.g_node[i].u_mc.busy)             n_rr[i]++;
        if (g_small.dut.g_node[i].u_ni.wq_count >= 2)     n_qw_backlog[i]++;
        if (g_small.dut.g_node[i].u_ni.qout_count >= 2)   n_qout_backlog[i]++;
        if (g_small.dut.g_node[i].u_ni.s_accept && !g_small.dut.g_node[i].u_ni.wq_empty) n_serve_in_write[i]++;
        if (g_small.dut.g_node[i].u_cache.inv_match)      n_inval[i]++;
        if (g_small.dut.g_node[i].u_cache.state == 2'd0 && pv[i] &&
            g_small.dut.g_node[i].u_cache.cacheable && g_small.dut.g_node[i].u_cache.hit) n_hit[i]++;
      end
    end
  end

  // ---------------- helpers ----------------
  function automatic word_t pat(int n, int a);
    return (word_t'(n) << 24) ^ (word_t'(a) * 32'h9E37_79B1) ^ salt;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic issue(input int n, input proc_req_t r);
    @(negedge clk);
    pv[n] = 1'b1;
    pr[n] = r;
    while (!prdy[n]) @(negedge clk);
    begin
      int unsigned t0;
      t0 = cyc;
      @(negedge clk);
      pv[n] = 1'b0;
      while (!pdone[n]) @(negedge clk);
      lat[n] = int'(cyc - t0);
    end
    rdv[n] = prd[n];
  endtask

  function automatic proc_req_t mk(proc_op_e op, int node, int addr, int len, int lb, word_t wd);
    proc_req_t r;
    r.op = op; r.node = node_id_t'(node); r.addr = laddr_t'(addr);
    r.len = len_t'(len); r.local_base = laddr_t'(lb); r.wdata = wd;
    return r;
  endfunction

  task automatic do_write(input int n, input int node, input int a, input word_t d);
    issue(n, mk(OP_WRITE, node, a, 1, 0, d));
    shadow[node][a] = d;
    if (node != n) n_remote_writes++; else n_local++;
  endtask

  task automatic do_read(input int n, input int node, input int a, input int len);
    issue(n, mk(OP_READ, node, a, len, 0, '0));
    for (int k = 0; k < len; k++)
      check(rdv[n][k] == shadow[node][a+k],
            $sformatf("node %0d read node %0d word %0d: %h, expected %h", n, node, a+k, rdv[n][k], shadow[node][a+k]));
    if (node == n) n_local++;
  endtask

  task automatic do_block(input int n, input int src, input int sa, input int lb, input int len);
    issue(n, mk(OP_LONG_READ, src, sa, len, lb, '0));
    for (int k = 0; k < len; k++) shadow[n][lb+k] = shadow[src][sa+k];
    n_blocks++;
  endtask

  // read back a region through local reads of four words
  task automatic verify_region(input int n, input int base, input int len);
    for (int a = base; a < base + len; a += 4)
      do_read(n, n, a, (base + len - a) >= 4 ? 4 : base + len - a);
  endtask

  // ---------------- test ----------------
  initial begin
    salt = $urandom;
    for (int i = 0; i < N; i++) begin pv[i] = 1'b0; pr[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. fill [0, L) of every memory, all nodes at once
    for (int i = 0; i < N; i++) begin
      fork
        automatic int n = i;
        for (int a = 0; a < L; a++) do_write(n, n, a, pat(n, a));
      join_none
    end
    wait fork;

    // 2. idle-ring latencies
    for (int d = 1; d < N; d++) begin
      do_read(0, d, 4*d + 1, 1);   // one line per node, different cache lines
      check(lat[0] == 8 + 4*M + N, $sformatf("remote read miss of node %0d took %0d cycles, expected %0d", d, lat[0], 8 + 4*M + N));
      n_two_pkt_reads++;
      do_read(0, d, 4*d, 1);
      check(lat[0] == 1, $sformatf("cache hit took %0d cycles", lat[0]));
    end
    do_read(0, 1, 4, 2);
    check(lat[0] == 8 + 2*M + N, $sformatf("2-word remote read took %0d, expected %0d", lat[0], 8 + 2*M + N));
    do_write(0, 2, 8, 32'hCAFE_0008);     // hits the line cached above
    check(lat[0] == 9 + M + N, $sformatf("remote write took %0d, expected %0d", lat[0], 9 + M + N));
    do_read(0, 2, 8, 1);                  // updated copy in the cache
    check(lat[0] == 1, "read after write-through did not hit");
    do_read(3 % N, 2, 8, 1);              // another node sees the write in memory
    do_read(0, 0, 0, 4);
    check(lat[0] == 5 + 4*M, $sformatf("local 4-word read took %0d, expected %0d", lat[0], 5 + 4*M));

    // 3. one block transfer on an idle ring
    do_block(0, 1, 0, 2*L, L);
    check(lat[0] == 10 + (L+2)*M + N, $sformatf("LONG_READ took %0d cycles, expected %0d", lat[0], 10 + (L+2)*M + N));
    $display("idle LONG_READ of %0d words: %0d cycles", L, lat[0]);
    verify_region(0, 2*L, L);

    // 4. contention around node 2
    fork
      do_block(2, 3 % N, 0, 2*L, L);                     // node 2 writes its memory
      begin repeat (4) @(posedge clk); do_block(1, 2, 0, 3*L, L); end   // node 2 serves node 1
      begin repeat (8) @(posedge clk); do_block(3 % N, 2, 0, 3*L, L); end // refused while node 2 busy
      begin
        repeat (6) @(posedge clk);
        for (int k = 0; k < 6; k++) do_read(0, 2, 8 + k, 1);  // refused, retried
      end
    join
    verify_region(2, 2*L, L);
    verify_region(1, 3*L, L);
    verify_region(3 % N, 3*L, L);

    // 5. every node copies from its successor at once; node 3 has a word of
    //    the destination in its cache beforehand
    do_read(3 % N, 3 % N, 3*L + 1, 1);
    for (int i = 0; i < N; i++) begin
      fork
        automatic int n = i;
        do_block(n, (n + 1) % N, 0, 3*L, L);
      join_none
    end
    wait fork;
    do_read(3 % N, 3 % N, 3*L + 1, 1);   // must not return the stale cached word
    for (int i = 0; i < N; i++) begin
      fork
        automatic int n = i;
        verify_region(n, 3*L, L);
      join_none
    end
    wait fork;

    // mechanisms that must have happened
    begin
      automatic int s_nack = 0, s_retry = 0, s_rr = 0, s_qw = 0, s_qo = 0, s_hit = 0, s_inv = 0, s_siw = 0;
      for (int i = 0; i < N; i++) begin
        s_hit += n_hit[i]; s_inv += n_inval[i]; s_siw += n_serve_in_write[i];
        s_nack += n_nack_sent[i]; s_retry += n_retry[i]; s_rr += n_rr[i];
        s_qw += n_qw_backlog[i]; s_qo += n_qout_backlog[i];
      end
      $display("mechanisms: refusals=%0d retries=%0d round_robin_conflicts=%0d qwrite_backlog_cycles=%0d qout_backlog_cycles=%0d",
               s_nack, s_retry, s_rr, s_qw, s_qo);
      $display("            line_fills_over_ring=%0d remote_writes=%0d block_transfers=%0d local_accesses=%0d",
               n_two_pkt_reads, n_remote_writes, n_blocks, n_local);
      $display("            cache_hits=%0d cache_lines_invalidated=%0d requests_served_during_own_block_write=%0d",
               s_hit, s_inv, s_siw);
      check(s_hit > 0,   "no cache hit");
      check(s_inv > 0,   "no cache line invalidated by a block write");
      check(s_nack > 0,  "no request was ever refused");
      check(s_retry == s_nack, $sformatf("retries %0d != refusals %0d", s_retry, s_nack));
      check(s_rr > 0,    "the memory controller never chose between two buffers");
      check(s_siw > 0,   "no request was accepted while the node's own block write was in progress");
      check(s_qw > 0,    "Q_write never held more than one packet");
      check(s_qo > 0,    "Q_out never held more than one packet");
      check(n_two_pkt_reads > 0 && n_remote_writes > 0 && n_blocks > 0 && n_local > 0,
            "an access kind was never exercised");
    end
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
