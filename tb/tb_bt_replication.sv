// Page-replication workload on the full-size machine (16 nodes, 4 KB
// pages, default parameters). Eight nodes (8..15) each replicate pages of
// 1024 words from the memories of nodes 0..7 while nodes 0..7 keep issuing
// ordinary one-word remote reads to random nodes. The workload is run
// twice on the same hardware:
//  A. replication as a plain processor would do it: one-word remote reads
//     (through the cache, so one line fill per four words) and one local
//     write per word;
//  B. replication with one LONG_READ per page.
// Measured: the average time of one page replication and the average time
// of an ordinary remote read (cache hits included) during each run. Checked: every replicated
// page is correct; B's replication is faster than half of A's; ordinary
// remote reads take longer on average in B than in A (a block read holds
// its source node for the whole read phase, so ordinary requests to that
// node are refused more often).
module tb_bt_replication;
  import bt_pkg::*;
  localparam int N = 16;
  localparam int PAGE = 1024;
  localparam int PAGES_PER_NODE = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic      pv [N], prdy [N], pdone [N];
  proc_req_t pr [N];
  word_t     prd [N][LINE_WORDS];

  always #5 clk = !clk;

  bt_ring_system dut (
    .clk, .rst_n,
    .proc_req_valid (pv), .proc_req (pr), .proc_req_ready (prdy),
    .proc_done (pdone), .proc_rdata (prd)
  );

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  word_t shadow [N][8192];
  int    lat [N];
  word_t rdv [N][LINE_WORDS];
  bit    replicating;
  longint rep_cycles, rep_count, rd_cycles, rd_count;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input int n, input proc_req_t r);
    int unsigned t0;
    @(negedge clk);
    pv[n] = 1'b1; pr[n] = r;
    while (!prdy[n]) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    pv[n] = 1'b0;
    while (!pdone[n]) @(negedge clk);
    lat[n] = int'(cyc - t0);
    rdv[n] = prd[n];
  endtask

  function automatic proc_req_t mk(proc_op_e op, int node, int addr, int len, int lb, word_t wd);
    proc_req_t r;
    r.op = op; r.node = node_id_t'(node); r.addr = laddr_t'(addr);
    r.len = len_t'(len); r.local_base = laddr_t'(lb); r.wdata = wd;
    return r;
  endfunction

  // one page replication by node n from node src; returns its duration
  task automatic replicate(input int n, input int src, input int dst_base, input bit block, output int dur);
    int unsigned t0;
    t0 = cyc;
    if (block) begin
      issue(n, mk(OP_LONG_READ, src, 0, PAGE, dst_base, '0));
    end else begin
      for (int a = 0; a < PAGE; a++) begin
        issue(n, mk(OP_READ, src, a, 1, 0, '0));
        issue(n, mk(OP_WRITE, n, dst_base + a, 1, 0, rdv[n][0]));
      end
    end
    dur = int'(cyc - t0);
    for (int a = 0; a < PAGE; a++) shadow[n][dst_base + a] = shadow[src][a];
  endtask

  task automatic verify_page(input int n, input int base);
    for (int a = base; a < base + PAGE; a += 4) begin
      issue(n, mk(OP_READ, n, a, 4, 0, '0));
      for (int k = 0; k < 4; k++)
        if (rdv[n][k] != shadow[n][a+k]) begin
          check(0, $sformatf("node %0d word %0d = %h expected %h", n, a+k, rdv[n][k], shadow[n][a+k]));
          return;
        end
    end
    check(1, "");
  endtask

  task automatic run(input bit block, output real rep_avg, output real rd_avg);
    rep_cycles = 0; rep_count = 0; rd_cycles = 0; rd_count = 0;
    replicating = 1;
    fork
      begin
        for (int i = 8; i < N; i++) begin
          fork
            automatic int n = i;
            for (int p = 0; p < PAGES_PER_NODE; p++) begin
              int dur;
              replicate(n, $urandom_range(0, 7), PAGE * (1 + p + (block ? PAGES_PER_NODE : 0)), block, dur);
              rep_cycles += longint'(dur); rep_count++;
            end
          join_none
        end
        wait fork;
        replicating = 0;
      end
      begin
        for (int i = 0; i < 8; i++) begin
          fork
            automatic int n = i;
            while (replicating) begin
              int node, a;
              node = (n + $urandom_range(1, N - 1)) % N;
              a    = $urandom_range(0, PAGE - 1);
              issue(n, mk(OP_READ, node, a, 1, 0, '0));
              check(rdv[n][0] == shadow[node][a], $sformatf("ordinary read %0d:%0d", node, a));
              rd_cycles += longint'(lat[n]); rd_count++;
            end
          join_none
        end
        wait fork;
      end
    join
    rep_avg = real'(rep_cycles) / real'(rep_count);
    rd_avg  = real'(rd_cycles) / real'(rd_count);
    for (int i = 8; i < N; i++)
      for (int p = 0; p < PAGES_PER_NODE; p++)
        verify_page(i, PAGE * (1 + p + (block ? PAGES_PER_NODE : 0)));
  endtask

  initial begin
    real rep_a, rd_a, rep_b, rd_b;
    for (int i = 0; i < N; i++) begin pv[i] = 0; pr[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // every node fills its first page; nodes 0..7 are the page sources
    for (int i = 0; i < N; i++) begin
      fork
        automatic int n = i;
        for (int a = 0; a < PAGE; a++) begin
          automatic word_t d;
          d = $urandom;
          issue(n, mk(OP_WRITE, n, a, 1, 0, d));
          shadow[n][a] = d;
        end
      join_none
    end
    wait fork;

    run(1'b0, rep_a, rd_a);
    $display("word-by-word replication: %0.0f cycles per page, ordinary remote read %0.1f cycles", rep_a, rd_a);
    run(1'b1, rep_b, rd_b);
    $display("LONG_READ replication:    %0.0f cycles per page, ordinary remote read %0.1f cycles", rep_b, rd_b);
    $display("replication time ratio LONG_READ / word-by-word = %0.2f", rep_b / rep_a);
    check(rep_b < rep_a / 2.0, "LONG_READ replication is not faster than half of word-by-word replication");
    check(rd_b > rd_a, "ordinary remote reads did not slow down under block transfers");
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
