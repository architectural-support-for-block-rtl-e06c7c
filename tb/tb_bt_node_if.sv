// Self-checking test of bt_node_if: three node interfaces closed into a
// ring, each with a cache-memory buffer and a memory controller, driven
// through their processor ports. Checked against a reference copy of the
// memories:
//  - local writes and reads (exact cycle count 3 + k*M for k words);
//  - remote reads of one to four words (6 + k*M + N cycles, one or two
//    packets) and remote writes (7 + M + N cycles);
//  - a LONG_READ on an idle ring (8 + (L+2)*M + N cycles) and its data;
//  - two LONG_READs to the same node at once: the second is refused with a
//    negative acknowledgement, retried, and both copies are correct.
module tb_bt_node_if;
  import bt_pkg::*;
  localparam int N  = 3;
  localparam int L  = 16;
  localparam int M  = 3;
  localparam int MW = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  slot_t ring [N];
  logic      pv [N], prdy [N], pdone [N];
  proc_req_t pr [N];
  word_t     prd [N][LINE_WORDS];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  word_t shadow [N][MW];
  int lat [N];
  word_t rdv [N][LINE_WORDS];
  int n_refused = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar i = 0; i < N; i++) begin : g_node
    logic cm_push, cm_full, cm_empty, cm_pop, cm_resp_valid;
    mem_req_t cm_req, cm_head, im_req;
    logic im_valid, im_pop, im_resp_valid, resp_we;
    word_t resp_rdata;
    logic [1:0] cnt_u, free_u;

    bt_node_if #(.BLOCK_WORDS(L), .IM_DEPTH(2)) u_ni (
      .clk, .rst_n, .my_id (node_id_t'(i)),
      .slot_in (ring[(i + N - 1) % N]), .slot_out (ring[i]),
      .proc_req_valid (pv[i]), .proc_req (pr[i]), .proc_req_ready (prdy[i]),
      .proc_done (pdone[i]), .proc_rdata (prd[i]),
      .cm_push, .cm_req, .cm_full, .cm_resp_valid,
      .im_valid, .im_req, .im_pop, .im_resp_valid, .resp_we, .resp_rdata
    );
    bt_fifo #(.T(mem_req_t), .DEPTH(2)) u_cm (
      .clk, .rst_n, .push (cm_push), .wdata (cm_req), .pop (cm_pop), .rdata (cm_head),
      .empty (cm_empty), .full (cm_full), .count (cnt_u), .free (free_u)
    );
    bt_mem_ctrl #(.MEM_WORDS(MW), .MEM_CYCLES(M)) u_mc (
      .clk, .rst_n, .cm_valid (!cm_empty), .cm_req (cm_head), .cm_pop,
      .im_valid, .im_req, .im_pop, .cm_resp_valid, .im_resp_valid, .resp_we, .resp_rdata
    );
    // a packet coming back refused
    always @(posedge clk) if (rst_n && ring[i].full && ring[i].nack) n_refused++;
  end

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

  task automatic wr(input int n, input int node, input int a, input word_t d);
    issue(n, mk(OP_WRITE, node, a, 1, 0, d));
    shadow[node][a] = d;
  endtask

  task automatic rd(input int n, input int node, input int a, input int len);
    issue(n, mk(OP_READ, node, a, len, 0, '0));
    for (int k = 0; k < len; k++)
      check(rdv[n][k] == shadow[node][a+k], $sformatf("node %0d read %0d:%0d = %h expected %h",
            n, node, a+k, rdv[n][k], shadow[node][a+k]));
  endtask

  task automatic blk(input int n, input int src, input int sa, input int lb);
    issue(n, mk(OP_LONG_READ, src, sa, L, lb, '0));
    for (int k = 0; k < L; k++) shadow[n][lb+k] = shadow[src][sa+k];
  endtask

  task automatic verify(input int n, input int base);
    for (int a = base; a < base + L; a += 4) rd(n, n, a, 4);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin pv[i] = 0; pr[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // local writes, then local reads with their cycle count
    for (int i = 0; i < N; i++)
      for (int a = 0; a < L; a++) wr(i, i, a, $urandom);
    check(lat[0] == 3 + M, $sformatf("local write took %0d", lat[0]));
    rd(1, 1, 0, 4);
    check(lat[1] == 3 + 4*M, $sformatf("local 4-word read took %0d", lat[1]));
    // remote simple accesses
    for (int k = 1; k <= 4; k++) begin
      rd(0, 2, k, k);
      check(lat[0] == 6 + k*M + N, $sformatf("remote %0d-word read took %0d, expected %0d", k, lat[0], 6 + k*M + N));
    end
    wr(2, 1, 7, 32'h1234_5678);
    check(lat[2] == 7 + M + N, $sformatf("remote write took %0d, expected %0d", lat[2], 7 + M + N));
    rd(0, 1, 7, 1);
    // block transfer on an idle ring
    blk(0, 1, 0, 2*L);
    check(lat[0] == 8 + (L+2)*M + N, $sformatf("LONG_READ took %0d, expected %0d", lat[0], 8 + (L+2)*M + N));
    verify(0, 2*L);
    // two block transfers from node 0 at once
    fork
      blk(1, 0, 0, 3*L);
      begin @(posedge clk); blk(2, 0, 0, 3*L); end
    join
    check(n_refused > 0, "no request was refused");
    verify(1, 3*L);
    verify(2, 3*L);
    $display("refused requests: %0d", n_refused);
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
