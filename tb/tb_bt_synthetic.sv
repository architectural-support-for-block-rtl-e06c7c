// Synthetic-algorithm workloads on the full-size machine (16 nodes, 4 KB
// pages, default parameters): a matrix multiply and a red-black successive
// over-relaxation (SOR). Each algorithm runs for a fixed window of
// 2,000,000 cycles, twice on the same hardware: once with page replication
// done word by word (one-word reads through the cache and one local write
// per word) and once with one LONG_READ per page. The figure of merit is
// the number of program accesses (reads and writes made by the algorithm
// itself, not by a replication) completed inside the window.
//
// Page replication policy (this testbench's own, a simple stand-in for an
// operating system): read-only shared data lives in 4 KB pages on nodes
// 0..3. The first time a node touches such a page that is not in its own
// memory, the page is replicated into the node's memory and every later
// access goes to the local copy. Writable shared data is never replicated.
//
//  * Matrix multiply, C = A x B, 64 x 64 words. Node i owns rows 4i..4i+3
//    of A and C. B is four pages, page p (rows 16p..16p+15) on node p, and
//    is replicated by every node. The product is recomputed in a loop until
//    the window ends. Each element of C is compared with a reference.
//  * SOR on a 64 x 64 grid of words, node i owning rows 4i..4i+3. A point
//    becomes (up + down + left + right + f) >> 2 (32-bit wrap-around); the
//    border stays fixed. The read-only right-hand side f is four pages on
//    nodes 0..3 and is replicated. Rows of a neighbour node are read
//    remotely with uncached two-word reads, so these are ordinary remote
//    accesses mixed with the block transfers. The half-sweeps of each
//    colour are separated by a barrier (not modelled as memory traffic).
//
// Checked: every value read equals the last value written (a reference
// copy of every memory is kept), every C element equals the reference
// product, the memories read back correctly after each run, each run makes
// its replications, and a LONG_READ replication is faster than a
// word-by-word one (in the matrix multiply, by more than half; in SOR the
// three or four nodes that copy from one source node wait for each other's
// block reads, so only the direction is checked). The program-access
// counts and the average ordinary remote access time are printed for
// comparison, not checked: the balance between faster replications and
// slower ordinary accesses depends on the access pattern.
module tb_bt_synthetic;
  import bt_pkg::*;
  localparam int N      = 16;
  localparam int PAGE   = 1024;
  localparam int DIM    = 64;
  localparam int ROWS   = DIM / N;         // rows per node
  localparam int WINDOW = 2000000;
  // local word addresses
  localparam int A_BASE    = 0;            // matrix multiply: own rows of A
  localparam int C_BASE    = 256;          //                  own rows of C
  localparam int B_BASE    = 1024;         //                  page of B (nodes 0..3)
  localparam int BREP_BASE = 4096;         //                  replicas of B, +4096 in LONG_READ runs
  localparam int G_BASE    = 12288;        // SOR: own rows of the grid
  localparam int F_BASE    = 13312;        //      page of f (nodes 0..3)
  localparam int FREP_BASE = 14336;        //      replica of f, +1024 in LONG_READ runs

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
  word_t shadow [N][16384];
  word_t cref [DIM][DIM];
  bit    cwritten [DIM][DIM];
  int    lat [N];
  word_t rdv [N][LINE_WORDS];
  bit    have_page [N][4];
  int unsigned t_end;
  longint n_prog, rep_cycles, rep_count, rem_cycles, rem_count;

  // the per-node processes of one phase count themselves out here
  int active;
  task automatic wait_all();
    while (active != 0) @(negedge clk);
  endtask

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

  // copy page p (at src_base on node p) into node n at dst_base
  task automatic replicate(input int n, input int p, input int src_base, input int dst_base, input bit block);
    int unsigned t0;
    t0 = cyc;
    if (block) begin
      issue(n, mk(OP_LONG_READ, p, src_base, PAGE, dst_base, '0));
    end else begin
      for (int a = 0; a < PAGE; a++) begin
        issue(n, mk(OP_READ, p, src_base + a, 1, 0, '0));
        issue(n, mk(OP_WRITE, n, dst_base + a, 1, 0, rdv[n][0]));
      end
    end
    rep_cycles += longint'(int'(cyc - t0)); rep_count++;
    for (int a = 0; a < PAGE; a++) shadow[n][dst_base + a] = shadow[p][src_base + a];
  endtask

  // one program read of node:addr (uncached two-word read when remote)
  task automatic prog_read(input int n, input int node, input int addr, output word_t v);
    issue(n, mk(OP_READ, node, addr, node == n ? 1 : 2, 0, '0));
    v = rdv[n][0];
    if (v != shadow[node][addr]) begin
      failures++;
      $display("FAIL: node %0d read %0d:%0d = %h expected %h", n, node, addr, v, shadow[node][addr]);
    end
    if (cyc <= t_end) begin
      n_prog++;
      if (node != n) begin rem_cycles += longint'(lat[n]); rem_count++; end
    end
  endtask

  task automatic prog_write(input int n, input int addr, input word_t v);
    issue(n, mk(OP_WRITE, n, addr, 1, 0, v));
    shadow[n][addr] = v;
    if (cyc <= t_end) n_prog++;
  endtask

  // local address of a word of a replicated page, replicating on first touch
  task automatic page_addr(input int n, input int p, input int off, input int src_base,
                           input int rep_base, input bit block, output int addr);
    if (n == p) begin
      addr = src_base + off;
    end else begin
      if (!have_page[n][p]) begin
        replicate(n, p, src_base, rep_base, block);
        have_page[n][p] = 1'b1;
      end
      addr = rep_base + off;
    end
  endtask

  task automatic reset_machine();
    @(negedge clk);
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) for (int p = 0; p < 4; p++) have_page[n][p] = 1'b0;
    n_prog = 0; rep_cycles = 0; rep_count = 0; rem_cycles = 0; rem_count = 0;
  endtask

  // read back words base..base+len-1 of node n and compare with the reference copy
  task automatic verify(input int n, input int base, input int len, input string what);
    for (int a = base; a < base + len; a += 4) begin
      issue(n, mk(OP_READ, n, a, 4, 0, '0));
      for (int k = 0; k < 4; k++)
        if (rdv[n][k] != shadow[n][a+k]) begin
          check(0, $sformatf("%s: node %0d word %0d = %h expected %h", what, n, a+k, rdv[n][k], shadow[n][a+k]));
          return;
        end
    end
    check(1, "");
  endtask

  // ---------------------------------------------------------------- matrix multiply
  task automatic mm_node(input int n, input bit block);
    int rep_base;
    rep_base = BREP_BASE + (block ? 4096 : 0);
    while (cyc < t_end) begin
      for (int r = 0; r < ROWS && cyc < t_end; r++)
        for (int j = 0; j < DIM && cyc < t_end; j++) begin
          word_t sum, a, b;
          int ba;
          bit done;
          sum = '0; done = 1'b1;
          for (int k = 0; k < DIM && done; k++) begin
            done = (cyc < t_end);
            if (done) begin
              prog_read(n, n, A_BASE + r * DIM + k, a);
              page_addr(n, k / 16, (k % 16) * DIM + j, B_BASE, rep_base + (k / 16) * PAGE, block, ba);
              prog_read(n, n, ba, b);
              sum += a * b;
            end
          end
          if (done) begin
            check(sum == cref[ROWS * n + r][j], $sformatf("C[%0d][%0d]", ROWS * n + r, j));
            prog_write(n, C_BASE + r * DIM + j, sum);
            cwritten[ROWS * n + r][j] = 1'b1;
          end
        end
    end
  endtask

  task automatic mm_run(input bit block, output longint prog, output real rep_avg);
    reset_machine();
    for (int r = 0; r < DIM; r++) for (int j = 0; j < DIM; j++) cwritten[r][j] = 1'b0;
    t_end = cyc + WINDOW;
    active = N;
    for (int i = 0; i < N; i++)
      fork
        automatic int n = i;
        begin mm_node(n, block); active--; end
      join_none
    wait_all();
    prog = n_prog;
    rep_avg = real'(rep_cycles) / real'(rep_count);
    check(int'(rep_count) == 4 * N - 4, $sformatf("matrix multiply made %0d replications, expected %0d", rep_count, 4 * N - 4));
    for (int i = 0; i < N; i++) begin
      verify(i, C_BASE, ROWS * DIM, "C");
      for (int p = 0; p < 4; p++)
        if (p != i) verify(i, BREP_BASE + (block ? 4096 : 0) + p * PAGE, PAGE, "replica of B");
    end
  endtask

  // ---------------------------------------------------------------- SOR
  task automatic sor_half(input int n, input int colour, input bit block);
    int frep;
    frep = FREP_BASE + (block ? 1024 : 0);
    for (int lr = 0; lr < ROWS; lr++) begin
      int r;
      r = ROWS * n + lr;
      for (int c = 1; c < DIM - 1; c++) begin
        word_t up, dn, lf, rt, f;
        int fa;
        if (r != 0 && r != DIM - 1 && (r + c) % 2 == colour && cyc < t_end) begin
          prog_read(n, (r - 1) / ROWS, G_BASE + ((r - 1) % ROWS) * DIM + c, up);
          prog_read(n, (r + 1) / ROWS, G_BASE + ((r + 1) % ROWS) * DIM + c, dn);
          prog_read(n, n, G_BASE + lr * DIM + c - 1, lf);
          prog_read(n, n, G_BASE + lr * DIM + c + 1, rt);
          page_addr(n, r / 16, (r % 16) * DIM + c, F_BASE, frep, block, fa);
          prog_read(n, n, fa, f);
          prog_write(n, G_BASE + lr * DIM + c, (up + dn + lf + rt + f) >> 2);
        end
      end
    end
  endtask

  task automatic sor_run(input bit block, output longint prog, output real rep_avg, output real rem_avg);
    int sweeps;
    reset_machine();
    // the same starting grid for both runs
    active = N;
    for (int i = 0; i < N; i++)
      fork
        automatic int n = i;
        begin
          for (int a = 0; a < ROWS * DIM; a++) begin
            automatic word_t d;
            d = word_t'((ROWS * n * DIM + a) * 2654435761);
            issue(n, mk(OP_WRITE, n, G_BASE + a, 1, 0, d));
            shadow[n][G_BASE + a] = d;
          end
          active--;
        end
      join_none
    wait_all();
    t_end = cyc + WINDOW;
    sweeps = 0;
    while (cyc < t_end) begin
      for (int colour = 0; colour < 2; colour++) begin
        active = N;
        for (int i = 0; i < N; i++)
          fork
            automatic int n = i;
            automatic int col = colour;
            begin sor_half(n, col, block); active--; end
          join_none
        wait_all();
      end
      sweeps++;
    end
    prog = n_prog;
    rep_avg = real'(rep_cycles) / real'(rep_count);
    rem_avg = real'(rem_cycles) / real'(rem_count);
    $display("  %0d sweeps begun in the window", sweeps);
    check(int'(rep_count) == N - 1, $sformatf("SOR made %0d replications, expected %0d", rep_count, N - 1));
    for (int i = 0; i < N; i++) begin
      verify(i, G_BASE, ROWS * DIM, "grid");
      if (i / 4 != i) verify(i, FREP_BASE + (block ? 1024 : 0), PAGE, "replica of f");
    end
  endtask

  // A rows on every node, pages of B and f on nodes 0..3
  task automatic fill_data();
    active = N;
    for (int i = 0; i < N; i++)
      fork
        automatic int n = i;
        begin
          for (int a = 0; a < ROWS * DIM; a++) begin
            automatic word_t d;
            d = $urandom;
            issue(n, mk(OP_WRITE, n, A_BASE + a, 1, 0, d));
            shadow[n][A_BASE + a] = d;
          end
          if (n < 4)
            for (int a = 0; a < PAGE; a++) begin
              automatic word_t d, f;
              d = $urandom; f = $urandom;
              issue(n, mk(OP_WRITE, n, B_BASE + a, 1, 0, d));
              shadow[n][B_BASE + a] = d;
              issue(n, mk(OP_WRITE, n, F_BASE + a, 1, 0, f));
              shadow[n][F_BASE + a] = f;
            end
          active--;
        end
      join_none
    wait_all();
  endtask

  task automatic reference_product();
    for (int r = 0; r < DIM; r++)
      for (int j = 0; j < DIM; j++) begin
        automatic word_t s = '0;
        for (int k = 0; k < DIM; k++)
          s += shadow[r / ROWS][A_BASE + (r % ROWS) * DIM + k] * shadow[k / 16][B_BASE + (k % 16) * DIM + j];
        cref[r][j] = s;
      end

  endtask

  initial begin
    longint mm_a, mm_b, sor_a, sor_b;
    real rep_mm_a, rep_mm_b, rep_sor_a, rep_sor_b, rem_a, rem_b;
    for (int i = 0; i < N; i++) begin pv[i] = 0; pr[i] = '0; end
    t_end = 0;
    reset_machine();
    fill_data();
    reference_product();

    mm_run(1'b0, mm_a, rep_mm_a);
    $display("matrix multiply, word-by-word replication: %0d program accesses, %0.0f cycles per page", mm_a, rep_mm_a);
    mm_run(1'b1, mm_b, rep_mm_b);
    $display("matrix multiply, LONG_READ replication:    %0d program accesses, %0.0f cycles per page", mm_b, rep_mm_b);
    sor_run(1'b0, sor_a, rep_sor_a, rem_a);
    $display("SOR, word-by-word replication: %0d program accesses, %0.0f cycles per page, remote access %0.1f cycles",
             sor_a, rep_sor_a, rem_a);
    sor_run(1'b1, sor_b, rep_sor_b, rem_b);
    $display("SOR, LONG_READ replication:    %0d program accesses, %0.0f cycles per page, remote access %0.1f cycles",
             sor_b, rep_sor_b, rem_b);
    $display("program accesses LONG_READ / word-by-word: matrix multiply %0.3f, SOR %0.3f",
             real'(mm_b) / real'(mm_a), real'(sor_b) / real'(sor_a));
    check(rep_mm_b < rep_mm_a / 2.0, "matrix multiply: LONG_READ replication not under half the word-by-word time");
    check(rep_sor_b < rep_sor_a, "SOR: LONG_READ replication not faster than word-by-word");
    $display("replication time ratio LONG_READ / word-by-word: matrix multiply %0.2f, SOR %0.2f",
             rep_mm_b / rep_mm_a, rep_sor_b / rep_sor_a);
    check(mm_a > 0 && mm_b > 0 && sor_a > 0 && sor_b > 0, "a run completed no program access");
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
