// Self-checking test of bt_memory: random writes and reads over the whole
// address range, compared with an array model; read data must appear the
// cycle after the read, and a cycle with en low must change nothing.
module tb_bt_memory;
  import bt_pkg::*;
  localparam int unsigned WORDS = 256;

  logic clk = 1'b0, en, we;
  laddr_t addr;
  word_t wdata, rdata;
  word_t model [WORDS];
  bit    known [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  bt_memory #(.WORDS(WORDS)) dut (.*);

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < WORDS; i++) known[i] = 0;
    // fill everything once
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); en = 1; we = 1; addr = laddr_t'(a); wdata = $urandom; model[a] = wdata; known[a] = 1;
    end
    for (int i = 0; i < 4000; i++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, WORDS - 1);
      en = ($urandom_range(0, 3) != 0); we = 1'($urandom_range(0, 1)); addr = laddr_t'(a); wdata = $urandom;
      if (en && we) model[a] = wdata;
      if (en && !we) begin
        word_t exp;
        exp = model[a];
        @(negedge clk);
        en = 0; we = 0;
        checks++;
        if (rdata != exp) begin failures++; $display("FAIL: word %0d read %h expected %h", a, rdata, exp); end
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
