// Self-checking test of bt_fifo with a depth that is not a power of two.
// Random pushes and pops (including pushes when full and pops when empty,
// which must be ignored) are compared every cycle with a queue model:
// head value, empty, full, count and free.
module tb_bt_fifo;
  localparam int unsigned DEPTH = 5;
  typedef logic [15:0] data_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, empty, full;
  data_t wdata, rdata;
  logic [2:0] count, free;
  int checks = 0, failures = 0;
  data_t model [$];

  always #5 clk = !clk;

  bt_fifo #(.T(data_t), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare outputs with the model
      check(empty == (model.size() == 0), $sformatf("cycle %0d empty=%0b size=%0d", cyc, empty, model.size()));
      check(full  == (model.size() == DEPTH), $sformatf("cycle %0d full=%0b", cyc, full));
      check(count == 3'(model.size()), $sformatf("cycle %0d count=%0d size=%0d", cyc, count, model.size()));
      check(free  == 3'(DEPTH - model.size()), $sformatf("cycle %0d free=%0d", cyc, free));
      if (model.size() != 0)
        check(rdata == model[0], $sformatf("cycle %0d head %h expected %h", cyc, rdata, model[0]));
      // next operation; bias towards filling in the first half, draining in the second
      push  = ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 70 : 35)) && (model.size() < DEPTH);
      pop   = ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 35 : 70));
      wdata = data_t'($urandom);
      @(posedge clk);
      #1;
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push) model.push_back(wdata);
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
