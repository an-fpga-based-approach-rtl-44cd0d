// tb_sync_fifo: random push/pop traffic against a queue model.  Checks Dout
// (fall-through head), EMPTY, FULL and count every cycle, including
// simultaneous push and pop on a full FIFO and ignored pops when empty.
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic push, pop;
  logic [W-1:0] din, dout;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] model [$];
  int n_full = 0, n_both_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .push, .pop, .Din(din), .Dout(dout),
                                         .EMPTY(empty), .FULL(full), .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "EMPTY");
      check(full == (model.size() == D), "FULL");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "Dout is the oldest entry");
      // bias towards filling in the first half, draining in the second
      push = ($urandom_range(99) < ((t % 400) < 200 ? 70 : 30));
      pop  = ($urandom_range(99) < ((t % 400) < 200 ? 30 : 70)) && (model.size() > 0);
      if (full) push = push && pop;
      din  = W'($urandom);
      if (full) n_full++;
      if (full && push && pop) n_both_full++;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && (model.size() < D)) model.push_back(din);
    end
    check(n_full > 0, "FIFO became full");
    check(n_both_full > 0, "push and pop together on a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
