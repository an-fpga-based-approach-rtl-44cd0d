// tb_rx_serial: drives 8N1 frames at 8 clocks per bit, with random gaps, and
// checks every received byte and that a frame with a bad stop bit is dropped.
module tb_rx_serial;
  localparam int CPB = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic line, vld;
  logic [7:0] byte_o;
  logic [7:0] got [$];

  rx_serial #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .Rx_Bit(line), .Rx_Byte_Valid(vld), .Rx_Byte(byte_o));

  always @(posedge clk) if (vld && !rst) got.push_back(byte_o);

  task automatic send(input logic [7:0] b, input bit stop);
    line = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin line = b[i]; repeat (CPB) @(negedge clk); end
    line = stop; repeat (CPB) @(negedge clk);
    line = 1; repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    logic [7:0] sent [$];
    logic [7:0] b;
    line = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      b = 8'($urandom);
      if (t == 100) begin
        send(b, 0);                          // framing error: dropped
        repeat (2 * CPB) @(negedge clk);
      end else begin
        send(b, 1);
        sent.push_back(b);
      end
    end
    repeat (2 * CPB) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("FAIL: %0d bytes received, %0d sent", got.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("FAIL: byte %0d got %02h sent %02h", i, got[i], sent[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
