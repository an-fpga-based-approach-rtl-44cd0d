// tb_tx_serial: sends random bytes at 8 clocks per bit and decodes the line
// in the testbench, checking start bit, data, stop bit, the bit period and
// that a request while busy is ignored.
module tb_tx_serial;
  localparam int CPB = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tv, busy, line;
  logic [7:0] tb_byte;

  tx_serial #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .Tx_Byte_Valid(tv), .Tx_Byte(tb_byte), .Tx_Busy(busy), .Tx_Bit(line));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] b, rx;
    int low_len;
    tv = 0; tb_byte = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      b = 8'($urandom);
      while (busy) @(negedge clk);
      tb_byte = b; tv = 1; @(negedge clk); tv = 0;
      check(busy, "busy after request");
      tb_byte = ~b; tv = 1; @(negedge clk); tv = 0;   // ignored: busy
      while (line) @(negedge clk);                    // start bit edge
      low_len = 0;
      repeat (CPB / 2) @(negedge clk);
      check(line == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        rx[i] = line;
      end
      repeat (CPB) @(negedge clk);
      check(line == 1, "stop bit");
      check(rx == b, $sformatf("byte %02h sent as %02h", b, rx));
    end
    // bit period: a 0x00 byte gives 9 low bit times
    while (busy) @(negedge clk);
    tb_byte = 8'h00; tv = 1; @(negedge clk); tv = 0;
    while (line) @(negedge clk);
    low_len = 0;
    while (!line) begin low_len++; @(negedge clk); end
    check(low_len == 9 * CPB, $sformatf("low time %0d expected %0d", low_len, 9 * CPB));
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
