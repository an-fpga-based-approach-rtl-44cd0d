// tb_get_mac_uart: feeds 5-state automata (2 bytes each, least significant
// byte first) as alternating A and B, with random gaps, and checks that the
// pairs come out in order, that empty is right and that a half-received pair
// is not visible.
module tb_get_mac_uart;
  localparam int N = 5, SW = 3, AW = 15;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] ib;
  logic v, pop, empty;
  logic [N-1:0][SW-1:0] ma, mb;

  get_mac_uart #(.N(N), .AB_DEPTH(16)) dut (.clk, .rst, .inByte(ib), .valid(v), .pop, .macA(ma), .macB(mb), .empty);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_auto(input logic [AW-1:0] a);
    logic [15:0] w;
    w = 16'(a);
    for (int k = 0; k < 2; k++) begin
      ib = w[8*k +: 8]; v = 1; @(negedge clk); v = 0; ib = 8'($urandom);
      repeat (4 + $urandom_range(4)) @(negedge clk);   // UART bytes are far apart
    end
  endtask

  initial begin
    logic [AW-1:0] qa [$], qb [$];
    logic [AW-1:0] a, b;
    ib = '0; v = 0; pop = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 10; round++) begin
      int np = 1 + $urandom_range(5);
      for (int p = 0; p < np; p++) begin
        a = AW'($urandom); b = AW'($urandom);
        send_auto(a);
        check(empty == (qb.size() == 0), "half pair not visible");
        send_auto(b);
        qa.push_back(a); qb.push_back(b);
      end
      repeat (3) @(negedge clk);
      while (qa.size() > 0) begin
        check(!empty, "pair available");
        check(ma == qa[0] && mb == qb[0], "pair contents and order");
        void'(qa.pop_front()); void'(qb.pop_front());
        pop = 1; @(negedge clk); pop = 0;
      end
      check(empty, "empty after draining");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
