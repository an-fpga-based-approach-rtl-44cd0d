// tb_permutation: runs the generator for 3, 5 and 7 states.  Every output
// must be an ordering, all n! of them distinct, delivered one per clock;
// the first 3-state orderings must be <2,1,0>, <2,0,1>, <1,0,2> as in the
// worked example, 4-state step 6 must reverse positions 0..3, and a stall on
// advance must hold the output.
module tb_permutation;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start3, adv3, v3, l3;
  logic [2:0][1:0] o3;
  permutation #(.N(3)) u3 (.clk, .rst, .startperm(start3), .advance(adv3), .out(o3), .valid(v3), .last(l3));
  logic start4, adv4, v4, l4;
  logic [3:0][1:0] o4;
  permutation #(.N(4)) u4 (.clk, .rst, .startperm(start4), .advance(adv4), .out(o4), .valid(v4), .last(l4));
  logic start5, adv5, v5, l5;
  logic [4:0][2:0] o5;
  permutation #(.N(5)) u5 (.clk, .rst, .startperm(start5), .advance(adv5), .out(o5), .valid(v5), .last(l5));
  logic start7, adv7, v7, l7;
  logic [6:0][2:0] o7;
  permutation #(.N(7)) u7 (.clk, .rst, .startperm(start7), .advance(adv7), .out(o7), .valid(v7), .last(l7));

  initial begin
    bit seen5[int], seen7[int];
    int cnt, key, mask, cyc;
    logic [3:0][1:0] prev4;
    {start3, adv3, start4, adv4, start5, adv5, start7, adv7} = '0;
    repeat (2) @(negedge clk);
    rst = 0;

    // 3 states: the document's worked example
    start3 = 1; @(negedge clk); start3 = 0;
    check(v3 && o3 == {2'd2, 2'd1, 2'd0}, "initial <2,1,0>");
    adv3 = 1; @(negedge clk);
    check(o3 == {2'd2, 2'd0, 2'd1}, "first step <2,0,1>");
    @(negedge clk);
    check(o3 == {2'd1, 2'd0, 2'd2}, "second step <1,0,2>");
    adv3 = 0;

    // 4 states: step 6 reverses positions 0..3
    start4 = 1; @(negedge clk); start4 = 0; adv4 = 1;
    repeat (5) @(negedge clk);
    prev4 = o4;
    @(negedge clk);
    check(o4 == {prev4[0], prev4[1], prev4[2], prev4[3]}, "step 6 reverses positions 0..3");
    adv4 = 0;

    // 5 states: all 120 distinct, one per clock, with a stall in the middle
    start5 = 1; @(negedge clk); start5 = 0;
    cnt = 0; cyc = 0;
    while (v5) begin
      mask = 0; key = 0;
      for (int p = 0; p < 5; p++) begin mask |= 1 << o5[p]; key = key * 8 + int'(o5[p]); end
      adv5 = !(cnt == 50 && cyc < 3);
      if (adv5) begin
        check(mask == 5'h1f, "5-state output is an ordering");
        check(!seen5.exists(key), "5-state ordering repeated");
        seen5[key] = 1;
        cnt++;
        check(l5 == (cnt == 120), "last flags the 120th ordering");
      end else cyc++;
      @(negedge clk);
    end
    adv5 = 0;
    check(cnt == 120, $sformatf("5 states give %0d orderings", cnt));

    // 7 states: 5040 orderings in 5040 clocks
    start7 = 1; @(negedge clk); start7 = 0; adv7 = 1;
    cnt = 0;
    while (v7) begin
      mask = 0; key = 0;
      for (int p = 0; p < 7; p++) begin mask |= 1 << o7[p]; key = key * 8 + int'(o7[p]); end
      if (mask != 7'h7f || seen7.exists(key)) begin
        failures++; $display("FAIL: bad 7-state ordering");
      end
      seen7[key] = 1;
      cnt++;
      @(negedge clk);
    end
    checks++;
    check(cnt == 5040 && seen7.size() == 5040, $sformatf("7 states: %0d orderings in %0d clocks", seen7.size(), cnt));
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
