// tb_next_state_calc: random automata and nodes; the image of the node is
// rebuilt state by state in the testbench and compared for both letters.
module tb_next_state_calc;
  localparam int N = 12, SW = 4;
  int checks = 0, failures = 0;
  logic [N-1:0][SW-1:0] mA, mB;
  logic [N-1:0] node, out;
  logic sel;

  next_state_calc #(.N(N)) dut (.machineA(mA), .machineB(mB), .processingState(node),
                                .select(sel), .outState(out));

  initial begin
    logic [N-1:0] exp_out;
    for (int t = 0; t < 4000; t++) begin
      for (int q = 0; q < N; q++) begin mA[q] = SW'($urandom_range(N - 1)); mB[q] = SW'($urandom_range(N - 1)); end
      node = N'($urandom);
      if (t < 5) node = '1;
      sel = $urandom_range(1);
      #1;
      exp_out = '0;
      for (int s = 0; s < N; s++)
        for (int q = 0; q < N; q++)
          if (node[q] && ((sel ? int'(mA[q]) : int'(mB[q])) == s)) exp_out[s] = 1'b1;
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL: node %h sel %0d got %h exp %h", node, sel, out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
