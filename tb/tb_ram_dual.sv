// tb_ram_dual: random writes and reads against an array model.  Checks the
// one-cycle read latency, that Dout holds while read is low, and that a read
// of the word being written returns the old value.
module tb_ram_dual;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic write, read;
  logic [AW-1:0] wa, ra;
  logic din, dout;
  bit model [2**AW];
  bit expected;
  int n_collide = 0;

  ram_dual #(.AW(AW), .DW(1)) dut (.clk, .write, .write_addr(wa), .Din(din), .read,
                                   .read_addr(ra), .Dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    write = 0; read = 0; wa = '0; ra = '0; din = 0;
    // clear every word first
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); write = 1; wa = AW'(a); din = 0; model[a] = 0;
    end
    @(negedge clk); write = 0;
    read = 1; ra = '0; expected = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t > 0) check(dout == expected, $sformatf("Dout at t=%0d", t));
      write = $urandom_range(1);
      wa    = AW'($urandom);
      din   = $urandom_range(1);
      read  = $urandom_range(3) != 0;
      ra    = ($urandom_range(3) == 0) ? wa : AW'($urandom);
      if (read && write && ra == wa) n_collide++;
      if (read) expected = model[ra];
      @(posedge clk);
      if (write) model[wa] = din;
    end
    check(n_collide > 0, "read and write of the same word happened");
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
