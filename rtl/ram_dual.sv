// ram_dual: simple dual-port memory used as the visited-node table.
//
// One write port and one read port, both synchronous to clk and usable in
// the same cycle.  The search unit addresses it with an n-bit node label and
// stores one bit per node: 1 once the node has been queued.  A read takes one
// cycle: when read is high, Dout shows the word at read_addr after the next
// edge, and Dout keeps that value while read stays low.  A read of the word
// written in the same cycle returns the old contents.  There is no reset:
// the user clears the words it has set (the search unit does so after reset
// and after every search).  The port names and the
// 2^n x 1 organisation follow the document; the read-during-write behaviour
// is this design's choice.
module ram_dual #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 1
) (
  input  logic          clk,
  input  logic          write,
  input  logic [AW-1:0] write_addr,
  input  logic [DW-1:0] Din,
  input  logic          read,
  input  logic [AW-1:0] read_addr,
  output logic [DW-1:0] Dout
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (write) mem[write_addr] <= Din;
  end

  always_ff @(posedge clk) begin
    if (read) Dout <= mem[read_addr];
  end
endmodule
