// tx_serial: UART transmitter.
//
// A one-cycle Tx_Byte_Valid while Tx_Busy is low starts an 8N1 frame for
// Tx_Byte: start bit 0, eight data bits least significant first, stop bit 1,
// each CLKS_PER_BIT clocks long (109 = 921600 baud at 100 MHz).  Tx_Busy is
// high from the cycle after the request until the stop bit has been sent;
// requests while busy are ignored.  Tx_Bit idles high.  The baud rate and
// port names follow the document; the frame format is this design's choice.
module tx_serial #(
  parameter int unsigned CLKS_PER_BIT = 109
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       Tx_Byte_Valid,
  input  logic [7:0] Tx_Byte,
  output logic       Tx_Busy,
  output logic       Tx_Bit
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;    // bits still to send, next one in bit 0
  logic [3:0]    nbits;
  logic [CW-1:0] clk_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      frame   <= '1;
      nbits   <= '0;
      clk_cnt <= '0;
      Tx_Busy <= 1'b0;
      Tx_Bit  <= 1'b1;
    end else if (!Tx_Busy) begin
      Tx_Bit <= 1'b1;
      if (Tx_Byte_Valid) begin
        frame   <= {1'b1, Tx_Byte, 1'b0};
        nbits   <= 4'd10;
        clk_cnt <= '0;
        Tx_Busy <= 1'b1;
      end
    end else begin
      Tx_Bit <= frame[0];
      if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
        clk_cnt <= '0;
        frame   <= {1'b1, frame[9:1]};
        nbits   <= nbits - 1'b1;
        if (nbits == 4'd1) Tx_Busy <= 1'b0;
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end
endmodule
