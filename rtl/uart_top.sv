// uart_top: FPGA top level of the Cerny-conjecture search engine.
//
// The host sends unary automaton pairs (A, B) over the serial line; for every
// pair the engine checks all n! binary automata formed from A and a renaming
// of B, and reports whether any of them needs a reset word longer than
// (n-1)^2.  rx_serial turns Usb_uart_rx into bytes for manage_mod, which
// holds the pair buffers and the NUM_TOP x NUM_INC search units.
// searchDone and finalstatus are brought out as pins.  Each time searchDone
// rises, a result message is sent on Usb_uart_tx through tx_serial, least
// significant byte first throughout: TIME_W/8 bytes of timecounter (analysis
// time in clocks), one byte holding finalstatus in bit 0, then the saved
// counterexample as automaton A and renamed automaton B in the input byte
// format (all zero when there is none).
//
// Timing: 100 MHz clock, 921600 baud (CLKS_PER_BIT = 109), rst synchronous
// and active high.  The blocks, pin names and rates follow the document; the
// layout of the result message and the reset pin are this design's choices.
module uart_top
  import cerny_pkg::*;
#(
  parameter int unsigned N            = N_STATES,
  parameter int unsigned NUM_TOP      = cerny_pkg::DEF_NUM_TOP,
  parameter int unsigned NUM_INC      = cerny_pkg::DEF_NUM_INC,
  parameter int unsigned CLKS_PER_BIT = 109,
  parameter int unsigned AB_DEPTH     = 1024,
  parameter int unsigned PERM_DEPTH   = 512,
  parameter int unsigned TIME_W       = 48,
  parameter int unsigned CERNY_BOUND  = cerny_bound(N),
  parameter bit          F1_EN        = 1'b1,
  parameter bit          F2_EN        = 1'b0,
  parameter int unsigned F2_DEPTH     = filter2_depth(N),
  parameter bit          F3_EN        = 1'b1,
  parameter int unsigned F3_DEPTH     = filter3_depth(N)
) (
  input  logic clk,
  input  logic rst,
  input  logic Usb_uart_rx,
  output logic Usb_uart_tx,
  output logic searchDone,
  output logic finalstatus
);
  localparam int unsigned AB_BYTES  = automaton_bytes(N);
  localparam int unsigned MSG_BYTES = TIME_W / 8 + 1 + 2 * AB_BYTES;
  localparam int unsigned MSG_W     = MSG_BYTES * 8;
  localparam int unsigned IW        = $clog2(MSG_BYTES + 1);

  logic [7:0]        rx_byte;
  logic              rx_valid, tvalid, tx_busy;
  logic [TIME_W-1:0] timecounter;
  logic [N-1:0][$clog2(N)-1:0] cexA, cexB;
  logic [MSG_W-1:0]  msg;
  logic              done_q;
  logic [IW-1:0]     to_send;

  rx_serial #(.CLKS_PER_BIT(CLKS_PER_BIT)) RX_serial (
    .clk, .rst, .Rx_Bit(Usb_uart_rx), .Rx_Byte_Valid(rx_valid), .Rx_Byte(rx_byte)
  );

  manage_mod #(
    .N(N), .NUM_TOP(NUM_TOP), .NUM_INC(NUM_INC), .AB_DEPTH(AB_DEPTH),
    .PERM_DEPTH(PERM_DEPTH), .TIME_W(TIME_W), .CERNY_BOUND(CERNY_BOUND),
    .F1_EN(F1_EN), .F2_EN(F2_EN), .F2_DEPTH(F2_DEPTH), .F3_EN(F3_EN), .F3_DEPTH(F3_DEPTH)
  ) manageMod (
    .clk, .rst, .inByte(rx_byte), .valid(rx_valid), .timecounter, .searchDone,
    .finalstatus, .cexA, .cexB
  );

  tx_serial #(.CLKS_PER_BIT(CLKS_PER_BIT)) TX_serial (
    .clk, .rst, .Tx_Byte_Valid(tvalid), .Tx_Byte(msg[7:0]), .Tx_Busy(tx_busy),
    .Tx_Bit(Usb_uart_tx)
  );

  // Result message: snapshot on the rising edge of searchDone, then one byte
  // per frame from the bottom of msg.
  always_ff @(posedge clk) begin
    if (rst) begin
      done_q  <= 1'b0;
      msg     <= '0;
      to_send <= '0;
      tvalid  <= 1'b0;
    end else begin
      done_q <= searchDone;
      tvalid <= 1'b0;
      if (searchDone && !done_q) begin
        msg <= '0;
        msg[TIME_W-1:0]                             <= timecounter;
        msg[TIME_W +: 8]                            <= {7'd0, finalstatus};
        msg[TIME_W + 8 +: N*$clog2(N)]              <= cexA;
        msg[TIME_W + 8 + AB_BYTES*8 +: N*$clog2(N)] <= cexB;
        to_send <= IW'(MSG_BYTES);
      end else if (to_send != '0 && !tx_busy && !tvalid) begin
        tvalid <= 1'b1;
      end else if (tvalid) begin
        msg     <= msg >> 8;
        to_send <= to_send - 1'b1;
      end
    end
  end
endmodule
