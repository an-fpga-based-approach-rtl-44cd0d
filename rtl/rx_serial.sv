// rx_serial: UART receiver.
//
// Receives 8N1 frames (start bit 0, eight data bits least significant first,
// stop bit 1) on Rx_Bit at CLKS_PER_BIT clocks per bit.  The line passes a
// two-flop synchroniser; a falling edge is re-checked half a bit later, then
// each data bit and the stop bit are sampled in the middle of their bit
// period.  A frame with a valid stop bit gives a one-cycle Rx_Byte_Valid with
// the byte on Rx_Byte (held until the next byte).  A frame whose stop bit is
// 0 is dropped.  A start bit is a falling edge, so a line held low after a
// bad frame starts nothing.  The default of 109 clocks per bit is 921600 baud from the
// 100 MHz clock.  The baud rate and port names follow the document; the frame
// format and sampling scheme are this design's choices.
module rx_serial #(
  parameter int unsigned CLKS_PER_BIT = 109
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       Rx_Bit,
  output logic       Rx_Byte_Valid,
  output logic [7:0] Rx_Byte
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e       state;
  logic [2:0]    sync;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync          <= 3'b111;
      state         <= R_IDLE;
      clk_cnt       <= '0;
      bit_idx       <= '0;
      shreg         <= '0;
      Rx_Byte       <= '0;
      Rx_Byte_Valid <= 1'b0;
    end else begin
      sync          <= {sync[1:0], Rx_Bit};
      Rx_Byte_Valid <= 1'b0;
      unique case (state)
        R_IDLE: begin
          clk_cnt <= '0;
          if (sync[2] && !rx) state <= R_START;
        end
        R_START: begin
          if (clk_cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            state   <= rx ? R_IDLE : R_DATA;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        R_DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            shreg   <= {rx, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= R_STOP;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        R_STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= R_IDLE;
            if (rx) begin
              Rx_Byte       <= shreg;
              Rx_Byte_Valid <= 1'b1;
            end
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
