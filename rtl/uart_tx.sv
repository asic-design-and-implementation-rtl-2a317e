// uart_tx: UART transmitter with a one-byte buffer register and a shift register.
//
// The host writes a byte by holding wrn low for one clk cycle while tbre
// (transmit buffer register empty) is high; the byte goes into the buffer
// register and tbre falls. A write while tbre is low is ignored, so the host
// must wait for tbre. On the next tick16 at which the shift register is idle
// (tsre high), or at the tick16 that ends the previous stop bit, the byte
// moves into the shift register, tbre rises again and
// the frame starts: start bit 0, data bits LSB first, parity bit, stop bit 1.
// Each bit is held for exactly sixteen tick16 periods, because the frame only
// starts on a tick16 and a 4-bit counter of tick16 pulses advances the bit.
// tsre rises after the stop bit has been held for its full time if no byte is
// waiting, so back-to-back frames have no gap. sdo idles at 1.
//
// The frame format, LSB-first order and the tbre/tsre/sdo/wrn names follow the
// document; the single-byte buffer, the ignore-when-full rule and the
// synchronous write strobe are this design's choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter parity_e PARITY = PAR_EVEN
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  tick16,  // oversampling enable from baud_gen
  input  byte_t din,     // byte to send
  input  logic  wrn,     // active-low write strobe, one clk cycle
  output logic  sdo,     // serial data out
  output logic  tbre,    // transmit buffer register empty
  output logic  tsre     // transmit shift register empty (line idle)
);

  byte_t                 tbr;      // transmit buffer register
  logic [FRAME_BITS-1:0] tsr;      // transmit shift register, bit 0 on the line
  logic [3:0]            subtick;  // tick16 pulses within the current bit
  logic [3:0]            bitcnt;   // bits of the frame already finished

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tbr     <= '0;
      tbre    <= 1'b1;
      tsr     <= '1;
      tsre    <= 1'b1;
      subtick <= '0;
      bitcnt  <= '0;
    end else begin
      if (!wrn && tbre) begin
        tbr  <= din;
        tbre <= 1'b0;
      end

      if (tick16) begin
        if (!tsre && subtick != 4'd15) begin
          subtick <= subtick + 1'b1;
        end else if (!tsre && bitcnt != 4'(FRAME_BITS - 1)) begin
          subtick <= '0;
          bitcnt  <= bitcnt + 1'b1;
          tsr     <= {1'b1, tsr[FRAME_BITS-1:1]};
        end else if (!tbre) begin
          // idle, or the stop bit has just ended: start the buffered byte.
          // Stop, parity, data, start: the start bit goes out first.
          tsr     <= {1'b1, parity_bit(tbr, PARITY), tbr, 1'b0};
          tbre    <= 1'b1;
          tsre    <= 1'b0;
          subtick <= '0;
          bitcnt  <= '0;
        end else begin
          tsre <= 1'b1;
          tsr  <= '1;
        end
      end
    end
  end

  assign sdo = tsr[0];

endmodule
