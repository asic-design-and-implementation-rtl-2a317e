// baud_gen: oversampling-enable generator for the UART.
//
// The UART runs entirely on the system clock. This block divides that clock
// down to a one-cycle enable pulse, tick16, at sixteen times the bit rate; the
// transmitter and receiver count sixteen of these pulses per bit. With the
// defaults, a 50 MHz clock and 9600 bit/s, the divisor is
// round(50e6 / (16 * 9600)) = 326, giving 9585.9 bit/s (0.15 % slow, far
// inside the few percent an asynchronous link tolerates).
//
// The clock and bit rate are the document's; producing an enable instead of a
// divided clock, and rounding the divisor to the nearest integer, are this
// design's choices.
//
// Interface: clk, rst (asynchronous, active high); tick16 is high for one clk
// cycle every DIVISOR cycles, the first time DIVISOR cycles after reset.
module baud_gen #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 9600,
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned DIVISOR    = (CLK_HZ + BAUD * OVERSAMPLE / 2) / (BAUD * OVERSAMPLE)
) (
  input  logic clk,
  input  logic rst,
  output logic tick16
);

  localparam int unsigned CW = (DIVISOR > 2) ? $clog2(DIVISOR) : 1;

  logic [CW-1:0] count;

  initial assert (DIVISOR >= 1) else $error("baud_gen: DIVISOR must be at least 1");

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count  <= '0;
      tick16 <= 1'b0;
    end else if (count == CW'(DIVISOR - 1)) begin
      count  <= '0;
      tick16 <= 1'b1;
    end else begin
      count  <= count + 1'b1;
      tick16 <= 1'b0;
    end
  end

endmodule
