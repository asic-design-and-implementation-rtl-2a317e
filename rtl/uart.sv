// uart: 8-bit UART built from a baud rate generator, a transmitter, a
// receiver and a status register, with an internal loopback path.
//
// All logic runs on the system clock clk. baud_gen makes a one-cycle tick16
// enable at sixteen times the bit rate; the transmitter and receiver count it.
// The host side is a parallel byte interface: write din with wrn low for one
// cycle while tbre is high; read dout when data_ready is high by pulling rdn
// low (dout_oe = !rdn enables a bus driver). Frames are start, eight data bits
// LSB first, parity and one stop bit.
//
// loopback = 1 connects the receiver to the transmitter's serial output
// inside the block and holds the external sdo pin at the idle level 1, so the
// self-test neither sends on nor listens to the outside line.
//
// The split into transmitter, receiver and baud rate generator, the 50 MHz /
// 9600 bit/s defaults, the port names and the loopback mode follow the
// document; a single system clock with clock enables (instead of a separate
// clk16x clock input), the separate dout_oe and the status word are this
// design's choices.
module uart
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600,
  parameter parity_e     PARITY = PAR_EVEN
) (
  input  logic         clk,
  input  logic         rst,
  // host byte interface
  input  byte_t        din,
  input  logic         wrn,
  input  logic         rdn,
  output byte_t        dout,
  output logic         dout_oe,
  output logic         data_ready,
  output logic         framing_error,
  output logic         parity_error,
  output logic         tbre,
  output logic         tsre,
  // status register
  input  logic         stat_clr,
  output uart_status_t status,
  // serial line
  input  logic         rxd,
  output logic         sdo,
  // test mode
  input  logic         loopback
);

  logic tick16;
  logic tx_line;
  logic rx_line;
  logic frame_valid;

  baud_gen #(
    .CLK_HZ     (CLK_HZ),
    .BAUD       (BAUD),
    .OVERSAMPLE (OVERSAMPLE)
  ) u_baud (
    .clk    (clk),
    .rst    (rst),
    .tick16 (tick16)
  );

  uart_tx #(.PARITY(PARITY)) u_tx (
    .clk    (clk),
    .rst    (rst),
    .tick16 (tick16),
    .din    (din),
    .wrn    (wrn),
    .sdo    (tx_line),
    .tbre   (tbre),
    .tsre   (tsre)
  );

  assign rx_line = loopback ? tx_line : rxd;
  assign sdo     = loopback ? 1'b1    : tx_line;

  uart_rx #(.PARITY(PARITY)) u_rx (
    .clk           (clk),
    .rst           (rst),
    .tick16        (tick16),
    .rxd           (rx_line),
    .rdn           (rdn),
    .dout          (dout),
    .dout_oe       (dout_oe),
    .data_ready    (data_ready),
    .framing_error (framing_error),
    .parity_error  (parity_error),
    .frame_valid   (frame_valid)
  );

  uart_status u_status (
    .clk           (clk),
    .rst           (rst),
    .clr           (stat_clr),
    .frame_valid   (frame_valid),
    .data_ready    (data_ready),
    .parity_error  (parity_error),
    .framing_error (framing_error),
    .tbre          (tbre),
    .tsre          (tsre),
    .status        (status)
  );

endmodule
