// uart_bist_top: UART with built-in self-test.
//
// Two halves. The UART (transmitter, receiver, baud rate generator, status
// register) serves a host through a parallel byte interface and a serial line.
// The self-test half is a pattern generator (an 8-bit maximal-length LFSR), a
// comparator and a controller holding the control/result register. A pulse
// on bist_start runs the self-test: the controller puts the UART into
// internal loopback, takes its byte interface away from the host, writes
// NUM_PATTERNS successive LFSR patterns into the transmitter one at a time,
// reads each back from the receiver and has the comparator check it against
// the pattern sent. bist_status then reports done and pass/fail;
// bist_err_count counts the bad bytes. Outside a run the host's din, wrn and
// rdn reach the UART unchanged and the serial pins are live.
//
// While busy, host writes and reads are ignored and sdo stays at 1. With the
// defaults (50 MHz, 9600 bit/s) one frame takes 11 * 16 * 326 = 57,376 clk
// cycles, so a full 255-pattern run takes about 14.7 million cycles (0.29 s).
//
// The two-part structure (pattern generator, control register, comparator;
// transmitter, receiver, baud rate generator), the loopback test and the
// selection between test patterns and primary inputs follow the document;
// the handshakes, timings and result register are this design's choices.
module uart_bist_top
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BAUD         = 9600,
  parameter parity_e     PARITY       = PAR_EVEN,
  parameter int unsigned NUM_PATTERNS = 255,
  parameter logic [7:0]  LFSR_SEED    = 8'h01
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
  input  logic         stat_clr,
  output uart_status_t uart_status_word,
  // serial line
  input  logic         rxd,
  output logic         sdo,
  // self-test
  input  logic         bist_start,
  output bist_status_t bist_status,
  output logic [7:0]   bist_err_count,
  output logic         bist_mismatch   // one-cycle pulse per bad byte
);

  // one frame in clk cycles, with the divisor baud_gen will use
  localparam int unsigned DIVISOR      = (CLK_HZ + BAUD * OVERSAMPLE / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned FRAME_CYCLES = FRAME_BITS * OVERSAMPLE * DIVISOR;

  logic  bist_mode;
  logic  bist_wrn, bist_rdn;
  logic  lfsr_load, lfsr_en;
  logic  cmp_clr, cmp_valid, cmp_fail;
  logic [7:0] cmp_checked;
  byte_t pattern;

  byte_t u_din;
  logic  u_wrn, u_rdn;

  // input selection: test patterns in BIST mode, primary inputs otherwise
  assign u_din = bist_mode ? pattern  : din;
  assign u_wrn = bist_mode ? bist_wrn : wrn;
  assign u_rdn = bist_mode ? bist_rdn : rdn;

  uart #(
    .CLK_HZ (CLK_HZ),
    .BAUD   (BAUD),
    .PARITY (PARITY)
  ) u_uart (
    .clk           (clk),
    .rst           (rst),
    .din           (u_din),
    .wrn           (u_wrn),
    .rdn           (u_rdn),
    .dout          (dout),
    .dout_oe       (dout_oe),
    .data_ready    (data_ready),
    .framing_error (framing_error),
    .parity_error  (parity_error),
    .tbre          (tbre),
    .tsre          (tsre),
    .stat_clr      (stat_clr),
    .status        (uart_status_word),
    .rxd           (rxd),
    .sdo           (sdo),
    .loopback      (bist_mode)
  );

  lfsr #(
    .WIDTH (8),
    .POLY  (8'h1D),
    .SEED  (LFSR_SEED)
  ) u_lfsr (
    .clk  (clk),
    .rst  (rst),
    .load (lfsr_load),
    .seed (LFSR_SEED),
    .en   (lfsr_en),
    .q    (pattern)
  );

  bist_comparator #(.CNT_W(8)) u_cmp (
    .clk           (clk),
    .rst           (rst),
    .clr           (cmp_clr),
    .valid         (cmp_valid),
    .expected      (pattern),
    .received      (dout),
    .parity_error  (parity_error),
    .framing_error (framing_error),
    .mismatch      (bist_mismatch),
    .fail          (cmp_fail),
    .err_count     (bist_err_count),
    .checked       (cmp_checked)
  );

  bist_ctrl #(
    .NUM_PATTERNS   (NUM_PATTERNS),
    .SETTLE_CYCLES  (FRAME_CYCLES),
    .TIMEOUT_CYCLES (2 * FRAME_CYCLES)
  ) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .start      (bist_start),
    .tbre       (tbre),
    .data_ready (data_ready),
    .tx_wrn     (bist_wrn),
    .rx_rdn     (bist_rdn),
    .lfsr_load  (lfsr_load),
    .lfsr_en    (lfsr_en),
    .cmp_clr    (cmp_clr),
    .cmp_valid  (cmp_valid),
    .cmp_fail   (cmp_fail),
    .bist_mode  (bist_mode),
    .status     (bist_status)
  );

  // every compared byte was counted once per run
  a_checked_count: assert property (@(posedge clk) disable iff (rst)
    $rose(bist_status.done) && !bist_status.timeout |-> cmp_checked == 8'(NUM_PATTERNS));

endmodule
