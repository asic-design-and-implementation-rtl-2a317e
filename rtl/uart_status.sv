// uart_status: the UART's status register.
//
// Collects the transmitter's and receiver's flags into one register that a
// host can read as a word of type uart_status_t. The live flags (data_ready,
// parity_error, framing_error, tbre, tsre) are registered copies, one clk
// cycle behind their sources. Two sticky bits record that at least one frame
// with a parity error, or with a framing error, has arrived since the last
// clear: they are set when frame_valid comes with the matching error flag,
// and cleared by a one-cycle pulse on clr (a new error in the same cycle
// wins over the clear). This lets a host that polls slowly still learn that
// some received data was corrupted.
//
// The document names a status register for data integrity but not its
// contents; the choice of fields and the sticky bits are this design's.
module uart_status
  import uart_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,            // clear the sticky bits
  input  logic         frame_valid,    // receiver finished a frame
  input  logic         data_ready,
  input  logic         parity_error,
  input  logic         framing_error,
  input  logic         tbre,
  input  logic         tsre,
  output uart_status_t status
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      status      <= '0;
      status.tbre <= 1'b1;
      status.tsre <= 1'b1;
    end else begin
      status.data_ready    <= data_ready;
      status.parity_error  <= parity_error;
      status.framing_error <= framing_error;
      status.tbre          <= tbre;
      status.tsre          <= tsre;

      if (frame_valid && parity_error)       status.parity_sticky <= 1'b1;
      else if (clr)                          status.parity_sticky <= 1'b0;

      if (frame_valid && framing_error)      status.framing_sticky <= 1'b1;
      else if (clr)                          status.framing_sticky <= 1'b0;
    end
  end

endmodule
