// bist_comparator: response analyser of the self-test.
//
// For every byte that came back through the UART the controller pulses valid
// with the byte it sent (expected) and the byte received, together with the
// receiver's parity and framing flags for that frame. The byte counts as bad
// if the two differ or either flag is set. On the clk edge after valid:
// mismatch pulses for a bad byte, fail becomes (and stays) 1, err_count
// counts bad bytes (saturating at its maximum) and checked counts all
// compared bytes. clr (one cycle) zeroes everything before a new test run.
//
// The document's self-test compares the received byte with the pattern sent;
// also failing a byte on a parity or framing error, and the two counters,
// are this design's choices.
module bist_comparator
  import uart_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             valid,
  input  byte_t            expected,
  input  byte_t            received,
  input  logic             parity_error,
  input  logic             framing_error,
  output logic             mismatch,
  output logic             fail,
  output logic [CNT_W-1:0] err_count,
  output logic [CNT_W-1:0] checked
);

  logic bad;
  assign bad = (expected != received) || parity_error || framing_error;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mismatch  <= 1'b0;
      fail      <= 1'b0;
      err_count <= '0;
      checked   <= '0;
    end else if (clr) begin
      mismatch  <= 1'b0;
      fail      <= 1'b0;
      err_count <= '0;
      checked   <= '0;
    end else begin
      mismatch <= valid && bad;
      if (valid) begin
        checked <= checked + 1'b1;
        if (bad) begin
          fail <= 1'b1;
          if (err_count != '1) err_count <= err_count + 1'b1;
        end
      end
    end
  end

endmodule
