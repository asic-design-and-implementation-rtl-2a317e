// uart_rx: UART receiver with mid-bit sampling and parity/framing checks.
//
// rxd is first passed through two flip-flops to bring it into the clk domain.
// While idle the receiver looks at the line on every tick16; a low level starts
// a frame. Eight tick16 pulses later, in the middle of the start bit, the line
// is looked at again: if it has gone back high the start was a glitch and the
// receiver returns to idle. Otherwise it samples every sixteenth tick16 from
// there on, which is the middle of each following bit: eight data bits (LSB
// first, into the receive shift register), the parity bit and the stop bit.
// At the stop-bit sample the byte moves to the receive buffer register (dout),
// data_ready rises, framing_error is set if the stop bit was 0 and
// parity_error if data and parity do not have the configured parity; the two
// error flags describe the last frame and are replaced by the next one.
// frame_valid pulses for one clk cycle at that moment. After a 0 stop bit the
// receiver waits for the line to return to 1 before it looks for the next
// start bit, so a new frame always begins with a falling edge.
//
// The host reads by holding rdn low; data_ready clears on the first clk edge
// with rdn low. dout always shows the buffer register; dout_oe (= !rdn) is the
// enable for the output driver that puts it on a shared data bus.
//
// Start detection on a falling edge, mid-bit sampling, the flag and port names
// follow the document; the synchronizer, the glitch rejection and the exact
// sample points are this design's choices.
module uart_rx
  import uart_pkg::*;
#(
  parameter parity_e PARITY = PAR_EVEN
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  tick16,        // oversampling enable from baud_gen
  input  logic  rxd,           // serial data in
  input  logic  rdn,           // active-low read strobe
  output byte_t dout,          // receive buffer register
  output logic  dout_oe,       // output enable for dout onto a bus
  output logic  data_ready,    // unread byte in dout
  output logic  framing_error, // last frame's stop bit was 0
  output logic  parity_error,  // last frame's parity was wrong
  output logic  frame_valid    // one-cycle pulse when a frame completes
);

  typedef enum logic [1:0] {
    RX_IDLE,
    RX_START,
    RX_BITS,
    RX_BREAK
  } rx_state_e;

  rx_state_e  state;
  logic [1:0] sync;     // rxd synchronizer, sync[1] is the safe copy
  logic [3:0] subtick;  // tick16 pulses since the last sample point
  logic [3:0] bitcnt;   // data/parity/stop bits sampled so far
  byte_t      rsr;      // receive shift register
  logic       par_rx;   // received parity bit

  logic rx_s;
  assign rx_s = sync[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state         <= RX_IDLE;
      subtick       <= '0;
      bitcnt        <= '0;
      rsr           <= '0;
      par_rx        <= 1'b0;
      dout          <= '0;
      data_ready    <= 1'b0;
      framing_error <= 1'b0;
      parity_error  <= 1'b0;
      frame_valid   <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (!rdn) data_ready <= 1'b0;

      if (tick16) begin
        unique case (state)
          RX_IDLE: begin
            subtick <= '0;
            if (!rx_s) state <= RX_START;
          end

          RX_START: begin
            // the first low tick counts as subtick 0; sample at subtick 7,
            // the eighth tick, in the middle of the start bit
            if (subtick == 4'd6) begin
              subtick <= '0;
              bitcnt  <= '0;
              state   <= rx_s ? RX_IDLE : RX_BITS;
            end else begin
              subtick <= subtick + 1'b1;
            end
          end

          RX_BITS: begin
            if (subtick == 4'd15) begin
              subtick <= '0;
              bitcnt  <= bitcnt + 1'b1;
              if (bitcnt < 4'(DATA_BITS)) begin
                rsr <= {rx_s, rsr[DATA_BITS-1:1]};
              end else if (bitcnt == 4'(DATA_BITS)) begin
                par_rx <= rx_s;
              end else begin
                // stop bit
                dout          <= rsr;
                data_ready    <= 1'b1;
                framing_error <= !rx_s;
                parity_error  <= (parity_bit(rsr, PARITY) != par_rx);
                frame_valid   <= 1'b1;
                // a 0 stop bit: wait for the line to go high again, so that
                // the rest of it is not taken for the next start bit
                state         <= rx_s ? RX_IDLE : RX_BREAK;
              end
            end else begin
              subtick <= subtick + 1'b1;
            end
          end

          RX_BREAK: begin
            subtick <= '0;
            if (rx_s) state <= RX_IDLE;
          end

          default: state <= RX_IDLE;
        endcase
      end
    end
  end

  assign dout_oe = !rdn;

endmodule
