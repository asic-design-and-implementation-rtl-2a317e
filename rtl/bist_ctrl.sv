// bist_ctrl: control register and sequencer of the UART self-test.
//
// A one-cycle pulse on start begins a test run. While it runs (busy high) the
// controller owns the UART: bist_mode switches the UART's receiver onto the
// transmitter's output (internal loopback) and the UART's byte and strobe
// inputs over from the host to the pattern generator and this controller.
// A run goes:
//   CLEAR   load the LFSR seed and clear the comparator;
//   SETTLE  wait SETTLE_CYCLES with the read strobe held low, so that any
//           frame that was arriving from outside when loopback was switched
//           on has finished and been thrown away;
//   SEND    wait for tbre, then write the LFSR's pattern (wrn low one cycle);
//   WAIT    wait for data_ready; if it has not come within TIMEOUT_CYCLES the
//           run ends with the timeout bit set;
//   READ    read the byte (rdn low one cycle) and have the comparator check
//           it against the pattern, which has not changed since SEND;
//   NEXT    step the LFSR; after NUM_PATTERNS bytes go on, else back to SEND;
//   FINISH  one cycle for the comparator's result to settle;
// then status shows done, and pass if no byte was bad and nothing timed out.
// The result stays until the next start. One byte is in flight at a time, so
// a run takes about NUM_PATTERNS frame times (11 bit times each).
//
// The document gives the loopback test, the LFSR patterns loaded into the
// transmitter and compared on receipt, and the switch between pattern and
// primary inputs; the state sequence, the settling wait, the timeout and the
// result bits are this design's choices.
module bist_ctrl
  import uart_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS   = 255,
  parameter int unsigned SETTLE_CYCLES  = 57_376,       // one frame at 9600 bit/s, 50 MHz
  parameter int unsigned TIMEOUT_CYCLES = 2 * 57_376    // two frames
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,      // begin a self-test run
  // UART handshake
  input  logic         tbre,
  input  logic         data_ready,
  output logic         tx_wrn,     // write strobe to the transmitter (active low)
  output logic         rx_rdn,     // read strobe to the receiver (active low)
  // pattern generator and comparator
  output logic         lfsr_load,
  output logic         lfsr_en,
  output logic         cmp_clr,
  output logic         cmp_valid,
  input  logic         cmp_fail,
  // mode and result
  output logic         bist_mode,
  output bist_status_t status
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_CLEAR,
    S_SETTLE,
    S_SEND,
    S_WAIT,
    S_READ,
    S_NEXT,
    S_FINISH
  } state_e;

  localparam int unsigned TW = $clog2((SETTLE_CYCLES > TIMEOUT_CYCLES ?
                                       SETTLE_CYCLES : TIMEOUT_CYCLES) + 1);
  localparam int unsigned PW = $clog2(NUM_PATTERNS + 1);

  state_e        state;
  logic [TW-1:0] timer;
  logic [PW-1:0] sent;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= S_IDLE;
      timer  <= '0;
      sent   <= '0;
      status <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_CLEAR;
            status <= '{busy: 1'b1, default: 1'b0};
          end
        end

        S_CLEAR: begin
          timer <= '0;
          sent  <= '0;
          state <= S_SETTLE;
        end

        S_SETTLE: begin
          if (timer == TW'(SETTLE_CYCLES)) state <= S_SEND;
          else                             timer <= timer + 1'b1;
        end

        S_SEND: begin
          timer <= '0;
          if (tbre) state <= S_WAIT;
        end

        S_WAIT: begin
          if (data_ready) begin
            state <= S_READ;
          end else if (timer == TW'(TIMEOUT_CYCLES)) begin
            status.timeout <= 1'b1;
            state          <= S_FINISH;
          end else begin
            timer <= timer + 1'b1;
          end
        end

        S_READ: state <= S_NEXT;

        S_NEXT: begin
          sent  <= sent + 1'b1;
          state <= (sent == PW'(NUM_PATTERNS - 1)) ? S_FINISH : S_SEND;
        end

        S_FINISH: begin
          status.busy <= 1'b0;
          status.done <= 1'b1;
          status.pass <= !cmp_fail && !status.timeout;
          state       <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign bist_mode = status.busy;
  assign lfsr_load = (state == S_CLEAR);
  assign cmp_clr   = (state == S_CLEAR);
  assign tx_wrn    = !(state == S_SEND && tbre);
  assign rx_rdn    = !(state == S_READ || state == S_SETTLE);
  assign cmp_valid = (state == S_READ);
  assign lfsr_en   = (state == S_NEXT);

  // The transmitter takes a byte only while its buffer is empty.
  a_write_when_empty: assert property (@(posedge clk) disable iff (rst) !tx_wrn |-> tbre);
  // A byte is read and compared only when the receiver has one.
  a_read_when_ready: assert property (@(posedge clk) disable iff (rst) cmp_valid |-> data_ready);

endmodule
