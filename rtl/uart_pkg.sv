// uart_pkg: types and constants shared by the UART and its self-test logic.
//
// A character on the line is one start bit (0), eight data bits sent least
// significant bit first, one parity bit and one stop bit (1): eleven bit times.
// Every bit lasts sixteen ticks of the oversampling enable. The parity sense is
// a parameter of the transmitter and receiver; even parity makes the number of
// ones over data and parity even, odd parity makes it odd.
package uart_pkg;

  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned OVERSAMPLE = 16;
  // start + data + parity + stop
  localparam int unsigned FRAME_BITS = DATA_BITS + 3;

  typedef logic [DATA_BITS-1:0] byte_t;

  typedef enum logic {
    PAR_EVEN = 1'b0,
    PAR_ODD  = 1'b1
  } parity_e;

  // Parity bit that the transmitter appends to d.
  function automatic logic parity_bit(input byte_t d, input parity_e p);
    return (^d) ^ (p == PAR_ODD);
  endfunction

  // Status register layout, most significant field first.
  typedef struct packed {
    logic framing_sticky; // a frame with a bad stop bit arrived since last clear
    logic parity_sticky;  // a frame with a bad parity bit arrived since last clear
    logic tsre;           // transmit shift register empty
    logic tbre;           // transmit buffer register empty
    logic framing_error;  // last frame had a bad stop bit
    logic parity_error;   // last frame had a bad parity bit
    logic data_ready;     // receive buffer holds an unread byte
  } uart_status_t;

  // Self-test result register, as seen by the host.
  typedef struct packed {
    logic busy;     // a self-test is running; the UART is in loopback
    logic done;     // the last self-test has finished
    logic pass;     // it finished with every byte correct
    logic timeout;  // it stopped because a byte never came back
  } bist_status_t;

endpackage
