// lfsr: pseudo-random test-pattern generator for the self-test.
//
// A WIDTH-bit linear feedback shift register in the form with an XOR in front
// of each tapped stage and the last stage fed back to them: on each enabled
// clock the register shifts up by one, and when the bit shifted out of the top
// is 1 the positions set in POLY are inverted. With the default
// POLY = 8'h1D, the primitive polynomial x^8 + x^4 + x^3 + x^2 + 1, the
// register steps through all 255 non-zero states before it repeats. The
// all-zero state is never entered from a non-zero one, so reset and load
// force a non-zero seed (a zero seed is replaced by 1).
//
// Interface: load (priority) sets q to seed; en advances one step; q is the
// current pattern. One step per clk cycle at most.
//
// The use of a maximal-length LFSR of D flip-flops and XOR gates as the
// pattern generator is the document's; the width of 8 matches the
// transmitter's data input; the polynomial and seed are this design's choice.
module lfsr #(
  parameter int unsigned          WIDTH = 8,
  parameter logic [WIDTH-1:0]     POLY  = WIDTH'(8'h1D),
  parameter logic [WIDTH-1:0]     SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  function automatic logic [WIDTH-1:0] nonzero(input logic [WIDTH-1:0] v);
    return (v == '0) ? WIDTH'(1) : v;
  endfunction

  logic [WIDTH-1:0] q_next;
  assign q_next = {q[WIDTH-2:0], 1'b0} ^ (q[WIDTH-1] ? POLY : '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= nonzero(SEED);
    else if (load) q <= nonzero(seed);
    else if (en)   q <= q_next;
  end

endmodule
