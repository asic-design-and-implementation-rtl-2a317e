// tb_lfsr: checks the 8-bit pattern generator.
//
// The reference treats the state as a polynomial over GF(2) and multiplies it
// by x modulo x^8 + x^4 + x^3 + x^2 + 1 each step. Checked: every step against
// the reference, that the sequence from seed 1 visits all 255 non-zero values
// exactly once and then returns to the seed, that en low holds the state,
// that load sets the seed, and that a zero seed is replaced by 1.
module tb_lfsr;
  logic       clk = 1'b0;
  logic       rst;
  logic       load;
  logic [7:0] seed;
  logic       en;
  logic [7:0] q;

  int checks = 0;
  int failures = 0;

  lfsr #(.WIDTH(8), .POLY(8'h1D), .SEED(8'h01)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] mul_x(input logic [7:0] v);
    logic [8:0] p;
    p = {v, 1'b0};
    if (p[8]) p = p ^ 9'h11D;
    return p[7:0];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [256];
    logic [7:0] expv;
    rst = 1'b1; load = 1'b0; seed = 8'h00; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(q == 8'h01, "reset value is the seed");
    foreach (seen[i]) seen[i] = 1'b0;

    en = 1'b1;
    expv = 8'h01;
    for (int i = 0; i < 255; i++) begin
      check(!seen[q], $sformatf("value %02h repeated at step %0d", q, i));
      seen[q] = 1'b1;
      check(q != 8'h00, "never zero");
      @(posedge clk); #1;
      expv = mul_x(expv);
      check(q == expv, $sformatf("step %0d: got %02h expected %02h", i, q, expv));
    end
    check(q == 8'h01, "period is 255");

    // hold
    en = 1'b0;
    expv = q;
    repeat (3) @(posedge clk);
    #1 check(q == expv, "en low holds the state");

    // load a seed, then step from it
    load = 1'b1; seed = 8'hA5;
    @(posedge clk); #1;
    load = 1'b0;
    check(q == 8'hA5, "load sets the seed");
    en = 1'b1;
    @(posedge clk); #1;
    check(q == mul_x(8'hA5), "step after load");

    // load beats en
    load = 1'b1; seed = 8'h3C;
    @(posedge clk); #1;
    check(q == 8'h3C, "load has priority over en");

    // zero seed
    seed = 8'h00;
    @(posedge clk); #1;
    load = 1'b0; en = 1'b0;
    check(q == 8'h01, "zero seed replaced by 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
