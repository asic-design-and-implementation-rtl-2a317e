// tb_baud_gen: checks the oversampling enable.
//
// At the defaults (50 MHz, 9600 bit/s) the divisor is
// round(50,000,000 / 153,600) = round(325.52) = 326: tick16 must be a single
// cycle wide and exactly 326 cycles apart. A second instance at 1 kHz and
// 10 bit/s must tick every round(1000 / 160) = 6 cycles.
module tb_baud_gen;
  logic clk = 1'b0;
  logic rst;
  logic tick_a, tick_b;

  int checks = 0;
  int failures = 0;

  baud_gen dut_a (.clk(clk), .rst(rst), .tick16(tick_a));
  baud_gen #(.CLK_HZ(1000), .BAUD(10)) dut_b (.clk(clk), .rst(rst), .tick16(tick_b));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample on the falling edge, away from the flip-flops' updates
  initial begin
    int a_last, a_n, b_last, b_n;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    a_last = -1; a_n = 0; b_last = -1; b_n = 0;
    for (int c = 0; c < 20 * 326 + 10; c++) begin
      @(negedge clk);
      if (tick_a) begin
        if (a_last >= 0)
          check(c - a_last == 326, $sformatf("a: tick spacing %0d, expected 326", c - a_last));
        else
          check(c == 326, $sformatf("a: first tick after %0d cycles, expected 326", c));
        a_last = c;
        a_n++;
      end
      if (tick_b) begin
        if (b_last >= 0)
          check(c - b_last == 6, $sformatf("b: tick spacing %0d, expected 6", c - b_last));
        b_last = c;
        b_n++;
      end
    end
    check(a_n == 20, $sformatf("a: %0d ticks, expected 20", a_n));
    check(b_n > 1000, "b ticked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
