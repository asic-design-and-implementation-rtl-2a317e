// tb_uart_bist_inject: the self-test must catch faults in the UART.
//
// The whole design runs at CLK_HZ = 1.6 MHz and BAUD = 100 kbit/s, so the
// baud rate generator divides by round(1.6e6 / 1.6e6) = 1 and a frame lasts
// 11 * 16 = 176 cycles; all 255 patterns are still sent. Faults are forced
// onto the receiver's input inside the UART, the net that carries the
// transmitter's output during loopback:
//   1. no fault: the run passes, with 255 bytes compared;
//   2. the eight data bits of one frame forced to 0 (that byte arrives as
//      00, which the LFSR never produces): the run fails with exactly one bad
//      byte and still sends every pattern;
//   3. the line stuck at 1: nothing comes back, the run ends by timeout
//      after the first pattern;
//   4. the line stuck at 0 from the first write on: the first frame arrives
//      with a framing error and counts as bad, then the receiver waits for
//      the line to go high, nothing more arrives and the run times out;
//   5. no fault again: the run passes, so the result register was rewritten.
module tb_uart_bist_inject;
  import uart_pkg::*;

  localparam int BIT_CYC = 16;

  logic         clk = 1'b0;
  logic         rst;
  byte_t        din;
  logic         wrn, rdn;
  byte_t        dout;
  logic         dout_oe, data_ready, framing_error, parity_error, tbre, tsre;
  logic         stat_clr;
  uart_status_t uart_status_word;
  logic         rxd, sdo;
  logic         bist_start;
  bist_status_t bist_status;
  logic [7:0]   bist_err_count;
  logic         bist_mismatch;

  int checks = 0;
  int failures = 0;
  int n_bytes = 0;     // bytes delivered to the comparator in this run
  int n_mismatch = 0;  // mismatch pulses in this run

  uart_bist_top #(.CLK_HZ(1_600_000), .BAUD(100_000)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic dr_q = 1'b0;
  always @(negedge clk) begin
    if (bist_status.busy && data_ready && !dr_q) n_bytes++;
    if (bist_mismatch) n_mismatch++;
    dr_q = data_ready;
  end

  task automatic start_run();
    n_bytes = 0;
    n_mismatch = 0;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    check(bist_status.busy && !bist_status.done, "busy after start");
  endtask

  task automatic finish_run(input bit exp_pass, input bit exp_timeout, input int exp_bad,
                            input int exp_bytes, input string name);
    wait (bist_status.done);
    @(negedge clk);
    check(bist_status.pass == exp_pass, $sformatf("%s: pass = %0b", name, bist_status.pass));
    check(bist_status.timeout == exp_timeout, $sformatf("%s: timeout = %0b", name, bist_status.timeout));
    check(bist_err_count == 8'(exp_bad), $sformatf("%s: %0d bad bytes, expected %0d", name, bist_err_count, exp_bad));
    check(n_mismatch == exp_bad, $sformatf("%s: %0d mismatch pulses", name, n_mismatch));
    check(n_bytes == exp_bytes, $sformatf("%s: %0d bytes compared, expected %0d", name, n_bytes, exp_bytes));
    check(sdo, $sformatf("%s: sdo idle", name));
  endtask

  initial begin
    rst = 1'b1; din = '0; wrn = 1'b1; rdn = 1'b1; stat_clr = 1'b0;
    rxd = 1'b1; bist_start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(negedge clk);

    // 1. clean
    start_run();
    finish_run(1'b1, 1'b0, 0, 255, "clean");

    // 2. one frame's data bits forced to 0
    start_run();
    wait (n_bytes == 100);
    wait (dut.u_uart.rx_line == 1'b0);            // next start bit
    repeat (BIT_CYC + BIT_CYC / 2) @(negedge clk);
    force dut.u_uart.rx_line = 1'b0;
    repeat (8 * BIT_CYC) @(negedge clk);
    release dut.u_uart.rx_line;
    finish_run(1'b0, 1'b0, 1, 255, "one corrupted frame");

    // 3. stuck at 1
    force dut.u_uart.rx_line = 1'b1;
    start_run();
    finish_run(1'b0, 1'b1, 0, 0, "line stuck at 1");
    release dut.u_uart.rx_line;

    // 4. stuck at 0 from the first pattern on (before it, the receiver would
    //    take the stuck line for a frame during the settling wait and drop it)
    start_run();
    wait (!tbre);
    force dut.u_uart.rx_line = 1'b0;
    finish_run(1'b0, 1'b1, 1, 1, "line stuck at 0");
    check(framing_error, "stuck at 0: framing error seen");
    release dut.u_uart.rx_line;
    repeat (4 * BIT_CYC) @(negedge clk);

    // 5. clean again
    start_run();
    finish_run(1'b1, 1'b0, 0, 255, "clean again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
