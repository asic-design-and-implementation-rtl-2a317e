// tb_bist_comparator: checks the self-test response analyser.
//
// Random compare requests, about half with a flipped bit or an error flag,
// are applied; a model in the testbench keeps the expected fail bit, bad-byte
// count (saturating at 255) and compared-byte count, and the mismatch pulse
// is checked one cycle after each request. The run also checks that clr
// zeroes everything and that the bad-byte counter saturates.
module tb_bist_comparator;
  import uart_pkg::*;

  logic       clk = 1'b0;
  logic       rst, clr, valid;
  byte_t      expected, received;
  logic       parity_error, framing_error;
  logic       mismatch, fail;
  logic [7:0] err_count, checked;

  int checks = 0;
  int failures = 0;

  bist_comparator #(.CNT_W(8)) dut (.*);

  always #5 clk = ~clk;

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

  bit m_fail;
  int m_err, m_chk;

  task automatic step(input bit v, input bit corrupt, input bit pe, input bit fe);
    bit bad;
    @(negedge clk);
    clr = 1'b0;
    valid = v;
    expected = 8'($urandom);
    received = corrupt ? expected ^ (8'h01 << $urandom_range(0, 7)) : expected;
    parity_error = pe;
    framing_error = fe;
    bad = corrupt || pe || fe;
    @(posedge clk); #1;
    if (v) begin
      m_chk = (m_chk + 1) % 256;
      if (bad) begin
        m_fail = 1'b1;
        if (m_err < 255) m_err++;
      end
    end
    check(mismatch == (v && bad), "mismatch pulse");
    check(fail == m_fail, "fail bit");
    check(err_count == 8'(m_err), $sformatf("err_count %0d expected %0d", err_count, m_err));
    check(checked == 8'(m_chk), $sformatf("checked %0d expected %0d", checked, m_chk));
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; valid = 1'b0; expected = '0; received = '0;
    parity_error = 1'b0; framing_error = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    m_fail = 1'b0; m_err = 0; m_chk = 0;

    // good bytes only: no failure
    for (int i = 0; i < 50; i++) step(1'($urandom), 1'b0, 1'b0, 1'b0);
    check(!fail && err_count == 0 && checked > 0, "clean run passes");

    // a single bit flip, a parity error, a framing error
    step(1'b1, 1'b1, 1'b0, 1'b0);
    step(1'b1, 1'b0, 1'b1, 1'b0);
    step(1'b1, 1'b0, 1'b0, 1'b1);
    // invalid cycles with garbage are ignored
    step(1'b0, 1'b1, 1'b1, 1'b1);

    // random mix
    for (int i = 0; i < 1200; i++)
      step(1'($urandom), 1'($urandom_range(0, 1)), $urandom_range(0, 5) == 0, $urandom_range(0, 5) == 0);
    check(m_err == 255, "bad-byte counter reached saturation");

    // clear
    @(negedge clk);
    clr = 1'b1; valid = 1'b0;
    @(posedge clk); #1;
    clr = 1'b0;
    m_fail = 1'b0; m_err = 0; m_chk = 0;
    check(!fail && err_count == 0 && checked == 0 && !mismatch, "clr zeroes the results");
    for (int i = 0; i < 20; i++) step(1'b1, 1'b0, 1'b0, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
