// tb_uart_bist_top: end-to-end test of the UART with self-test, at the
// default parameters (50 MHz clock, 9600 bit/s, even parity, 255 patterns).
//
// One bit is 16 * 326 = 5216 clk cycles and one frame 57,376. The test runs:
//   1. functional mode, sdo wired back to rxd outside the chip: bytes written
//      by the host come back on dout;
//   2. frames driven on rxd with a bad parity bit and with a 0 stop bit: the
//      receiver's flags and the sticky status bits; stat_clr clears them;
//   3. a full self-test run. Meanwhile the testbench drives noise on rxd and
//      tries host writes; neither may disturb the run, and sdo must stay 1.
//      Every byte the receiver delivers is compared with an independent
//      model of the pattern sequence (multiplication by x modulo
//      x^8 + x^4 + x^3 + x^2 + 1 from seed 1), all 255 must arrive in order,
//      and the run must end with pass, no timeout and no bad bytes, one frame
//      time per pattern after a one-frame settling wait (the last one ends
//      in the middle of its stop bit);
//   4. functional mode again, to show the switch back.
// Self-test runs that must fail are in tb_uart_bist_inject.
// Each mechanism (host transfer, parity error, framing error, sticky clear,
// mode switch into and out of self-test, loopback with the line held idle,
// host input locked out during self-test, self-test pass) is counted, and one
// that never happened is a failure.
module tb_uart_bist_top;
  import uart_pkg::*;

  localparam int     BIT_CYC   = 16 * 326;
  localparam int     FRAME_CYC = 11 * BIT_CYC;
  localparam int     NP        = 255;
  // expected length of a self-test run, see step 3 below
  localparam longint RUN_CYC   = 64'(NP + 1) * 64'(FRAME_CYC) - 64'(BIT_CYC / 2);

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

  logic ext_loop, drv;
  assign rxd = ext_loop ? sdo : drv;

  int checks = 0;
  int failures = 0;
  longint cyc = 0;

  uart_bist_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_host_xfer = 0, n_parity_err = 0, n_framing_err = 0, n_sticky_clr = 0;
  int n_enter_bist = 0, n_leave_bist = 0, n_loopback_idle = 0, n_host_locked = 0;
  int n_bist_pass = 0;

  // self-test monitor: bytes delivered while busy must follow the LFSR
  byte_t  model_q;
  int     n_bist_bytes = 0;
  int     sdo_low_busy = 0;
  logic   busy_q = 1'b0, dr_q = 1'b0;

  function automatic byte_t mul_x(input byte_t v);
    logic [8:0] p;
    p = {v, 1'b0};
    if (p[8]) p = p ^ 9'h11D;
    return p[7:0];
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (!rst) begin
      if (bist_status.busy && !busy_q) begin
        n_enter_bist++;
        model_q = 8'h01;
        n_bist_bytes = 0;
      end
      if (!bist_status.busy && busy_q) n_leave_bist++;
      if (bist_status.busy && !sdo) sdo_low_busy++;
      if (bist_status.busy && data_ready && !dr_q) begin
        check(dout == model_q, $sformatf("self-test byte %0d: %02h expected %02h",
                                        n_bist_bytes, dout, model_q));
        check(!parity_error && !framing_error, "self-test frame flags");
        model_q = mul_x(model_q);
        n_bist_bytes++;
      end
    end
    busy_q = bist_status.busy;
    dr_q   = data_ready;
  end

  task automatic host_write(input byte_t b);
    wait (tbre);
    @(negedge clk);
    din = b; wrn = 1'b0;
    @(negedge clk);
    wrn = 1'b1;
  endtask

  task automatic host_read(input byte_t b, input bit pe, input bit fe, input string what);
    wait (data_ready);
    @(negedge clk);
    check(dout == b, $sformatf("%s: dout %02h expected %02h", what, dout, b));
    check(parity_error == pe, $sformatf("%s: parity_error %0b", what, parity_error));
    check(framing_error == fe, $sformatf("%s: framing_error %0b", what, framing_error));
    if (pe) n_parity_err++;
    if (fe) n_framing_err++;
    rdn = 1'b0;
    #1 check(dout_oe, "dout_oe while reading");
    @(negedge clk);
    rdn = 1'b1;
    check(!data_ready, "read clears data_ready");
  endtask

  task automatic drive_frame(input byte_t b, input bit bad_parity, input bit bad_stop);
    logic [10:0] f;
    f = {~bad_stop, (^b) ^ bad_parity, b, 1'b0};
    @(negedge clk);
    for (int k = 0; k < 11; k++) begin
      drv = f[k];
      repeat (BIT_CYC) @(negedge clk);
    end
    drv = 1'b1;
    repeat (BIT_CYC) @(negedge clk);
  endtask

  task automatic functional_loop(input int n);
    byte_t b;
    ext_loop = 1'b1;
    for (int i = 0; i < n; i++) begin
      b = 8'($urandom);
      host_write(b);
      host_read(b, 1'b0, 1'b0, "functional loop");
      n_host_xfer++;
    end
    wait (tsre);
    ext_loop = 1'b0;
  endtask

  initial begin
    longint t_start, t_done;
    rst = 1'b1; din = '0; wrn = 1'b1; rdn = 1'b1; stat_clr = 1'b0;
    bist_start = 1'b0; ext_loop = 1'b1; drv = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(negedge clk);
    check(sdo && tbre && tsre && !data_ready && bist_status == '0, "idle after reset");

    // 1. functional transfers
    functional_loop(3);

    // 2. line errors
    drive_frame(8'h5A, 1'b1, 1'b0);
    host_read(8'h5A, 1'b1, 1'b0, "bad parity");
    drive_frame(8'hC6, 1'b0, 1'b1);
    host_read(8'hC6, 1'b0, 1'b1, "bad stop");
    check(uart_status_word.parity_sticky && uart_status_word.framing_sticky, "sticky bits set");
    @(negedge clk);
    stat_clr = 1'b1;
    @(negedge clk);
    stat_clr = 1'b0;
    @(negedge clk);
    if (!uart_status_word.parity_sticky && !uart_status_word.framing_sticky) n_sticky_clr++;
    check(n_sticky_clr == 1, "stat_clr clears the sticky bits");

    // 3. self-test
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    t_start = cyc;
    check(bist_status.busy, "busy after bist_start");
    fork
      begin : noise
        // rxd noise and host writes while the test runs
        while (!bist_status.done) begin
          drv = 1'($urandom);
          if ($urandom_range(0, 3) == 0) begin
            din = 8'($urandom); wrn = 1'b0;
            @(negedge clk);
            wrn = 1'b1;
            n_host_locked++;
          end
          for (int j = $urandom_range(100, 3000); j > 0 && !bist_status.done; j--)
            @(negedge clk);
        end
        drv = 1'b1;
      end
      begin : finish_wait
        wait (bist_status.done);
      end
    join
    t_done = cyc;
    @(negedge clk);
    check(bist_status.pass && !bist_status.timeout && !bist_status.busy, "self-test passes");
    check(bist_err_count == 0, $sformatf("%0d bad bytes", bist_err_count));
    check(n_bist_bytes == NP, $sformatf("%0d self-test bytes seen, expected %0d", n_bist_bytes, NP));
    check(model_q == 8'h01, "pattern sequence wrapped to the seed after 255 bytes");
    if (bist_status.pass) n_bist_pass++;
    if (sdo_low_busy == 0) n_loopback_idle++;
    check(sdo_low_busy == 0, "sdo stays at 1 during the self-test");
    // settle one frame, then one frame per pattern back to back; the run ends
    // at the middle of the last stop bit; up to two ticks of phase slack
    check(t_done - t_start >= RUN_CYC && t_done - t_start <= RUN_CYC + 2 * 326 + 10,
          $sformatf("self-test took %0d cycles, expected %0d plus up to two ticks", t_done - t_start,
                    RUN_CYC));
    $display("self-test took %0d cycles (%0d frames of %0d)", t_done - t_start,
             (t_done - t_start) / 64'(FRAME_CYC), FRAME_CYC);

    // 4. back to functional mode
    repeat (BIT_CYC) @(negedge clk);
    check(!data_ready, "no stray byte after the self-test");
    functional_loop(2);

    check(n_host_xfer > 0, "mechanism: host transfer");
    check(n_parity_err > 0, "mechanism: parity error");
    check(n_framing_err > 0, "mechanism: framing error");
    check(n_sticky_clr > 0, "mechanism: sticky clear");
    check(n_enter_bist > 0 && n_leave_bist > 0, "mechanism: mode switch");
    check(n_loopback_idle > 0, "mechanism: loopback with line idle");
    check(n_host_locked > 0, "mechanism: host locked out");
    check(n_bist_pass > 0, "mechanism: self-test pass");
    $display("mechanisms: host=%0d parity=%0d framing=%0d clr=%0d enter=%0d leave=%0d idle=%0d locked=%0d pass=%0d",
             n_host_xfer, n_parity_err, n_framing_err, n_sticky_clr, n_enter_bist, n_leave_bist,
             n_loopback_idle, n_host_locked, n_bist_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
