// tb_bist_ctrl: checks the self-test sequencer against a model of the UART.
//
// The testbench models the UART's handshake: a write (tx_wrn low) empties
// tbre for a few cycles, and a random 10 to 100 cycles later data_ready rises
// until a read (rx_rdn low). Three runs with NUM_PATTERNS = 10 are made:
// a clean one (must pass), one where the comparator reports a failure (must
// fail) and one where the model stops answering (must end by timeout after
// TIMEOUT_CYCLES). Checked in each: busy and bist_mode during the run only,
// one seed load and one comparator clear at the start, the settling wait with
// the read strobe low, exactly NUM_PATTERNS writes, compares and LFSR steps in
// the order write, compare, step, writes only with tbre high, compares only
// with data_ready high, and the result bits.
module tb_bist_ctrl;
  import uart_pkg::*;

  localparam int NP = 10;
  localparam int SETTLE = 20;
  localparam int TMO = 200;

  logic clk = 1'b0;
  logic rst, start;
  logic tbre, data_ready;
  logic tx_wrn, rx_rdn, lfsr_load, lfsr_en, cmp_clr, cmp_valid, cmp_fail, bist_mode;
  bist_status_t status;

  int checks = 0;
  int failures = 0;

  bist_ctrl #(.NUM_PATTERNS(NP), .SETTLE_CYCLES(SETTLE), .TIMEOUT_CYCLES(TMO)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // UART handshake model
  bit answer = 1'b1;
  int tbre_wait = 0, dr_wait = -1;
  always_ff @(posedge clk) begin
    if (rst) begin
      tbre <= 1'b1; data_ready <= 1'b0; tbre_wait <= 0; dr_wait <= -1;
    end else begin
      if (!tx_wrn) begin
        tbre      <= 1'b0;
        tbre_wait <= $urandom_range(2, 6);
        dr_wait   <= answer ? $urandom_range(10, 100) : -1;
      end else begin
        if (tbre_wait > 0) tbre_wait <= tbre_wait - 1;
        else               tbre <= 1'b1;
        if (dr_wait > 0)       dr_wait <= dr_wait - 1;
        else if (dr_wait == 0) begin data_ready <= 1'b1; dr_wait <= -1; end
      end
      if (!rx_rdn) data_ready <= 1'b0;
    end
  end

  // event counters and order checks, sampled on the falling edge
  int n_wr, n_cmp, n_step, n_load, n_clr, n_settle, last_wr;
  int phase;  // 0: expect write, 1: expect compare, 2: expect step
  always @(negedge clk) begin
    if (!rst) begin
      if (!tx_wrn) begin
        n_wr++;
        check(tbre, "write with tbre low");
        check(phase == 0, "write out of order");
        phase = 1;
        last_wr = int'($time);
      end
      if (cmp_valid) begin
        n_cmp++;
        check(data_ready, "compare without data_ready");
        check(!rx_rdn, "compare without a read strobe");
        check(phase == 1, "compare out of order");
        phase = 2;
      end
      if (lfsr_en) begin
        n_step++;
        check(phase == 2, "LFSR step out of order");
        phase = 0;
      end
      if (lfsr_load) n_load++;
      if (cmp_clr) n_clr++;
      if (!rx_rdn && !cmp_valid) n_settle++;
      check(bist_mode == status.busy, "bist_mode follows busy");
    end
  end

  task automatic run(input bit make_fail, input bit respond,
                     input bit exp_pass, input bit exp_timeout, input string name);
    int t_start, t_done;
    n_wr = 0; n_cmp = 0; n_step = 0; n_load = 0; n_clr = 0; n_settle = 0; phase = 0;
    answer = respond;
    cmp_fail = 1'b0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(status.busy && bist_mode && !status.done, {name, ": busy after start"});
    t_start = int'($time);
    // a second start while busy changes nothing
    repeat (5) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (make_fail) begin
      wait (n_cmp == 3);
      @(negedge clk);
      cmp_fail = 1'b1;
    end
    wait (status.done);
    @(negedge clk);
    check(!status.busy && !bist_mode, {name, ": idle after done"});
    check(status.pass == exp_pass, {name, ": pass bit"});
    check(status.timeout == exp_timeout, {name, ": timeout bit"});
    check(n_load == 1 && n_clr == 1, {name, ": one seed load and clear"});
    check(n_settle == SETTLE + 1, $sformatf("%s: settle read strobe %0d cycles", name, n_settle));
    if (respond) begin
      check(n_wr == NP && n_cmp == NP && n_step == NP,
            $sformatf("%s: %0d writes %0d compares %0d steps, expected %0d", name, n_wr, n_cmp, n_step, NP));
    end else begin
      check(n_wr == 1 && n_cmp == 0, {name, ": stops after the unanswered write"});
      t_done = int'($time);
      // timeout counted in clk periods of 10 time units
      check((t_done - last_wr) / 10 >= TMO && (t_done - last_wr) / 10 <= TMO + 4,
            $sformatf("%s: timeout after %0d cycles", name, (t_done - last_wr) / 10));
    end
    // the result is held
    repeat (20) @(negedge clk);
    check(status.done && status.pass == exp_pass, {name, ": result held"});
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; cmp_fail = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(negedge clk);
    check(status == '0 && !bist_mode && tx_wrn && rx_rdn, "idle after reset");
    run(1'b0, 1'b1, 1'b1, 1'b0, "clean");
    run(1'b1, 1'b1, 1'b0, 1'b0, "compare failure");
    run(1'b0, 1'b0, 1'b0, 1'b1, "no answer");
    answer = 1'b1;
    run(1'b0, 1'b1, 1'b1, 1'b0, "clean again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
