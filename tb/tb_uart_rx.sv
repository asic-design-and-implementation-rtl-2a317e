// tb_uart_rx: checks the receiver against frames the testbench drives.
//
// tick16 comes every TD clk cycles; the testbench drives rxd with frames of
// 16 * TD cycles per bit, starting at random phases to the ticks. It sends
// good frames, frames with a wrong parity bit, frames with a 0 stop bit and
// short low glitches that must not start a frame. After each frame it checks
// dout, parity_error, framing_error, one frame_valid pulse, that data_ready
// rises in the middle of the stop bit (within the phase uncertainty of one
// tick plus the two-flop synchronizer), that it stays up until rdn goes low
// and falls on the next clk edge, and that dout_oe follows !rdn.
module tb_uart_rx;
  import uart_pkg::*;

  localparam int TD = 4;
  localparam int BIT_CYC = 16 * TD;

  logic  clk = 1'b0;
  logic  rst;
  logic  tick16;
  logic  rxd;
  logic  rdn;
  byte_t dout;
  logic  dout_oe, data_ready, framing_error, parity_error, frame_valid;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int fv_count = 0;
  int dr_rise = -1;

  uart_rx #(.PARITY(PAR_EVEN)) dut (.*);

  always #5 clk = ~clk;

  int tdiv = 0;
  always_ff @(posedge clk) begin
    tdiv   <= (tdiv == TD - 1) ? 0 : tdiv + 1;
    tick16 <= (tdiv == TD - 1);
  end

  logic dr_q = 1'b0;
  always @(negedge clk) begin
    cyc++;
    if (frame_valid) fv_count++;
    if (data_ready && !dr_q) dr_rise = cyc;
    dr_q = data_ready;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one frame; returns the cycle of the start edge
  task automatic send(input byte_t b, input bit bad_parity, input bit bad_stop, output int t0);
    logic [10:0] f;
    f = {~bad_stop, (^b) ^ bad_parity, b, 1'b0};
    @(negedge clk);
    t0 = cyc;
    for (int k = 0; k < 11; k++) begin
      rxd = f[k];
      repeat (BIT_CYC) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  task automatic frame(input byte_t b, input bit bad_parity, input bit bad_stop);
    int t0, fv0, lo, hi;
    fv0 = fv_count;
    dr_rise = -1;
    send(b, bad_parity, bad_stop, t0);
    // data_ready has risen half a bit before the end of the stop bit
    lo = t0 + 167 * TD;
    hi = t0 + 168 * TD + 4;
    check(dr_rise >= lo && dr_rise <= hi,
          $sformatf("data_ready rose at +%0d, window +%0d..+%0d", dr_rise - t0, lo - t0, hi - t0));
    check(data_ready, "data_ready held until read");
    check(dout == b, $sformatf("dout %02h expected %02h", dout, b));
    check(parity_error == bad_parity, $sformatf("parity_error %0b expected %0b", parity_error, bad_parity));
    check(framing_error == bad_stop, $sformatf("framing_error %0b expected %0b", framing_error, bad_stop));
    check(fv_count == fv0 + 1, $sformatf("%0d frame_valid pulses", fv_count - fv0));
    check(!dout_oe, "dout_oe low while rdn high");
    // read
    rdn = 1'b0;
    #1 check(dout_oe, "dout_oe high while rdn low");
    @(negedge clk);
    rdn = 1'b1;
    check(!data_ready, "read clears data_ready");
    // line idle for a random time up to two bits
    repeat ($urandom_range(1, 2 * BIT_CYC)) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; rxd = 1'b1; rdn = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (50) @(negedge clk);
    check(!data_ready && !parity_error && !framing_error, "flags clear after reset");

    frame(8'h55, 1'b0, 1'b0);
    frame(8'h00, 1'b0, 1'b0);
    frame(8'hFF, 1'b0, 1'b0);
    frame(8'h81, 1'b1, 1'b0);
    frame(8'h7E, 1'b0, 1'b1);
    frame(8'h12, 1'b1, 1'b1);
    frame(8'hC3, 1'b0, 1'b0);   // flags of the previous frame are replaced

    // glitches of 1 to 5 ticks are not frames
    for (int g = 1; g <= 5; g++) begin
      int fv0;
      fv0 = fv_count;
      rxd = 1'b0;
      repeat (g * TD) @(negedge clk);
      rxd = 1'b1;
      repeat (12 * BIT_CYC) @(negedge clk);
      check(fv_count == fv0 && !data_ready, $sformatf("glitch of %0d ticks taken as a frame", g));
    end

    for (int i = 0; i < 30; i++) begin
      frame(byte_t'($urandom), ($urandom_range(0, 3) == 0), ($urandom_range(0, 3) == 0));
    end

    // a byte left unread: data_ready stays up, the next frame replaces dout
    begin
      int t0;
      send(8'h96, 1'b0, 1'b0, t0);
      repeat (BIT_CYC) @(negedge clk);
      send(8'h69, 1'b0, 1'b0, t0);
      repeat (BIT_CYC) @(negedge clk);
      check(data_ready && dout == 8'h69, "second unread byte replaces the first");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
