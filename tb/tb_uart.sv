// tb_uart: checks the assembled UART through its host and serial pins.
//
// The UART runs at CLK_HZ = 32,000 and BAUD = 1000, so the baud rate
// generator divides by round(32000 / 16000) = 2 and a bit lasts 32 clk
// cycles. Four phases: (1) sdo wired back to rxd outside the block: random
// bytes are written and read back; the time from the write to data_ready is
// checked against 10.5 bit times; (2) internal loopback with rxd held at 0:
// bytes still come back and sdo stays at 1; (3) the testbench drives rxd
// itself with frames with a bad parity bit or a 0 stop bit: the live and
// sticky status bits are checked, and stat_clr clears the sticky ones;
// (4) the status word's tbre, tsre and data_ready fields are compared with
// the pins throughout.
module tb_uart;
  import uart_pkg::*;

  localparam int BIT_CYC = 32;

  logic         clk = 1'b0;
  logic         rst;
  byte_t        din;
  logic         wrn, rdn;
  byte_t        dout;
  logic         dout_oe, data_ready, framing_error, parity_error, tbre, tsre;
  logic         stat_clr;
  uart_status_t status;
  logic         rxd, sdo, loopback;

  logic ext_loop;   // 1: rxd = sdo; 0: rxd = drv
  logic drv;
  assign rxd = ext_loop ? sdo : drv;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  uart #(.CLK_HZ(32_000), .BAUD(1000), .PARITY(PAR_EVEN)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // status word mirrors the pins one cycle later; sdo idles high in loopback
  logic dr_q, tbre_q, tsre_q;
  int sdo_low_in_loopback = 0;
  always @(negedge clk) begin
    cyc++;
    if (!rst && cyc > 3) begin
      check(status.data_ready == dr_q && status.tbre == tbre_q && status.tsre == tsre_q,
            "status word live bits");
    end
    if (loopback && !sdo) sdo_low_in_loopback++;
    dr_q = data_ready; tbre_q = tbre; tsre_q = tsre;
  end

  task automatic write(input byte_t b);
    wait (tbre);
    @(negedge clk);
    din = b; wrn = 1'b0;
    @(negedge clk);
    wrn = 1'b1;
  endtask

  task automatic read_and_check(input byte_t b, input bit pe, input bit fe, input string what);
    wait (data_ready);
    @(negedge clk);
    check(dout == b, $sformatf("%s: dout %02h expected %02h", what, dout, b));
    check(parity_error == pe && framing_error == fe, $sformatf("%s: error flags", what));
    rdn = 1'b0;
    #1 check(dout_oe, "dout_oe with rdn low");
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

  initial begin
    byte_t b;
    int t0, lat;
    rst = 1'b1; din = '0; wrn = 1'b1; rdn = 1'b1; stat_clr = 1'b0;
    loopback = 1'b0; ext_loop = 1'b1; drv = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(negedge clk);
    check(sdo && tbre && tsre && !data_ready, "idle after reset");

    // (1) external loop
    for (int i = 0; i < 12; i++) begin
      b = 8'($urandom);
      wait (tsre);   // the previous stop bit must be over for the timing check
      write(b);
      t0 = cyc;
      wait (data_ready);
      lat = cyc - t0;
      // transmit start waits for a tick (<= 2 cycles), receiver samples the
      // stop bit 10.5 bits in, plus synchronizer and tick phase
      check(lat >= 10 * BIT_CYC + BIT_CYC / 2 - 2 && lat <= 10 * BIT_CYC + BIT_CYC / 2 + 6,
            $sformatf("write to data_ready took %0d cycles", lat));
      read_and_check(b, 1'b0, 1'b0, "external loop");
    end
    check(!status.parity_sticky && !status.framing_sticky, "no sticky errors after clean traffic");

    // (2) internal loopback, outside line stuck at 0
    ext_loop = 1'b0; drv = 1'b0;
    loopback = 1'b1;
    for (int i = 0; i < 8; i++) begin
      b = 8'($urandom);
      write(b);
      read_and_check(b, 1'b0, 1'b0, "internal loopback");
    end
    wait (tsre);
    check(sdo_low_in_loopback == 0, "sdo stays high in loopback");
    loopback = 1'b0; drv = 1'b1;
    repeat (2 * BIT_CYC) @(negedge clk);

    // (3) errors from outside
    drive_frame(8'h4D, 1'b1, 1'b0);
    read_and_check(8'h4D, 1'b1, 1'b0, "bad parity");
    check(status.parity_sticky && !status.framing_sticky, "parity sticky set");
    drive_frame(8'hB2, 1'b0, 1'b0);
    read_and_check(8'hB2, 1'b0, 1'b0, "good after bad");
    check(status.parity_sticky && !status.parity_error, "sticky outlives the live flag");
    drive_frame(8'h0F, 1'b0, 1'b1);
    read_and_check(8'h0F, 1'b0, 1'b1, "bad stop");
    check(status.framing_sticky, "framing sticky set");
    @(negedge clk);
    stat_clr = 1'b1;
    @(negedge clk);
    stat_clr = 1'b0;
    check(!status.parity_sticky && !status.framing_sticky, "stat_clr clears the sticky bits");
    drive_frame(8'hE7, 1'b0, 1'b0);
    read_and_check(8'hE7, 1'b0, 1'b0, "good after clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
