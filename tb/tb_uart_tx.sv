// tb_uart_tx: checks the transmitter's frames, timing and handshake.
//
// The testbench makes tick16 itself, one pulse every TD clk cycles, and runs
// two transmitters side by side, one with even and one with odd parity. A
// monitor per transmitter waits for the falling edge of the start bit and
// samples the line in the middle of each of the 11 bit times (16 ticks each),
// checking start 0, stop 1, the parity bit and the byte, which is compared
// with the queue of bytes written. Also checked: the idle levels after reset,
// that a write clears tbre, that a write while tbre is low is ignored, that
// tsre rises exactly 11 * 16 ticks after the start edge, and that a byte
// written during a frame follows it with no gap.
module tb_uart_tx;
  import uart_pkg::*;

  localparam int TD = 3;                      // clk cycles per tick16
  localparam int BIT_CYC = 16 * TD;
  localparam int FRAME_CYC = 11 * BIT_CYC;

  logic  clk = 1'b0;
  logic  rst;
  logic  tick16;
  byte_t din;
  logic  wrn;
  logic  sdo_e, tbre_e, tsre_e;
  logic  sdo_o, tbre_o, tsre_o;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  uart_tx #(.PARITY(PAR_EVEN)) dut_e (.clk, .rst, .tick16, .din, .wrn, .sdo(sdo_e), .tbre(tbre_e), .tsre(tsre_e));
  uart_tx #(.PARITY(PAR_ODD))  dut_o (.clk, .rst, .tick16, .din, .wrn, .sdo(sdo_o), .tbre(tbre_o), .tsre(tsre_o));

  always #5 clk = ~clk;

  // tick16 every TD cycles
  int tdiv = 0;
  always_ff @(posedge clk) begin
    tdiv   <= (tdiv == TD - 1) ? 0 : tdiv + 1;
    tick16 <= (tdiv == TD - 1);
  end
  always @(negedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte_t sent_e[$], sent_o[$];
  int    frames_e = 0, frames_o = 0;
  int    start_e[$], start_o[$];

  function automatic logic line(input bit odd);
    return odd ? sdo_o : sdo_e;
  endfunction

  function automatic logic tsre_of(input bit odd);
    return odd ? tsre_o : tsre_e;
  endfunction

  task automatic monitor(input bit odd);
    logic [10:0] f;
    int t0;
    byte_t exp_b;
    forever begin
      @(negedge clk);
      if (!rst && line(odd) == 1'b0) begin
        t0 = cyc;
        if (odd) start_o.push_back(t0); else start_e.push_back(t0);
        for (int k = 0; k < 11; k++) begin
          while (cyc < t0 + k * BIT_CYC + BIT_CYC / 2) @(negedge clk);
          f[k] = line(odd);
        end
        check(f[0] == 1'b0, "start bit 0");
        check(f[10] == 1'b1, "stop bit 1");
        if (odd) begin
          check(sent_o.size() > 0, "odd: frame without a write");
          exp_b = sent_o.pop_front();
          check(f[9] == ~^f[8:1], $sformatf("odd parity bit wrong for %02h", f[8:1]));
          frames_o++;
        end else begin
          check(sent_e.size() > 0, "even: frame without a write");
          exp_b = sent_e.pop_front();
          check(f[9] == ^f[8:1], $sformatf("even parity bit wrong for %02h", f[8:1]));
          frames_e++;
        end
        check(f[8:1] == exp_b, $sformatf("%s: byte %02h expected %02h", odd ? "odd" : "even", f[8:1], exp_b));
        // the rest of the stop bit: tsre rises exactly at the end of the frame
        while (cyc < t0 + FRAME_CYC - 1) begin
          @(negedge clk);
          check(line(odd) == 1'b1 || cyc >= t0 + FRAME_CYC, "stop bit held");
        end
      end
    end
  endtask

  initial fork
    monitor(1'b0);
    monitor(1'b1);
  join_none

  task automatic write(input byte_t b, input bit expect_taken);
    @(negedge clk);
    din = b; wrn = 1'b0;
    if (expect_taken) begin
      sent_e.push_back(b);
      sent_o.push_back(b);
    end
    @(negedge clk);
    wrn = 1'b1;
    din = 8'($urandom);
  endtask

  initial begin
    int te;
    rst = 1'b1; wrn = 1'b1; din = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    @(negedge clk);
    check(sdo_e && sdo_o, "idle line is 1");
    check(tbre_e && tsre_e && tbre_o && tsre_o, "tbre and tsre set after reset");

    // one byte
    write(8'hA5, 1'b1);
    check(!tbre_e, "write clears tbre");
    wait (tsre_e == 1'b0);
    @(negedge clk);
    check(tbre_e, "tbre set again once the byte moved to the shift register");

    // second byte during the frame: sent back to back
    write(8'h3C, 1'b1);
    check(!tbre_e, "second write clears tbre");
    // a write while the buffer is full is ignored
    write(8'hFF, 1'b0);
    wait (tbre_e == 1'b1);
    @(negedge clk);
    check(!tsre_e, "tsre stays low between back-to-back frames");
    wait (frames_e == 2);
    check(start_e.size() == 2 && start_e[1] - start_e[0] == FRAME_CYC,
          $sformatf("back-to-back frames %0d cycles apart, expected %0d",
                    start_e.size() == 2 ? start_e[1] - start_e[0] : -1, FRAME_CYC));
    // tsre rises one frame after the second start edge
    wait (tsre_e == 1'b1);
    te = cyc;
    check(te - start_e[1] == FRAME_CYC || te - start_e[1] == FRAME_CYC + 1,
          $sformatf("tsre rose %0d cycles after the start edge, expected %0d", te - start_e[1], FRAME_CYC));

    // random bytes, waiting for tbre each time
    for (int i = 0; i < 24; i++) begin
      wait (tbre_e == 1'b1);
      write(byte_t'($urandom), 1'b1);
    end
    wait (frames_e == 26 && frames_o == 26 && tsre_e && tsre_o);
    repeat (FRAME_CYC) @(negedge clk);
    check(frames_e == 26 && frames_o == 26, "no extra frames");
    check(sent_e.size() == 0 && sent_o.size() == 0, "every written byte was sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
