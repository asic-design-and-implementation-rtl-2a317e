// tb_uart_status: checks the status register with random stimulus.
//
// A reference model in the testbench keeps its own copy of every field: the
// live flags are the inputs one cycle late; a sticky bit is set by
// frame_valid with its error flag, cleared by clr, and a set in the same
// cycle wins over the clear. The register is compared with the model every
// cycle for 3000 random cycles, with clr and frame_valid kept rare enough
// that the sticky bits spend time both set and clear.
module tb_uart_status;
  import uart_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic clr, frame_valid, data_ready, parity_error, framing_error, tbre, tsre;
  uart_status_t status;

  int checks = 0;
  int failures = 0;

  uart_status dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uart_status_t model;
    int set_p, set_f, cleared;
    set_p = 0; set_f = 0; cleared = 0;
    rst = 1'b1;
    {clr, frame_valid, data_ready, parity_error, framing_error, tbre, tsre} = '0;
    repeat (2) @(posedge clk);
    #1;
    check(status == uart_status_t'{tbre: 1'b1, tsre: 1'b1, default: 1'b0}, "reset value");
    rst = 1'b0;
    model = status;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr           = ($urandom_range(0, 40) == 0);
      frame_valid   = ($urandom_range(0, 10) == 0);
      data_ready    = 1'($urandom);
      parity_error  = ($urandom_range(0, 3) == 0);
      framing_error = ($urandom_range(0, 3) == 0);
      tbre          = 1'($urandom);
      tsre          = 1'($urandom);
      // model update for the coming edge
      model.data_ready    = data_ready;
      model.parity_error  = parity_error;
      model.framing_error = framing_error;
      model.tbre          = tbre;
      model.tsre          = tsre;
      if (frame_valid && parity_error) begin model.parity_sticky = 1'b1; set_p++; end
      else if (clr) model.parity_sticky = 1'b0;
      if (frame_valid && framing_error) begin model.framing_sticky = 1'b1; set_f++; end
      else if (clr) model.framing_sticky = 1'b0;
      if (clr) cleared++;
      @(posedge clk); #1;
      check(status == model, $sformatf("cycle %0d: status %b expected %b", i, status, model));
    end
    check(set_p > 10 && set_f > 10 && cleared > 10, "stimulus exercised set and clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
