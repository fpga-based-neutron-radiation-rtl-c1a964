// tb_uart_tx: UART transmitter at CLKS_PER_BIT = 16.
// For random bytes the line is sampled in the middle of each bit and the
// frame (start 0, 8 data bits LSB first, stop 1) is compared with the
// byte; `busy` must last exactly 10 bit times, and a start while busy must
// be ignored. One TMR copy is upset in mid-frame; the frame must still be
// right and the error must be reported.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, txd, terr;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;
  bit seen_err = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .start, .data, .busy, .txd, .tmr_err(terr));

  always #5 clk = ~clk;
  always @(posedge clk) if (terr) seen_err = 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] frame;
    int bcyc;
    #22 rst_n = 1;
    repeat (3) @(posedge clk);
    check(txd == 1 && !busy, "idle line high");
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      data = 8'($urandom); start = 1;
      @(negedge clk);
      start = 0;
      // sample the frame mid-bit; the frame began at the last rising edge
      repeat (CPB / 2 - 1) @(negedge clk);
      for (int b = 0; b < 10; b++) begin
        frame[b] = txd;
        if (b == 3 && t == 5) begin
          force dut.u_state.r2 = ~dut.u_state.r2;
          #1 release dut.u_state.r2;
        end
        if (b == 4) begin            // ignored start while busy
          start = 1; data = ~data;
          @(negedge clk); start = 0; data = ~data;
          repeat (CPB - 1) @(negedge clk);
        end else begin
          repeat (CPB) @(negedge clk);
        end
      end
      check(frame == {1'b1, data, 1'b0}, $sformatf("frame %b for %h", frame, data));
      bcyc = 0;
      while (busy) begin @(negedge clk); bcyc++; end
      check(bcyc <= CPB / 2 + 1, "busy ends with the stop bit");
    end
    // busy length
    @(negedge clk); data = 8'h55; start = 1;
    @(negedge clk); start = 0; bcyc = 0;
    while (busy) begin @(negedge clk); bcyc++; end
    check(bcyc == 10 * CPB, $sformatf("frame length %0d cycles", bcyc));
    check(seen_err, "TMR error reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
