// tb_uart_rx: UART receiver at CLKS_PER_BIT = 16.
// The testbench drives 8N1 frames on rxd with random bytes. Each good frame
// must give `valid` with the byte, `ack` must clear `valid`, a frame with
// a broken stop bit must be dropped, and a short low glitch must not start
// a frame.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1, ack = 0, valid, terr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .ack, .data, .valid, .tmr_err(terr));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    #22 rst_n = 1;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 30; t++) begin
      b = 8'($urandom);
      send(b, 1'b1);
      repeat (CPB) @(negedge clk);
      check(valid && data == b, $sformatf("byte %h got %h valid %b", b, data, valid));
      ack = 1; @(negedge clk); ack = 0; @(negedge clk);
      check(!valid, "ack clears valid");
    end
    send(8'hA7, 1'b0);                 // framing error
    repeat (2 * CPB) @(negedge clk);
    check(!valid, "bad stop bit dropped");
    rxd = 0; repeat (3) @(negedge clk); rxd = 1;   // glitch
    repeat (12 * CPB) @(negedge clk);
    check(!valid, "glitch ignored");
    send(8'h3C, 1'b1);
    repeat (CPB) @(negedge clk);
    check(valid && data == 8'h3C, "byte after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
