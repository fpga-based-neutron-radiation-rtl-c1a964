// tb_boot_loader: copy of a 64-word FLASH image into program memory.
// The FLASH model answers one cycle after the address; the program-memory
// side acknowledges writes after a random delay, as the EDAC controller
// does while it scrubs. Every word must arrive once at its address with
// its data, and `done` must rise after the last word and stay high.
module tb_boot_loader;
  localparam int WORDS = 64, AW = 11, DW = 12;
  logic clk = 0, rst_n = 0, wr_req, wr_ack = 0, done, terr;
  logic [AW-1:0] flash_addr, wr_addr;
  logic [DW-1:0] flash_data, wr_data;
  logic [DW-1:0] flash [WORDS];
  logic [DW-1:0] got [WORDS];
  int nwrites = 0, checks = 0, failures = 0;

  boot_loader #(.WORDS(WORDS), .AW(AW), .DW(DW)) dut (
    .clk, .rst_n, .flash_addr, .flash_data, .wr_req, .wr_addr, .wr_data, .wr_ack,
    .done, .tmr_err(terr));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    flash_data <= flash[flash_addr[5:0]];
    if (wr_req && wr_ack) begin
      got[wr_addr[5:0]] <= wr_data;
      nwrites++;
    end
  end
  always @(negedge clk) wr_ack = wr_req && ($urandom % 3 == 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin flash[i] = DW'($urandom); got[i] = '0; end
    #22 rst_n = 1;
    checks++;
    if (done) begin failures++; $display("done too early"); end
    wait (done);
    repeat (20) @(posedge clk);
    checks++;
    if (!done || nwrites != WORDS) begin failures++; $display("writes %0d done %b", nwrites, done); end
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (got[i] != flash[i]) begin failures++; $display("word %0d %h exp %h", i, got[i], flash[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
