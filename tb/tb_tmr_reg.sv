// tb_tmr_reg: TMR register with write-back refresh.
// Checks reset value, loading with en, holding with en low, and single
// event upsets: one copy is overwritten between clock edges (force), the
// voted output must stay correct, `err` must be high until the next edge,
// and after that edge the upset copy must be repaired although en is low.
module tb_tmr_reg;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, en = 0, err;
  logic [W-1:0] d = '0, q, exp_q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(W), .RST_VAL(8'hA5)) dut (.clk, .rst_n, .en, .d, .q, .err);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (q=%h err=%b)", msg, q, err); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] flip;
    #12;
    check(q == 8'hA5 && !err, "reset value");
    rst_n = 1;
    exp_q = 8'hA5;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = ($urandom % 2) == 1;
      d  = W'($urandom);
      if (en) exp_q = d;
      @(posedge clk); #1;
      check(q == exp_q && !err, "load/hold");
      // upset one copy while en is low
      if (i % 3 == 0) begin
        @(negedge clk);
        en   = 0;
        flip = W'($urandom) | 8'h01;
        case (i % 9)
          0: force dut.r0 = exp_q ^ flip;
          3: force dut.r1 = exp_q ^ flip;
          default: force dut.r2 = exp_q ^ flip;
        endcase
        #1;
        check(q == exp_q, "voted value survives upset");
        check(err, "error indication on upset");
        release dut.r0; release dut.r1; release dut.r2;
        @(posedge clk); #1;
        check(q == exp_q && !err, "copy repaired at next edge");
        check(dut.r0 == exp_q && dut.r1 == exp_q && dut.r2 == exp_q, "all copies equal");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
