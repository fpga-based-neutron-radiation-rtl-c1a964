// tb_tmr_voter: exhaustive check of the 2-of-3 majority voter at W=3.
// Every combination of the three copies (512) is applied; the expected
// output is formed bit by bit by counting ones, and `mismatch` must be high
// exactly when the copies are not all equal.
module tb_tmr_voter;
  localparam int W = 3;
  logic [W-1:0] a, b, c, y;
  logic         mm;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a, .b, .c, .y, .mismatch(mm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_y;
    for (int i = 0; i < 512; i++) begin
      {a, b, c} = 9'(i);
      #1;
      for (int j = 0; j < W; j++)
        exp_y[j] = (int'(a[j]) + int'(b[j]) + int'(c[j])) >= 2;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("voter a=%b b=%b c=%b y=%b exp=%b", a, b, c, y, exp_y);
      end
      checks++;
      if (mm !== !(a == b && b == c)) begin
        failures++;
        $display("mismatch a=%b b=%b c=%b mm=%b", a, b, c, mm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
