// tb_hamming_dec: Hamming(17,12) decoder, the program-memory code.
// For random data words a reference code word is built in the testbench
// (parity bit 2^j = XOR of the positions with bit j set). The decoder must
// return the data with no error flag for the clean word, and for every
// single flipped bit (all 17 positions) the original data, the original
// code word on code_fixed and err = 1.
module tb_hamming_dec;
  localparam int K = 12, R = 5, N = 17;
  logic [N-1:0] code, fixed;
  logic [K-1:0] data;
  logic         err;
  int checks = 0, failures = 0;

  hamming_dec #(.K(K), .R(R)) dut (.code, .data, .code_fixed(fixed), .err);

  function automatic logic [N-1:0] ref_enc(input logic [K-1:0] d);
    logic [N-1:0] c;
    int k;
    c = '0; k = 0;
    for (int p = 1; p <= N; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin c[p-1] = d[k]; k++; end
    for (int j = 0; j < R; j++)
      for (int p = 1; p <= N; p++)
        if (p[j] && p != (1 << j)) c[(1<<j)-1] ^= c[p-1];
    return c;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s code=%h data=%h err=%b", msg, code, data, err); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] d;
    logic [N-1:0] c;
    for (int t = 0; t < 300; t++) begin
      d = K'($urandom);
      c = ref_enc(d);
      code = c; #1;
      check(data == d && !err && fixed == c, "clean word");
      for (int b = 0; b < N; b++) begin
        code = c ^ (N'(1) << b); #1;
        check(data == d && err && fixed == c, "single error corrected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
