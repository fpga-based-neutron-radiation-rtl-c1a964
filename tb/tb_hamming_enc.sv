// tb_hamming_enc: exhaustive check of the Hamming(12,8) encoder.
// The expected code word is built from the textbook parity equations of
// the (12,8) code, written out position by position independently of the
// encoder's loops (p1 = d0^d1^d3^d4^d6, p2 = d0^d2^d3^d5^d6,
// p4 = d1^d2^d3^d7, p8 = d4^d5^d6^d7; data at positions 3,5,6,7,9..12).
module tb_hamming_enc;
  logic [7:0]  data;
  logic [11:0] code, exp_code;
  int checks = 0, failures = 0;

  hamming_enc #(.K(8), .R(4)) dut (.data, .code);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      data = 8'(i);
      #1;
      exp_code[0]  = data[0] ^ data[1] ^ data[3] ^ data[4] ^ data[6];
      exp_code[1]  = data[0] ^ data[2] ^ data[3] ^ data[5] ^ data[6];
      exp_code[2]  = data[0];
      exp_code[3]  = data[1] ^ data[2] ^ data[3] ^ data[7];
      exp_code[4]  = data[1];
      exp_code[5]  = data[2];
      exp_code[6]  = data[3];
      exp_code[7]  = data[4] ^ data[5] ^ data[6] ^ data[7];
      exp_code[8]  = data[4];
      exp_code[9]  = data[5];
      exp_code[10] = data[6];
      exp_code[11] = data[7];
      checks++;
      if (code !== exp_code) begin
        failures++;
        $display("data=%h code=%h exp=%h", data, code, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
