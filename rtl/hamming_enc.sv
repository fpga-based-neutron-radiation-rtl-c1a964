// hamming_enc: Hamming single-error-correcting encoder.
//
// The code word has N = K+R bits; code[i] is Hamming position i+1. Parity
// bits sit at the power-of-two positions 1,2,4,...; the K data bits fill the
// other positions in ascending order, data[0] first. Parity bit 2^j is the
// XOR of all data positions whose index has bit j set, which makes the
// syndrome of a single flipped bit equal to its position. R must satisfy
// 2^R >= K+R+1 (K=8 -> R=4, K=12 -> R=5). Purely combinational.
//
// The use of a Hamming code for the SRAMs follows the document; the bit
// ordering is this design's choice.
module hamming_enc #(
  parameter int unsigned K = 8,
  parameter int unsigned R = 4
) (
  input  logic [K-1:0]   data,
  output logic [K+R-1:0] code
);
  localparam int unsigned N = K + R;

  always_comb begin
    int unsigned d;
    code = '0;
    d    = 0;
    // place data bits at the non-power-of-two positions
    for (int unsigned p = 1; p <= N; p++) begin
      if ((p & (p - 1)) != 0) begin
        code[p-1] = data[d];
        d++;
      end
    end
    // parity bits
    for (int unsigned j = 0; j < R; j++) begin
      for (int unsigned p = 1; p <= N; p++) begin
        if (((p >> j) & 1) == 1 && p != (1 << j))
          code[(1<<j)-1] = code[(1<<j)-1] ^ code[p-1];
      end
    end
  end
endmodule
