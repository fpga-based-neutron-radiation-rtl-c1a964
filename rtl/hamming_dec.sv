// hamming_dec: Hamming single-error-correcting decoder.
//
// Recomputes the syndrome of an N = K+R bit code word laid out as in
// hamming_enc (code[i] is position i+1, parity at powers of two). A zero
// syndrome means no error. A non-zero syndrome names the position of a
// single flipped bit, which is inverted; `code_fixed` is the repaired code
// word (used by the scrubber for write-back) and `data` the repaired data.
// A syndrome beyond N cannot come from a single error: `err` is raised and
// nothing is flipped. Double errors are not detected (plain Hamming code).
// Purely combinational.
module hamming_dec #(
  parameter int unsigned K = 8,
  parameter int unsigned R = 4
) (
  input  logic [K+R-1:0] code,
  output logic [K-1:0]   data,
  output logic [K+R-1:0] code_fixed,
  output logic           err
);
  localparam int unsigned N = K + R;

  logic [R-1:0] syn;

  always_comb begin
    int unsigned d;
    syn = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (code[p-1]) syn = syn ^ R'(p);
    end
    err        = (syn != '0);
    code_fixed = code;
    for (int unsigned p = 1; p <= N; p++) begin
      if (R'(p) == syn) code_fixed[p-1] = ~code[p-1];
    end
    data = '0;
    d    = 0;
    for (int unsigned p = 1; p <= N; p++) begin
      if ((p & (p - 1)) != 0) begin
        data[d] = code_fixed[p-1];
        d++;
      end
    end
  end
endmodule
