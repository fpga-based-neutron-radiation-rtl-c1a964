// tmr_voter: bitwise 2-of-3 majority voter for triple modular redundancy.
//
// Each output bit is the value held by at least two of the three copies,
// written as the sum of products (a&b)|(a&c)|(b&c). The voter has no state,
// so an upset cannot be stored in it. `mismatch` is high while any bit of
// any copy differs from the others; it is the single-error indication of a
// TMR register. Purely combinational, no clock.
//
// The voting rule and the error output follow the TMR flip-flop described
// for the microcontroller; the exact gate form is this design's choice.
module tmr_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = |((a ^ b) | (a ^ c));
  end
endmodule
