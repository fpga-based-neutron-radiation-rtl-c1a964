// tmr_reg: W-bit register built from TMR D flip-flops.
//
// Every bit is stored in three flip-flops whose outputs go through a 2-of-3
// majority voter (tmr_voter). The clock is never gated: when `en` is low the
// voted output is written back into all three copies on every rising edge,
// so a single upset copy is repaired at the next edge and errors cannot pile
// up. `err` is high while one copy differs from the others, i.e. from the
// moment of an upset until the next clock edge; it is combinational.
//
// Interface: clk, asynchronous active-low rst_n (all copies load RST_VAL),
// en/d to load a new value, q the voted value.
// The tripled flip-flop, write-back refresh and error output follow the
// document; the asynchronous reset is this design's choice.
module tmr_reg #(
  parameter int unsigned     W       = 1,
  parameter logic [W-1:0]    RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         err
);
  // The three copies have the same D input, so a synthesis tool would merge
  // them into one flip-flop unless told not to: keep / syn_preserve ask for
  // them to be preserved (vendor flows may need their own attribute).
  (* keep = 1, syn_preserve = 1 *) logic [W-1:0] r0;
  (* keep = 1, syn_preserve = 1 *) logic [W-1:0] r1;
  (* keep = 1, syn_preserve = 1 *) logic [W-1:0] r2;
  logic [W-1:0] nxt;

  tmr_voter #(.W(W)) u_vote (.a(r0), .b(r1), .c(r2), .y(q), .mismatch(err));

  assign nxt = en ? d : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= RST_VAL;
      r1 <= RST_VAL;
      r2 <= RST_VAL;
    end else begin
      r0 <= nxt;
      r1 <= nxt;
      r2 <= nxt;
    end
  end
endmodule
