// uart_tx: UART transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
//
// A `start` pulse while `busy` is low loads `data` into a 10-bit frame
// (start bit 0, data, stop bit 1) that is shifted out on `txd` one bit every
// CLKS_PER_BIT clock cycles; a frame takes 10*CLKS_PER_BIT cycles, during
// which `busy` is high. `start` while busy is ignored. The line idles high.
// All state (frame, bit counter, baud counter) is one TMR register, so an
// upset in the transmitter is corrected at the next clock edge and shows
// on `tmr_err`.
// The document gives the 9600 bit/s link rate; frame format, the 20 MHz
// clock behind the default CLKS_PER_BIT = 2083 and the interface are this
// design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 2083
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd,
  output logic       tmr_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef struct packed {
    logic          busy;
    logic [9:0]    frame;
    logic [3:0]    nbit;   // bits left to send
    logic [CW-1:0] cnt;    // clocks left in the current bit
  } tx_t;

  localparam tx_t TX_RST = '{busy: 1'b0, frame: 10'h3FF, nbit: 4'd0, cnt: '0};

  tx_t s, ns;

  tmr_reg #(.W($bits(tx_t)), .RST_VAL(TX_RST)) u_state (
    .clk, .rst_n, .en(1'b1), .d(ns), .q(s), .err(tmr_err)
  );

  always_comb begin
    ns = s;
    if (!s.busy) begin
      if (start) begin
        ns.busy  = 1'b1;
        ns.frame = {1'b1, data, 1'b0};
        ns.nbit  = 4'd10;
        ns.cnt   = CW'(CLKS_PER_BIT - 1);
      end
    end else if (s.cnt != '0) begin
      ns.cnt = s.cnt - 1'b1;
    end else begin
      ns.frame = {1'b1, s.frame[9:1]};
      ns.nbit  = s.nbit - 1'b1;
      ns.cnt   = CW'(CLKS_PER_BIT - 1);
      if (s.nbit == 4'd1) ns.busy = 1'b0;
    end
  end

  assign busy = s.busy;
  assign txd  = s.busy ? s.frame[0] : 1'b1;
endmodule
