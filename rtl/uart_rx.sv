// uart_rx: UART receiver, 8 data bits, no parity, 1 stop bit, LSB first.
//
// `rxd` passes two synchronising flip-flops. A falling edge starts a frame;
// the start bit is checked half a bit later, then each data bit and the
// stop bit are sampled in the middle of the bit, every CLKS_PER_BIT cycles.
// A frame with a valid stop bit is stored in the holding register and
// `valid` is raised until `ack`; a frame with a bad stop bit is dropped and
// a new byte overwrites an unread one. All flip-flops, the synchronisers
// included, are one TMR register; `tmr_err` shows a mismatching copy.
// The full-duplex link is the document's; the receiver design is this
// design's own.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 2083
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  input  logic       ack,
  output logic [7:0] data,
  output logic       valid,
  output logic       tmr_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  typedef struct packed {
    logic [1:0]    sync;
    rx_state_e     st;
    logic [7:0]    shreg;
    logic [2:0]    nbit;
    logic [CW-1:0] cnt;
    logic [7:0]    hold;
    logic          valid;
  } rx_t;

  localparam rx_t RX_RST = '{sync: 2'b11, st: R_IDLE, shreg: '0, nbit: '0,
                             cnt: '0, hold: '0, valid: 1'b0};

  rx_t s, ns;

  tmr_reg #(.W($bits(rx_t)), .RST_VAL(RX_RST)) u_state (
    .clk, .rst_n, .en(1'b1), .d(ns), .q(s), .err(tmr_err)
  );

  logic bit_in;
  assign bit_in = s.sync[1];

  always_comb begin
    ns      = s;
    ns.sync = {s.sync[0], rxd};
    if (ack) ns.valid = 1'b0;
    unique case (s.st)
      R_IDLE: if (!bit_in) begin
        ns.st  = R_START;
        ns.cnt = CW'(CLKS_PER_BIT / 2 - 1);
      end
      R_START: begin
        if (s.cnt != '0) ns.cnt = s.cnt - 1'b1;
        else if (bit_in) ns.st = R_IDLE;       // glitch, not a start bit
        else begin
          ns.st   = R_DATA;
          ns.nbit = 3'd0;
          ns.cnt  = CW'(CLKS_PER_BIT - 1);
        end
      end
      R_DATA: begin
        if (s.cnt != '0) ns.cnt = s.cnt - 1'b1;
        else begin
          ns.shreg = {bit_in, s.shreg[7:1]};
          ns.cnt   = CW'(CLKS_PER_BIT - 1);
          ns.nbit  = s.nbit + 1'b1;
          if (s.nbit == 3'd7) ns.st = R_STOP;
        end
      end
      R_STOP: begin
        if (s.cnt != '0) ns.cnt = s.cnt - 1'b1;
        else begin
          ns.st = R_IDLE;
          if (bit_in) begin
            ns.hold  = s.shreg;
            ns.valid = 1'b1;
          end
        end
      end
      default: ns.st = R_IDLE;
    endcase
  end

  assign data  = s.hold;
  assign valid = s.valid;
endmodule
