// edac_scrub: Hamming EDAC controller and memory scrubber for one
// single-port SRAM.
//
// Client side: the client raises `req` with `we`, `addr`, `wdata` and holds
// them until `ack`. A write is encoded (hamming_enc) and stored in the cycle
// of the request, `ack` is high in that same cycle. A read puts the address
// on the memory, and one cycle later the code word is decoded (hamming_dec):
// `ack` is high with the corrected `rdata`, and `corr` tells that a bit was
// corrected. Client reads do not write back.
//
// Scrubbing: a TMR-protected timer counts SCRUB_PERIOD cycles. When it runs
// out, the controller sweeps the whole memory, word by word: read the word
// (one cycle), decode it and, if the syndrome is non-zero, write the
// corrected code word back (second cycle). A sweep takes 2*DEPTH cycles.
// During the sweep `busy` is high and client requests are not acknowledged,
// so the client is halted. Each corrected word gives a `scrub_fix` pulse.
//
// Memory side: mem_addr/mem_we/mem_wdata, mem_rdata valid one cycle after
// the address (synchronous RAM or registered external SRAM).
//
// The sweep-and-correct scheme, halting the system during a sweep and
// TMR protection of the scrubber FSM follow the document. The period,
// write-back only on error and the two-cycle per word timing are this
// design's choice.
module edac_scrub #(
  parameter int unsigned K            = 8,
  parameter int unsigned R            = 4,
  parameter int unsigned DEPTH        = 72,
  parameter int unsigned AW           = 7,
  parameter int unsigned SCRUB_PERIOD = 65536
) (
  input  logic            clk,
  input  logic            rst_n,
  // client port
  input  logic            req,
  input  logic            we,
  input  logic [AW-1:0]   addr,
  input  logic [K-1:0]    wdata,
  output logic            ack,
  output logic [K-1:0]    rdata,
  output logic            corr,
  // memory port
  output logic [AW-1:0]   mem_addr,
  output logic            mem_we,
  output logic [K+R-1:0]  mem_wdata,
  input  logic [K+R-1:0]  mem_rdata,
  // status
  output logic            busy,
  output logic            scrub_fix,
  output logic            tmr_err
);
  localparam int unsigned N  = K + R;
  localparam int unsigned TW = $clog2(SCRUB_PERIOD + 1);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_SCR_RD, S_SCR_WB} state_e;

  typedef struct packed {
    state_e        st;
    logic [AW-1:0] sa;     // scrub address
    logic [TW-1:0] timer;  // cycles until the next sweep
  } ctl_t;

  localparam ctl_t CTL_RST = '{st: S_IDLE, sa: '0, timer: TW'(SCRUB_PERIOD)};

  ctl_t s, ns;

  tmr_reg #(.W($bits(ctl_t)), .RST_VAL(CTL_RST)) u_state (
    .clk, .rst_n, .en(1'b1), .d(ns), .q(s), .err(tmr_err)
  );

  logic [N-1:0] enc_code, dec_fixed;
  logic [K-1:0] dec_data;
  logic         dec_err;

  hamming_enc #(.K(K), .R(R)) u_enc (.data(wdata), .code(enc_code));
  hamming_dec #(.K(K), .R(R)) u_dec (.code(mem_rdata), .data(dec_data),
                                     .code_fixed(dec_fixed), .err(dec_err));

  always_comb begin
    ns        = s;
    ack       = 1'b0;
    rdata     = dec_data;
    corr      = 1'b0;
    mem_addr  = addr;
    mem_we    = 1'b0;
    mem_wdata = enc_code;
    busy      = 1'b0;
    scrub_fix = 1'b0;
    if (s.st == S_IDLE || s.st == S_RD)
      ns.timer = (s.timer != '0) ? s.timer - 1'b1 : '0;

    unique case (s.st)
      S_IDLE: begin
        if (s.timer == '0) begin
          busy     = 1'b1;
          mem_addr = '0;
          ns.sa    = '0;
          ns.st    = S_SCR_WB;
        end else if (req && we) begin
          mem_we = 1'b1;
          ack    = 1'b1;
        end else if (req) begin
          ns.st = S_RD;
        end
      end
      S_RD: begin
        ack   = 1'b1;
        corr  = dec_err;
        ns.st = S_IDLE;
      end
      S_SCR_RD: begin
        busy     = 1'b1;
        mem_addr = s.sa;
        ns.st    = S_SCR_WB;
      end
      S_SCR_WB: begin
        busy      = 1'b1;
        mem_addr  = s.sa;
        mem_wdata = dec_fixed;
        if (dec_err) begin
          mem_we    = 1'b1;
          scrub_fix = 1'b1;
        end
        if (s.sa == AW'(DEPTH - 1)) begin
          ns.st    = S_IDLE;
          ns.timer = TW'(SCRUB_PERIOD);
        end else begin
          ns.sa = s.sa + 1'b1;
          ns.st = S_SCR_RD;
        end
      end
      default: ns.st = S_IDLE;
    endcase
  end
endmodule
