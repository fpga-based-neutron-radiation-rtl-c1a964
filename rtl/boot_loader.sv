// boot_loader: copies the program from the external FLASH into the
// Hamming-protected program SRAM after reset.
//
// It reads FLASH word 0..WORDS-1 (flash_data is sampled one cycle after
// flash_addr is set) and writes each word through the program memory's
// EDAC controller (wr_req held until wr_ack, so a scrub sweep simply delays
// the copy). When the last word is written `done` goes high and stays high
// until reset; the processor core is held until then. State is one TMR
// register.
// The FLASH and SRAM program memories are named in the document; copying
// one into the other at reset is this design's reading of how they work
// together.
module boot_loader #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = 11,
  parameter int unsigned DW    = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] flash_addr,
  input  logic [DW-1:0] flash_data,
  output logic          wr_req,
  output logic [AW-1:0] wr_addr,
  output logic [DW-1:0] wr_data,
  input  logic          wr_ack,
  output logic          done,
  output logic          tmr_err
);
  typedef enum logic [1:0] {B_READ, B_LATCH, B_WRITE, B_DONE} boot_e;

  typedef struct packed {
    boot_e         st;
    logic [AW:0]   a;
    logic [DW-1:0] word;
  } boot_t;

  localparam boot_t B_RST = '{st: B_READ, a: '0, word: '0};

  boot_t s, ns;

  tmr_reg #(.W($bits(boot_t)), .RST_VAL(B_RST)) u_state (
    .clk, .rst_n, .en(1'b1), .d(ns), .q(s), .err(tmr_err)
  );

  always_comb begin
    ns     = s;
    wr_req = 1'b0;
    unique case (s.st)
      B_READ:  ns.st = B_LATCH;              // address out, data next cycle
      B_LATCH: begin
        ns.word = flash_data;
        ns.st   = B_WRITE;
      end
      B_WRITE: begin
        wr_req = 1'b1;
        if (wr_ack) begin
          ns.a  = s.a + 1'b1;
          ns.st = (s.a == (AW+1)'(WORDS - 1)) ? B_DONE : B_READ;
        end
      end
      default: ns.st = B_DONE;
    endcase
  end

  assign flash_addr = s.a[AW-1:0];
  assign wr_addr    = s.a[AW-1:0];
  assign wr_data    = s.word;
  assign done       = (s.st == B_DONE);
endmodule
