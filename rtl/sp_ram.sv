// sp_ram: single-port synchronous RAM, the SRAM block embedded in the FPGA.
//
// One address port shared by reads and writes. A write stores `wdata` at the
// rising edge when `we` is high; `rdata` shows the word at the address given
// in the previous cycle (one cycle read latency, read-before-write on the
// same address). The array itself is not protected: the words stored here
// are Hamming code words, and edac_scrub corrects and refreshes them.
// Latency and read-during-write behaviour are this design's choice.
module sp_ram #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 72,
  parameter int unsigned AW    = 7
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && addr < AW'(DEPTH)) mem[addr] <= wdata;
    rdata <= (addr < AW'(DEPTH)) ? mem[addr] : '0;
  end
endmodule
