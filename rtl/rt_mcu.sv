// rt_mcu: radiation tolerant microcontroller for an SRAM single-event-upset
// (SEU) detector.
//
// A PIC16C57-compatible core (pic_core) in which every flip-flop is tripled
// and voted, so upsets in the logic are out-voted and repaired at the next
// clock edge. Its two memories are SRAM, which TMR would make three times
// larger, so they hold Hamming code words instead and are swept by a
// scrubber (edac_scrub) that rewrites corrected words:
//   * program memory: 2048 x 12-bit instructions stored as 17-bit code words
//     in an external SRAM (pins pm_sram_*). After reset boot_loader copies
//     the program from the external FLASH (pins flash_*) into it and only
//     then lets the core run;
//   * register file: the 72 general purpose bytes stored as 12-bit code
//     words in a RAM inside the FPGA (sp_ram).
// While a memory is being swept the core's access to it waits, i.e. the
// processor halts for 2*DEPTH cycles every SCRUB_PERIOD cycles.
//
// A UART (uart_tx, uart_rx) carries the measurement results to the PC over
// the RS-485 or optical link. It sits on port B of the core: writing PORTB
// sends a byte, reading PORTB returns the last received byte and clears its
// valid flag; RA0 reads the transmitter's busy flag and RA1 the receiver's
// byte-valid flag. Pins RA3:RA2 and RC7:RC0 are free I/O for the memory
// under test (ra_*, rc_*; *_tris high = pin is an input).
//
// SEU indication: seu_tmr[i] is high while a copy of a TMR register
// disagrees (0 core, 1 program-memory scrubber, 2 register-file scrubber,
// 3 UART transmitter, 4 UART receiver, 5 boot loader); pm_ecc / dm_ecc pulse
// when a Hamming-coded word was found with an error (core read or scrub).
//
// The partition (TMR logic, Hamming-coded scrubbed SRAMs, FLASH, UART) is the
// document's; the port mapping of the UART, the boot copy, the clock of
// 20 MHz implied by CLKS_PER_BIT and SCRUB_PERIOD are this design's choices.
module rt_mcu #(
  parameter int unsigned CLKS_PER_BIT    = 2083,
  parameter int unsigned PM_SCRUB_PERIOD = 65536,
  parameter int unsigned DM_SCRUB_PERIOD = 65536,
  parameter bit          WDT_EN          = 1'b1,
  parameter int unsigned WDT_CYCLES      = 360000
) (
  input  logic        clk,
  input  logic        rst_n,
  // external program FLASH (data one cycle after address)
  output logic [10:0] flash_addr,
  input  logic [11:0] flash_data,
  // external program SRAM holding 17-bit Hamming code words
  output logic [10:0] pm_sram_addr,
  output logic        pm_sram_we,
  output logic [16:0] pm_sram_wdata,
  input  logic [16:0] pm_sram_rdata,
  // serial link
  output logic        uart_txd,
  input  logic        uart_rxd,
  // general I/O
  input  logic [3:2]  ra_in,
  output logic [3:2]  ra_out,
  output logic [3:2]  ra_tris,
  input  logic [7:0]  rc_in,
  output logic [7:0]  rc_out,
  output logic [7:0]  rc_tris,
  input  logic        t0cki,
  // status
  output logic        boot_done,
  output logic        sleeping,
  output logic        pm_scrub_busy,
  output logic        dm_scrub_busy,
  output logic [5:0]  seu_tmr,
  output logic        pm_ecc,
  output logic        dm_ecc
);
  // ---------------- boot copy FLASH -> program SRAM ----------------
  logic        bl_req, bl_ack;
  logic [10:0] bl_addr;
  logic [11:0] bl_data;

  boot_loader #(.WORDS(2048), .AW(11), .DW(12)) u_boot (
    .clk, .rst_n, .flash_addr, .flash_data,
    .wr_req(bl_req), .wr_addr(bl_addr), .wr_data(bl_data), .wr_ack(bl_ack),
    .done(boot_done), .tmr_err(seu_tmr[5])
  );

  // ---------------- program memory EDAC + scrubber ----------------
  logic        pm_req, pm_ack, c_pm_req, c_pm_ack, pm_corr, pm_fix;
  logic [10:0] pm_addr, c_pm_addr;
  logic [11:0] pm_rdata;

  always_comb begin
    pm_req   = boot_done ? c_pm_req  : bl_req;
    pm_addr  = boot_done ? c_pm_addr : bl_addr;
    bl_ack   = !boot_done && pm_ack;
    c_pm_ack =  boot_done && pm_ack;
  end

  edac_scrub #(.K(12), .R(5), .DEPTH(2048), .AW(11),
               .SCRUB_PERIOD(PM_SCRUB_PERIOD)) u_pm_edac (
    .clk, .rst_n,
    .req(pm_req), .we(!boot_done), .addr(pm_addr), .wdata(bl_data),
    .ack(pm_ack), .rdata(pm_rdata), .corr(pm_corr),
    .mem_addr(pm_sram_addr), .mem_we(pm_sram_we), .mem_wdata(pm_sram_wdata),
    .mem_rdata(pm_sram_rdata),
    .busy(pm_scrub_busy), .scrub_fix(pm_fix), .tmr_err(seu_tmr[1])
  );

  // ---------------- register file: embedded RAM, EDAC + scrubber ----------------
  logic        dm_req, dm_we, dm_ack, dm_corr, dm_fix, rf_we;
  logic [6:0]  dm_addr, rf_addr;
  logic [7:0]  dm_wdata, dm_rdata;
  logic [11:0] rf_wdata, rf_rdata;

  edac_scrub #(.K(8), .R(4), .DEPTH(72), .AW(7),
               .SCRUB_PERIOD(DM_SCRUB_PERIOD)) u_dm_edac (
    .clk, .rst_n,
    .req(dm_req), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata),
    .ack(dm_ack), .rdata(dm_rdata), .corr(dm_corr),
    .mem_addr(rf_addr), .mem_we(rf_we), .mem_wdata(rf_wdata), .mem_rdata(rf_rdata),
    .busy(dm_scrub_busy), .scrub_fix(dm_fix), .tmr_err(seu_tmr[2])
  );

  sp_ram #(.W(12), .DEPTH(72), .AW(7)) u_rf_ram (
    .clk, .addr(rf_addr), .we(rf_we), .wdata(rf_wdata), .rdata(rf_rdata)
  );

  assign pm_ecc = pm_corr | pm_fix;
  assign dm_ecc = dm_corr | dm_fix;

  // ---------------- core ----------------
  logic [3:0] core_ra_in, core_ra_out, core_ra_tris;
  logic [7:0] core_rb_in, core_rb_out, core_rb_tris;
  logic [2:0] port_wr, port_rd;
  logic [7:0] port_wdata;
  logic       tx_busy, rx_valid;
  logic [7:0] rx_data;

  assign core_ra_in = {ra_in, rx_valid, tx_busy};
  assign core_rb_in = rx_data;

  pic_core #(.WDT_EN(WDT_EN), .WDT_CYCLES(WDT_CYCLES)) u_core (
    .clk, .rst_n, .run(boot_done),
    .pm_req(c_pm_req), .pm_addr(c_pm_addr), .pm_ack(c_pm_ack), .pm_rdata,
    .dm_req, .dm_we, .dm_addr, .dm_wdata, .dm_ack, .dm_rdata,
    .ra_in(core_ra_in), .rb_in(core_rb_in), .rc_in,
    .ra_out(core_ra_out), .rb_out(core_rb_out), .rc_out,
    .ra_tris(core_ra_tris), .rb_tris(core_rb_tris), .rc_tris,
    .port_wr, .port_wdata, .port_rd, .t0cki, .sleeping, .tmr_err(seu_tmr[0])
  );

  assign ra_out  = core_ra_out[3:2];
  assign ra_tris = core_ra_tris[3:2];

  // ---------------- UART on port B ----------------
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(port_wr[1]), .data(port_wdata),
    .busy(tx_busy), .txd(uart_txd), .tmr_err(seu_tmr[3])
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .ack(port_rd[1]),
    .data(rx_data), .valid(rx_valid), .tmr_err(seu_tmr[4])
  );
endmodule
