// tb_seu_detector: the SRAM SEU detector application on the whole
// microcontroller at its default parameters (9600 bit/s link).
//
// The FLASH holds the firmware of seu_detector_prog_pkg; a behavioural SRAM
// under test with an address counter hangs on RA3:RA2 and port C; a serial
// receiver decodes the reports on uart_txd. The testbench flips bits in the
// SRAM under test after chosen reports and checks the counts that come
// back: upsets planted when a report has arrived show up in one of the next
// two reports, and the reports after that are zero again because the
// firmware rewrote the pattern. The upsets are planted three reports apart,
// so the non-zero reports must read 3, 1, 5 in that order. Meanwhile the detector itself is hit: a
// TMR copy of the core and of the UART transmitter, a word of the program
// SRAM and a word of the register file are upset; the reports must not
// change, and the hits must be seen on the SEU indication outputs.
module tb_seu_detector;
  import pic_test_prog_pkg::*;
  import seu_detector_prog_pkg::*;
  localparam int CPB = 2083;
  localparam int N = 17;
  localparam int N_REP = 12;

  logic clk = 0, rst_n = 0;
  logic [10:0] flash_addr, pm_sram_addr;
  logic [11:0] flash_data;
  logic        pm_sram_we;
  logic [16:0] pm_sram_wdata, pm_sram_rdata;
  logic        txd, boot_done, sleeping, pm_busy, dm_busy, pm_ecc, dm_ecc;
  logic [3:2]  ra_out, ra_tris;
  logic [7:0]  rc_out, rc_tris, rc_in;
  logic [5:0]  seu_tmr;
  logic [16:0] sram [2048];
  logic [7:0]  sut [SUT_BYTES];
  int          sut_a = 0;
  logic        ra2_d = 0;

  int checks = 0, failures = 0, nrep = 0, n_tmr = 0, n_ecc = 0;
  logic [7:0] rep [N_REP];
  int         nz [$];

  rt_mcu dut (
    .clk, .rst_n, .flash_addr, .flash_data,
    .pm_sram_addr, .pm_sram_we, .pm_sram_wdata, .pm_sram_rdata,
    .uart_txd(txd), .uart_rxd(1'b1),
    .ra_in(2'b00), .ra_out, .ra_tris, .rc_in, .rc_out, .rc_tris, .t0cki(1'b0),
    .boot_done, .sleeping, .pm_scrub_busy(pm_busy), .dm_scrub_busy(dm_busy),
    .seu_tmr, .pm_ecc, .dm_ecc);

  always #25 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // external memories
  always @(posedge clk) begin
    flash_data <= fw(int'(flash_addr));
    if (pm_sram_we) sram[pm_sram_addr] <= pm_sram_wdata;
    pm_sram_rdata <= sram[pm_sram_addr];
    if (seu_tmr != '0) n_tmr++;
    if (pm_ecc || dm_ecc) n_ecc++;
  end

  // SRAM under test with its address counter
  always @(posedge clk) begin
    if (!ra_tris[3] && ra_out[3]) sut_a = 0;
    if (!ra_tris[2] && ra_out[2] && !ra2_d && rc_tris == 8'h00) sut[sut_a] = rc_out;
    if (!ra_tris[2] && !ra_out[2] && ra2_d) sut_a = (sut_a + 1) % SUT_BYTES;
    ra2_d <= ra_out[2] && !ra_tris[2];
  end
  assign rc_in = sut[sut_a];

  // report receiver
  initial begin
    logic [7:0] b;
    wait (rst_n);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1, "stop bit");
      if (nrep < N_REP) rep[nrep] = b;
      nrep++;
    end
  end

  task automatic upset_sut(input int nbytes);
    for (int i = 0; i < nbytes; i++)
      sut[(3 * i + 1) % SUT_BYTES] = sut[(3 * i + 1) % SUT_BYTES] ^ (8'h01 << i);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) sram[i] = '0;
    for (int i = 0; i < SUT_BYTES; i++) sut[i] = 8'h00;
    #110 rst_n = 1;
    wait (nrep == 2);
    upset_sut(3);
    sram['h29] = sram['h29] ^ 17'h00400;           // program word in the scan loop
    wait (nrep == 3);
    @(negedge clk);
    force dut.u_core.u_state.r2 = ~dut.u_core.u_state.r2;
    #1 release dut.u_core.u_state.r2;
    wait (nrep == 4);
    dut.u_rf_ram.mem[0] = dut.u_rf_ram.mem[0] ^ 12'h100;   // CNT register
    wait (dut.tx_busy);
    repeat (CPB * 4) @(negedge clk);
    force dut.u_tx.u_state.r1 = ~dut.u_tx.u_state.r1;
    #1 release dut.u_tx.u_state.r1;
    wait (nrep == 5);
    upset_sut(1);
    wait (nrep == 8);
    upset_sut(5);
    wait (nrep == N_REP);
    for (int i = 1; i < N_REP; i++)
      if (rep[i] != 0) nz.push_back(int'(rep[i]));
    check(nz.size() == 3, $sformatf("%0d non-zero reports, expected 3", nz.size()));
    if (nz.size() == 3) begin
      check(nz[0] == 3, $sformatf("first count %0d, expected 3", nz[0]));
      check(nz[1] == 1, $sformatf("second count %0d, expected 1", nz[1]));
      check(nz[2] == 5, $sformatf("third count %0d, expected 5", nz[2]));
    end
    check(n_tmr >= 2, $sformatf("TMR indications %0d", n_tmr));
    check(n_ecc >= 1, $sformatf("ECC corrections %0d", n_ecc));
    $display("reports: %p", rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
