// tb_rt_mcu: end-to-end run of the microcontroller at its default sizes
// (20 MHz clock assumed, 9600 bit/s UART, 65536-cycle scrub period).
//
// Testbench models: the external FLASH holds the test program of
// pic_test_prog_pkg, the external program SRAM is a 2048 x 17-bit array
// with one-cycle read, a serial sender drives uart_rxd and a serial
// receiver decodes uart_txd.
// Sequence: boot copy (checked word by word against a reference Hamming
// encoder), the ALU/control test program (PORTC values), upsets planted in
// the program SRAM, the register-file RAM, the core's TMR state and the
// UART transmitter's TMR state, then three bytes echoed over the serial
// link, then SLEEP, from which the watchdog wakes the core after its
// default period (128 x 360000 cycles, about 46 million cycles; the run
// takes under a minute). Each mechanism is counted and must have happened:
// boot copy, program and register-file scrub sweeps, a core stall behind a
// sweep, ECC corrections in both memories (by a read and by the
// scrubber), TMR error indications, UART frames both ways, the watchdog
// wake-up.
module tb_rt_mcu;
  import pic_test_prog_pkg::*;
  localparam int CPB = 2083;     // rt_mcu default: 20 MHz / 9600 bit/s
  localparam int N = 17;

  logic clk = 0, rst_n = 0, rxd = 1, t0cki = 0;
  logic [10:0] flash_addr, pm_sram_addr;
  logic [11:0] flash_data;
  logic        pm_sram_we;
  logic [16:0] pm_sram_wdata, pm_sram_rdata;
  logic        txd, boot_done, sleeping, pm_busy, dm_busy, pm_ecc, dm_ecc;
  logic [3:2]  ra_out, ra_tris;
  logic [7:0]  rc_out, rc_tris;
  logic [5:0]  seu_tmr;
  logic [16:0] sram [2048];

  int checks = 0, failures = 0, nout = 0;
  int n_pm_sweep = 0, n_dm_sweep = 0, n_stall = 0, n_pm_ecc = 0, n_dm_ecc = 0;
  int n_tmr = 0, n_rx_frames = 0, n_wdt = 0;
  longint t_sleep;
  logic [7:0] sent [N_ECHO], got [N_ECHO];
  logic pm_busy_d = 0, dm_busy_d = 0;

  rt_mcu dut (
    .clk, .rst_n, .flash_addr, .flash_data,
    .pm_sram_addr, .pm_sram_we, .pm_sram_wdata, .pm_sram_rdata,
    .uart_txd(txd), .uart_rxd(rxd),
    .ra_in(2'b10), .ra_out, .ra_tris, .rc_in(8'h00), .rc_out, .rc_tris, .t0cki,
    .boot_done, .sleeping, .pm_scrub_busy(pm_busy), .dm_scrub_busy(dm_busy),
    .seu_tmr, .pm_ecc, .dm_ecc);

  always #25 clk = ~clk;          // 20 MHz

  function automatic logic [N-1:0] ref_enc(input logic [11:0] d);
    logic [N-1:0] c;
    int k;
    c = '0; k = 0;
    for (int p = 1; p <= N; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin c[p-1] = d[k]; k++; end
    for (int j = 0; j < 5; j++)
      for (int p = 1; p <= N; p++)
        if (p[j] && p != (1 << j)) c[(1<<j)-1] ^= c[p-1];
    return c;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // external memories
  always @(posedge clk) begin
    flash_data <= prog(int'(flash_addr));
    if (pm_sram_we) sram[pm_sram_addr] <= pm_sram_wdata;
    pm_sram_rdata <= sram[pm_sram_addr];
  end

  // event counters
  always @(posedge clk) begin
    pm_busy_d <= pm_busy;
    dm_busy_d <= dm_busy;
    if (pm_busy && !pm_busy_d) n_pm_sweep++;
    if (dm_busy && !dm_busy_d) n_dm_sweep++;
    if ((dut.c_pm_req && pm_busy) || (dut.dm_req && dm_busy)) n_stall++;
    if (pm_ecc) n_pm_ecc++;
    if (dm_ecc) n_dm_ecc++;
    if (seu_tmr != '0) n_tmr++;
  end

  // PORTC results
  always @(posedge clk) begin
    if (dut.port_wr[2]) begin
      #1;
      if (nout < N_OUT) check(rc_out == exp_portc(nout),
                              $sformatf("PORTC #%0d = %h, expected %h", nout, rc_out, exp_portc(nout)));
      if (nout == N_OUT) check(rc_out == exp_portc(0), "first result after watchdog wake-up");
      if (nout == N_OUT + 1) check(rc_out == EXP_STATUS_WDT, $sformatf("STATUS after wake-up %h", rc_out));
      nout++;
    end
  end

  // serial receiver on txd
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
      if (n_rx_frames < N_ECHO) got[n_rx_frames] = b;
      n_rx_frames++;
    end
  end

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  initial begin
    repeat (48000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ok;
    for (int i = 0; i < 2048; i++) sram[i] = '0;
    #110 rst_n = 1;
    repeat (N_T0) begin
      repeat (4) @(negedge clk); t0cki = 1;
      repeat (4) @(negedge clk); t0cki = 0;
    end
    wait (boot_done);
    @(negedge clk);
    ok = 1;
    for (int i = 0; i < 2048; i++) if (sram[i] != ref_enc(prog(i))) ok = 0;
    check(ok == 1, "program SRAM holds the coded FLASH image");
    // plant upsets in the program SRAM: one word still to be fetched, one
    // never fetched (left to the scrubber)
    sram['h212] = sram['h212] ^ 17'h00100;
    sram['h500] = sram['h500] ^ 17'h04000;
    // register file: upset the word holding 0x40 (GPR 0x08) before SUBWF reads it
    wait (nout == 1);
    @(negedge clk);
    dut.u_rf_ram.mem[0] = dut.u_rf_ram.mem[0] ^ 12'h020;
    dut.u_rf_ram.mem[40] = dut.u_rf_ram.mem[40] ^ 12'h001;
    // core TMR upset
    wait (nout == 6);
    @(negedge clk);
    force dut.u_core.u_state.r1 = ~dut.u_core.u_state.r1;
    #1 release dut.u_core.u_state.r1;
    wait (nout == N_OUT);
    for (int i = 0; i < N_ECHO; i++) begin
      sent[i] = 8'($urandom);
      send_byte(sent[i]);
      repeat (CPB) @(posedge clk);
    end
    // upset the transmitter while it sends the last echo
    wait (dut.tx_busy);
    repeat (3 * CPB) @(negedge clk);
    force dut.u_tx.u_state.r0 = ~dut.u_tx.u_state.r0;
    #1 release dut.u_tx.u_state.r0;
    wait (sleeping);
    wait (n_rx_frames >= N_ECHO);
    repeat (100) @(negedge clk);
    for (int i = 0; i < N_ECHO; i++)
      check(got[i] == (sent[i] ^ 8'h20), $sformatf("echo %0d: got %h sent %h", i, got[i], sent[i]));
    check(nout == N_OUT, $sformatf("%0d PORTC results", nout));
    check(sram['h500] == ref_enc(prog('h500)), "scrubber repaired program SRAM");
    // every mechanism happened
    check(n_pm_sweep >= 1, $sformatf("program memory sweeps %0d", n_pm_sweep));
    check(n_dm_sweep >= 1, $sformatf("register file sweeps %0d", n_dm_sweep));
    check(n_stall >= 1, $sformatf("core stall cycles behind a sweep %0d", n_stall));
    check(n_pm_ecc >= 2, $sformatf("program memory ECC events %0d", n_pm_ecc));
    check(n_dm_ecc >= 2, $sformatf("register file ECC events %0d", n_dm_ecc));
    check(n_tmr >= 2, $sformatf("TMR error indications %0d", n_tmr));
    check(n_rx_frames == N_ECHO, $sformatf("frames sent %0d", n_rx_frames));
    check(sleeping, "core asleep after the echo");
    // the watchdog, at its default 18 ms x 128, wakes the core from SLEEP
    t_sleep = $time;
    wait (!sleeping);
    n_wdt++;
    wait (nout == N_OUT + 2);
    check(n_wdt == 1, "watchdog wake-up");
    check(($time - t_sleep) / 50 <= 128 * 360000 + 10, "wake-up within 128 watchdog periods");
    $display("events: pm sweeps %0d, rf sweeps %0d, stall cycles %0d, pm ecc %0d, rf ecc %0d, tmr %0d, frames %0d, wdt %0d",
             n_pm_sweep, n_dm_sweep, n_stall, n_pm_ecc, n_dm_ecc, n_tmr, n_rx_frames, n_wdt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
