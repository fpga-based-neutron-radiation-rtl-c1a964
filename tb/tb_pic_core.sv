// tb_pic_core: the processor core running the shared test program.
// Program and register-file memories are testbench models that acknowledge
// after a random delay, as the scrubbed memories do. Checks: the sequence
// of values written to PORTC, the echoed bytes written to PORTB, that the
// core ends in SLEEP, that an instruction takes 4 cycles when the memories
// answer one cycle after the request (measured on a straight-line stretch),
// that an upset in one copy of the core state is reported and changes
// no result, and that the watchdog (shortened to 256 cycles) wakes the
// core from SLEEP through a reset with STATUS.TO = STATUS.PD = 0.
module tb_pic_core;
  import pic_test_prog_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic pm_req, pm_ack = 0, dm_req, dm_we, dm_ack = 0, sleeping, terr, t0cki = 0;
  logic [10:0] pm_addr;
  logic [11:0] pm_rdata = '0;
  logic [6:0]  dm_addr;
  logic [7:0]  dm_wdata, dm_rdata = '0;
  logic [3:0]  ra_out, ra_tris;
  logic [7:0]  rb_out, rc_out, rb_tris, rc_tris;
  logic [2:0]  port_wr, port_rd;
  logic [7:0]  port_wdata;
  logic [7:0]  rx_byte = '0;
  logic        rx_valid = 0;
  logic        quick = 0;
  logic [7:0]  dmem [72];
  int checks = 0, failures = 0, nout = 0, necho = 0;
  bit seen_err = 0;
  longint t_out [2];
  logic [7:0] sent [N_ECHO];

  pic_core #(.WDT_EN(1'b1), .WDT_CYCLES(256)) dut (
    .clk, .rst_n, .run, .pm_req, .pm_addr, .pm_ack, .pm_rdata,
    .dm_req, .dm_we, .dm_addr, .dm_wdata, .dm_ack, .dm_rdata,
    .ra_in({2'b10, rx_valid, 1'b0}), .rb_in(rx_byte), .rc_in(8'h00),
    .ra_out, .rb_out, .rc_out, .ra_tris, .rb_tris, .rc_tris,
    .port_wr, .port_wdata, .port_rd, .t0cki, .sleeping, .tmr_err(terr));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // memory models: acknowledge one cycle after the request, sometimes later
  always @(posedge clk) begin
    pm_ack   <= pm_req && !pm_ack && (quick || $urandom % 3 != 0);
    pm_rdata <= prog(int'(pm_addr));
    dm_ack   <= dm_req && !dm_ack && (quick || $urandom % 3 != 0);
    dm_rdata <= dmem[dm_addr];
    if (dm_req && dm_we && dm_ack) dmem[dm_addr] <= dm_wdata;
    if (terr) seen_err = 1;
    if (port_rd[1]) rx_valid <= 0;
  end

  // port writes: the latch holds the new value after the strobe's edge
  always @(posedge clk) begin
    if (port_wr[2]) begin
      t_out[nout % 2] = $time;
      #1;
      if (nout < N_OUT) check(rc_out == exp_portc(nout),
                              $sformatf("PORTC #%0d = %h, expected %h", nout, rc_out, exp_portc(nout)));
      if (nout == N_OUT) check(rc_out == exp_portc(0), "first result after watchdog wake-up");
      if (nout == N_OUT + 1) check(rc_out == EXP_STATUS_WDT, $sformatf("STATUS after wake-up %h", rc_out));
      nout++;
    end
    if (port_wr[1]) begin
      check(port_wdata == (sent[necho] ^ 8'h20), "write data with the strobe");
      #1;
      check(rb_out == (sent[necho] ^ 8'h20), $sformatf("echo %h", rb_out));
      necho++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 72; i++) dmem[i] = '0;
    #22 rst_n = 1;
    repeat (3) @(negedge clk);
    check(pm_req == 0, "no fetch before run");
    run = 1;
    repeat (N_T0) begin
      repeat (4) @(negedge clk); t0cki = 1;
      repeat (4) @(negedge clk); t0cki = 0;
    end
    wait (nout == 1);
    quick = 1;
    wait (nout == 2);
    // MOVF STATUS,W then MOVWF PORTC: two instructions of 4 cycles each
    // (fetch from a one-cycle memory, operand read, write)
    check(t_out[1] - t_out[0] == 80, $sformatf("cycles between outputs %0d", (t_out[1] - t_out[0]) / 10));
    quick = 0;
    // upset one copy of the whole core state
    wait (nout == 8);
    @(negedge clk);
    force dut.u_state.r0 = ~dut.u_state.r0;
    #1 release dut.u_state.r0;
    wait (nout == N_OUT);
    for (int i = 0; i < N_ECHO; i++) begin
      repeat (20) @(negedge clk);
      sent[i] = 8'($urandom);
      rx_byte = sent[i]; rx_valid = 1;
      wait (!rx_valid);
    end
    wait (sleeping);
    repeat (10) @(negedge clk);
    check(necho == N_ECHO, $sformatf("echoed %0d bytes", necho));
    check(nout == N_OUT, $sformatf("%0d PORTC writes", nout));
    check(seen_err, "core TMR error reported");
    check(sleeping && !pm_req, "halted in SLEEP");
    // the watchdog (256 cycles x prescaler 128) wakes the core
    wait (!sleeping);
    wait (nout == N_OUT + 2);
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
