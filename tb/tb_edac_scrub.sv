// tb_edac_scrub: EDAC controller and scrubber on a 16-word memory.
// The memory is a model in the testbench so that single event upsets can
// be planted in it. Checks: client writes store the reference Hamming code
// word; client reads return the data and flag corrected words; a sweep
// lasts 2*DEPTH cycles, corrects and rewrites exactly the upset words and
// repeats every SCRUB_PERIOD cycles; a client request made during a sweep
// is held until the sweep ends; an upset in one copy of the scrubber's TMR
// state is reported and does not disturb the sweep.
module tb_edac_scrub;
  localparam int K = 8, R = 4, N = 12, DEPTH = 16, AW = 4, PERIOD = 300;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0, ack, corr, busy, fix, terr, mem_we;
  logic [AW-1:0] addr = '0, mem_addr;
  logic [K-1:0]  wdata = '0, rdata;
  logic [N-1:0]  mem_wdata, mem_rdata;
  logic [N-1:0]  mem [DEPTH];
  logic [K-1:0]  shadow [DEPTH];
  int checks = 0, failures = 0;
  int fixes = 0, busy_cycles = 0;

  edac_scrub #(.K(K), .R(R), .DEPTH(DEPTH), .AW(AW), .SCRUB_PERIOD(PERIOD)) dut (
    .clk, .rst_n, .req, .we, .addr, .wdata, .ack, .rdata, .corr,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata, .busy, .scrub_fix(fix), .tmr_err(terr));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
    if (fix) fixes++;
    if (busy) busy_cycles++;
  end

  function automatic logic [N-1:0] ref_enc(input logic [K-1:0] d);
    logic [N-1:0] c;
    int k;
    c = '0; k = 0;
    for (int p = 1; p <= N; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8) begin c[p-1] = d[k]; k++; end
    for (int j = 0; j < R; j++)
      for (int p = 1; p <= N; p++)
        if (p[j] && p != (1 << j)) c[(1<<j)-1] ^= c[p-1];
    return c;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic access(input logic w, input logic [AW-1:0] a, input logic [K-1:0] d,
                        output logic [K-1:0] q, output logic c, output int cyc);
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d; cyc = 0;
    forever begin
      @(posedge clk);
      cyc++;
      if (ack) break;
    end
    q = rdata; c = corr;
    @(negedge clk);
    req = 0; we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] q;
    logic c;
    int cyc, t0, t1, t2;
    for (int i = 0; i < DEPTH; i++) mem[i] = ref_enc('0);
    #22 rst_n = 1;
    // writes
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = K'($urandom);
      access(1, AW'(i), shadow[i], q, c, cyc);
    end
    for (int i = 0; i < DEPTH; i++) check(mem[i] == ref_enc(shadow[i]), "stored code word");
    // clean reads
    for (int i = 0; i < DEPTH; i++) begin
      access(0, AW'(i), '0, q, c, cyc);
      check(q == shadow[i] && !c, "clean read");
      check(cyc == 2, "read takes two cycles");
    end
    // plant upsets in five words
    for (int i = 0; i < 5; i++) mem[3*i] = mem[3*i] ^ (N'(1) << ((5*i) % N));
    access(0, 4'd3, '0, q, c, cyc);
    check(q == shadow[3] && c, "corrected read flagged");
    // wait for the sweep
    wait (busy);
    t0 = $time;
    fixes = 0; busy_cycles = 0;
    wait (!busy);
    t1 = $time;
    @(posedge clk); #1;
    check(busy_cycles == 2*DEPTH, $sformatf("sweep length %0d", busy_cycles));
    check(fixes == 5, $sformatf("scrub fixes %0d", fixes));
    for (int i = 0; i < DEPTH; i++) check(mem[i] == ref_enc(shadow[i]), "memory clean after sweep");
    // next sweep: period and a client request made during it
    wait (busy);
    t2 = $time;
    check((t2 - t1) / 10 >= PERIOD && (t2 - t1) / 10 <= PERIOD + 2,
          $sformatf("sweep period %0d", (t2 - t1) / 10));
    // upset one copy of the scrubber state in mid-sweep
    @(negedge clk);
    force dut.u_state.r1 = ~dut.u_state.r1;
    #1 check(terr, "scrubber TMR error seen");
    release dut.u_state.r1;
    access(1, 4'd7, 8'h5A, q, c, cyc);
    shadow[7] = 8'h5A;
    check(!busy && cyc > 2, $sformatf("request held during sweep (%0d cycles)", cyc));
    access(0, 4'd7, '0, q, c, cyc);
    check(q == 8'h5A && !c, "write after sweep");
    for (int i = 0; i < DEPTH; i++) check(mem[i] == ref_enc(shadow[i]), "memory intact after TMR upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
