// tb_sp_ram: single-port RAM. Random writes and reads against a reference
// array; read data must appear one clock after the address.
module tb_sp_ram;
  localparam int W = 12, DEPTH = 72, AW = 7;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  refm [DEPTH];
  int checks = 0, failures = 0;

  sp_ram #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = AW'(i); we = 1; wdata = W'($urandom); refm[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [AW-1:0] a;
      logic          w;
      a = AW'($urandom % DEPTH);
      w = ($urandom % 3) == 0;
      @(negedge clk);
      addr = a; we = w; wdata = W'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== refm[a]) begin
        failures++;
        $display("addr=%0d rdata=%h exp=%h", a, rdata, refm[a]);
      end
      if (w) refm[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
