// pic_core: PIC16C57-compatible 8-bit processor core with every flip-flop
// tripled (TMR).
//
// Programmer's model (as in the PIC16C57 data sheet): 12-bit instructions,
// 33 instructions, 2048-word program space in four 512-word pages selected
// by STATUS<6:5> (PA1:PA0), W register, two-level hardware stack, reset
// vector 0x7FF. File registers 0x00-0x07 are INDF, TMR0, PCL, STATUS, FSR,
// PORTA (4 bits), PORTB, PORTC; 0x08-0x0F are common general purpose
// registers and 0x10-0x1F are banked four times by FSR<6:5>, 72 bytes in
// all. Indirect addressing through INDF/FSR. TMR0 counts instruction cycles
// or T0CKI edges through the 8-bit prescaler set by OPTION.
//
// Microarchitecture (this design's own): each instruction runs in three
// phases, FETCH (read the program memory at PC, PC+1), READ (fetch the file
// operand: special registers directly, general purpose registers from the
// register-file memory) and WRITE (ALU, write W or the file register,
// flags, PC, stack). The two memories answer with req/ack, so a phase waits
// while a memory is being scrubbed; this is how the scrubber halts the
// core. Instructions that change the PC (GOTO, CALL, RETLW, writes to PCL)
// or skip are followed by one idle instruction cycle, giving the two-cycle
// timing of the data sheet. The general purpose registers live outside in
// a Hamming-protected RAM (addresses 0..71: 0x08-0x0F -> 0..7, bank b
// register 0x10+i -> 8+16b+i).
//
// The whole core state is a packed struct held in one tmr_reg, written on
// every clock, so any single upset is voted out and repaired at the next
// edge and shows on `tmr_err`.
//
// Watchdog: the on-chip RC oscillator of the data sheet is replaced by a
// count of WDT_CYCLES clock cycles (default 360000: the nominal 18 ms at an
// assumed 20 MHz clock), followed by the prescaler when OPTION.PSA = 1.
// A timeout resets the core (PC = 0x7FF, TRIS and OPTION set, PA cleared,
// STATUS.TO = 0, STATUS.PD = 0 if it woke the core from SLEEP, 1 otherwise);
// W, FSR, TMR0, port latches and the stack keep their values. CLRWDT and
// SLEEP clear it. WDT_EN plays the part of the configuration fuse.
// As in the data sheet, a write to TMR0 holds off its increments for the
// next two instruction cycles.
module pic_core #(
  parameter bit          WDT_EN     = 1'b1,
  parameter int unsigned WDT_CYCLES = 360000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,        // 0 holds the core before its first fetch
  // program memory
  output logic        pm_req,
  output logic [10:0] pm_addr,
  input  logic        pm_ack,
  input  logic [11:0] pm_rdata,
  // general purpose register file memory
  output logic        dm_req,
  output logic        dm_we,
  output logic [6:0]  dm_addr,
  output logic [7:0]  dm_wdata,
  input  logic        dm_ack,
  input  logic [7:0]  dm_rdata,
  // ports: pin inputs, output latches, TRIS (1 = input), strobes
  input  logic [3:0]  ra_in,
  input  logic [7:0]  rb_in,
  input  logic [7:0]  rc_in,
  output logic [3:0]  ra_out,
  output logic [7:0]  rb_out,
  output logic [7:0]  rc_out,
  output logic [3:0]  ra_tris,
  output logic [7:0]  rb_tris,
  output logic [7:0]  rc_tris,
  output logic [2:0]  port_wr,    // pulse: PORTA/B/C written
  output logic [7:0]  port_wdata, // value being written, valid with port_wr
  output logic [2:0]  port_rd,    // pulse: PORTA/B/C read
  input  logic        t0cki,
  output logic        sleeping,
  output logic        tmr_err
);
  localparam int unsigned WDW = $clog2(WDT_CYCLES);

  typedef enum logic [1:0] {P_FETCH, P_READ, P_WRITE, P_SLEEP} phase_e;

  typedef struct packed {
    phase_e      ph;
    logic [10:0] pc;
    logic [11:0] ir;
    logic [7:0]  w;
    logic [7:0]  status;   // PA2 PA1 PA0 TO PD Z DC C
    logic [6:0]  fsr;
    logic [7:0]  tmr0;
    logic [7:0]  presc;
    logic [5:0]  option;   // T0CS T0SE PSA PS2 PS1 PS0
    logic [3:0]  lata, trisa;
    logic [7:0]  latb, trisb, latc, trisc;
    logic [10:0] stk1, stk2;
    logic [7:0]  opnd;
    logic        nop;      // next instruction cycle is idle
    logic [2:0]  t0s;      // T0CKI synchroniser and previous value
    logic [1:0]  t0_inh;   // instruction cycles left without TMR0 increments
    logic [WDW-1:0] wdt;   // watchdog period counter
  } core_t;

  localparam core_t CORE_RST = '{
    ph: P_FETCH, pc: 11'h7FF, ir: '0, w: '0, status: 8'h18, fsr: '0,
    tmr0: '0, presc: '0, option: 6'h3F, lata: '0, trisa: 4'hF, latb: '0,
    trisb: 8'hFF, latc: '0, trisc: 8'hFF, stk1: '0, stk2: '0, opnd: '0,
    nop: 1'b0, t0s: '0, t0_inh: '0, wdt: '0};

  core_t s, ns;

  tmr_reg #(.W($bits(core_t)), .RST_VAL(CORE_RST)) u_state (
    .clk, .rst_n, .en(1'b1), .d(ns), .q(s), .err(tmr_err)
  );

  // ---------------- decode ----------------
  logic [4:0] f;
  logic       dbit;
  logic [2:0] bsel;
  logic [7:0] k8;
  logic [3:0] fop;
  logic       is_file, is_bit, is_ctl, is_lit, is_misc;
  logic       reads_file;

  always_comb begin
    f        = s.ir[4:0];
    dbit     = s.ir[5];
    bsel     = s.ir[7:5];
    k8       = s.ir[7:0];
    fop      = s.ir[9:6];
    is_file  = (s.ir[11:10] == 2'b00);
    is_bit   = (s.ir[11:10] == 2'b01);
    is_ctl   = (s.ir[11:10] == 2'b10);
    is_lit   = (s.ir[11:10] == 2'b11);
    is_misc  = is_file && fop == 4'b0000 && !dbit;
    reads_file = (is_file && fop > 4'b0001) || is_bit;
  end

  // ---------------- effective file address ----------------
  logic [4:0] fa;
  logic       special;
  logic [6:0] gpr_idx;
  logic [3:0] pina;
  logic [7:0] pinb, pinc;
  logic [7:0] spec_val;

  always_comb begin
    fa        = (f == 5'd0) ? s.fsr[4:0] : f;
    special   = (fa < 5'd8);
    if (fa < 5'd16) gpr_idx = 7'(fa) - 7'd8;
    else            gpr_idx = 7'd8 + {s.fsr[6:5], 4'b0} + 7'(fa - 5'd16);
    pina = (s.trisa & ra_in) | (~s.trisa & s.lata);
    pinb = (s.trisb & rb_in) | (~s.trisb & s.latb);
    pinc = (s.trisc & rc_in) | (~s.trisc & s.latc);
    unique case (fa[2:0])
      3'd0:    spec_val = 8'h00;
      3'd1:    spec_val = s.tmr0;
      3'd2:    spec_val = s.pc[7:0];
      3'd3:    spec_val = s.status;
      3'd4:    spec_val = {1'b1, s.fsr};
      3'd5:    spec_val = {4'b0, pina};
      3'd6:    spec_val = pinb;
      default: spec_val = pinc;
    endcase
  end

  // ---------------- ALU (WRITE phase) ----------------
  logic [7:0] res;
  logic       to_file, to_w, set_z, set_c, set_dc, c_new, dc_new, skip, branch;
  logic [10:0] pc_br;
  logic [8:0]  sum9;
  logic [4:0]  sum5;

  always_comb begin
    res = '0; to_file = 1'b0; to_w = 1'b0;
    set_z = 1'b0; set_c = 1'b0; set_dc = 1'b0; c_new = 1'b0; dc_new = 1'b0;
    skip = 1'b0; branch = 1'b0; pc_br = s.pc;
    sum9 = '0; sum5 = '0;
    if (is_file && !is_misc) begin
      to_file = dbit; to_w = !dbit;
      unique case (fop)
        4'b0000: begin res = s.w; to_file = 1'b1; to_w = 1'b0; end      // MOVWF
        4'b0001: begin res = 8'h00; set_z = 1'b1; end                     // CLRW/CLRF
        4'b0010: begin                                                    // SUBWF
          sum9 = {1'b0, s.opnd} + {1'b0, ~s.w} + 9'd1;
          sum5 = {1'b0, s.opnd[3:0]} + {1'b0, ~s.w[3:0]} + 5'd1;
          res = sum9[7:0]; set_z = 1'b1; set_c = 1'b1; c_new = sum9[8];
          set_dc = 1'b1; dc_new = sum5[4];
        end
        4'b0011: begin res = s.opnd - 8'd1; set_z = 1'b1; end             // DECF
        4'b0100: begin res = s.opnd | s.w; set_z = 1'b1; end              // IORWF
        4'b0101: begin res = s.opnd & s.w; set_z = 1'b1; end              // ANDWF
        4'b0110: begin res = s.opnd ^ s.w; set_z = 1'b1; end              // XORWF
        4'b0111: begin                                                    // ADDWF
          sum9 = {1'b0, s.opnd} + {1'b0, s.w};
          sum5 = {1'b0, s.opnd[3:0]} + {1'b0, s.w[3:0]};
          res = sum9[7:0]; set_z = 1'b1; set_c = 1'b1; c_new = sum9[8];
          set_dc = 1'b1; dc_new = sum5[4];
        end
        4'b1000: begin res = s.opnd; set_z = 1'b1; end                    // MOVF
        4'b1001: begin res = ~s.opnd; set_z = 1'b1; end                   // COMF
        4'b1010: begin res = s.opnd + 8'd1; set_z = 1'b1; end             // INCF
        4'b1011: begin res = s.opnd - 8'd1; skip = (res == 8'h00); end    // DECFSZ
        4'b1100: begin                                                    // RRF
          res = {s.status[0], s.opnd[7:1]}; set_c = 1'b1; c_new = s.opnd[0];
        end
        4'b1101: begin                                                    // RLF
          res = {s.opnd[6:0], s.status[0]}; set_c = 1'b1; c_new = s.opnd[7];
        end
        4'b1110: res = {s.opnd[3:0], s.opnd[7:4]};                        // SWAPF
        default: begin res = s.opnd + 8'd1; skip = (res == 8'h00); end    // INCFSZ
      endcase
    end else if (is_bit) begin
      unique case (s.ir[9:8])
        2'b00: begin res = s.opnd & ~(8'h01 << bsel); to_file = 1'b1; end // BCF
        2'b01: begin res = s.opnd |  (8'h01 << bsel); to_file = 1'b1; end // BSF
        2'b10: skip = !s.opnd[bsel];                                      // BTFSC
        default: skip = s.opnd[bsel];                                     // BTFSS
      endcase
    end else if (is_ctl) begin
      branch = 1'b1;
      unique case (s.ir[9:8])
        2'b00: begin res = k8; to_w = 1'b1; pc_br = s.stk1; end           // RETLW
        2'b01: pc_br = {s.status[6:5], 1'b0, k8};                         // CALL
        default: pc_br = {s.status[6:5], s.ir[8:0]};                      // GOTO
      endcase
    end else if (is_lit) begin
      to_w = 1'b1;
      unique case (s.ir[9:8])
        2'b00: res = k8;                                                  // MOVLW
        2'b01: begin res = s.w | k8; set_z = 1'b1; end                    // IORLW
        2'b10: begin res = s.w & k8; set_z = 1'b1; end                    // ANDLW
        default: begin res = s.w ^ k8; set_z = 1'b1; end                  // XORLW
      endcase
    end
  end

  logic gpr_write;
  assign gpr_write = to_file && !special;

  // ---------------- next state ----------------
  logic commit, t0_edge, inc_src, presc_ovf, t0_write, clr_wdt, wdt_tick, timeout;
  logic [7:0] pmask, wmask;
  logic       wdt_ovf;

  always_comb begin
    ns       = s;
    pm_req   = 1'b0;
    pm_addr  = s.pc;
    dm_req   = 1'b0;
    dm_we    = 1'b0;
    dm_addr  = gpr_idx;
    dm_wdata = res;
    port_wr  = '0;
    port_rd  = '0;
    commit   = 1'b0;

    ns.t0s = {s.t0s[1:0], t0cki};

    unique case (s.ph)
      P_FETCH: begin
        if (!run) begin
          ns.ph = P_FETCH;
        end else if (s.nop) begin
          ns.nop = 1'b0;
          ns.ir  = 12'h000;
          ns.ph  = P_READ;
        end else begin
          pm_req = 1'b1;
          if (pm_ack) begin
            ns.ir = pm_rdata;
            ns.pc = s.pc + 11'd1;
            ns.ph = P_READ;
          end
        end
      end
      P_READ: begin
        if (!reads_file) begin
          ns.ph = P_WRITE;
        end else if (special) begin
          ns.opnd = spec_val;
          if (fa >= 5'd5) port_rd = 3'b001 << (fa - 5'd5);
          ns.ph = P_WRITE;
        end else begin
          dm_req = 1'b1;
          if (dm_ack) begin
            ns.opnd = dm_rdata;
            ns.ph   = P_WRITE;
          end
        end
      end
      P_WRITE: begin
        if (gpr_write) begin
          dm_req = 1'b1;
          dm_we  = 1'b1;
          commit = dm_ack;
        end else begin
          commit = 1'b1;
        end
        if (commit) begin
          ns.ph = P_FETCH;
          if (to_w) ns.w = res;
          // writes to special file registers
          if (to_file && special) begin
            unique case (fa[2:0])
              3'd1: ns.tmr0 = res;
              3'd2: begin ns.pc = {s.status[6:5], 1'b0, res}; ns.nop = 1'b1; end
              3'd3: begin ns.status[7:5] = res[7:5]; ns.status[2:0] = res[2:0]; end
              3'd4: ns.fsr = res[6:0];
              3'd5: begin ns.lata = res[3:0]; port_wr[0] = 1'b1; end
              3'd6: begin ns.latb = res;      port_wr[1] = 1'b1; end
              3'd7: begin ns.latc = res;      port_wr[2] = 1'b1; end
              default: ;                                 // INDF pointing at itself
            endcase
          end
          // flags the instruction affects override a write to STATUS
          if (set_z)  ns.status[2] = (res == 8'h00);
          if (set_dc) ns.status[1] = dc_new;
          if (set_c)  ns.status[0] = c_new;
          if (skip) begin
            ns.pc  = s.pc + 11'd1;
            ns.nop = 1'b1;
          end
          if (branch) begin
            ns.pc  = pc_br;
            ns.nop = 1'b1;
            if (s.ir[9:8] == 2'b00) ns.stk1 = s.stk2;                 // RETLW pops
            if (s.ir[9:8] == 2'b01) begin ns.stk2 = s.stk1; ns.stk1 = s.pc; end
          end
          if (is_misc) begin
            unique case (s.ir[4:0])
              5'd2: ns.option = s.w[5:0];                            // OPTION
              5'd3: begin ns.status[4:3] = 2'b10; ns.ph = P_SLEEP; end // SLEEP
              5'd4: ns.status[4:3] = 2'b11;                          // CLRWDT
              5'd5: ns.trisa = s.w[3:0];                             // TRIS 5
              5'd6: ns.trisb = s.w;                                  // TRIS 6
              5'd7: ns.trisc = s.w;                                  // TRIS 7
              default: ;                                             // NOP
            endcase
          end
        end
      end
      default: ns.ph = P_SLEEP;                                      // SLEEP
    endcase

    // TMR0, watchdog and the prescaler they share
    t0_edge   = s.option[4] ? (s.t0s[2] & ~s.t0s[1]) : (~s.t0s[2] & s.t0s[1]);
    inc_src   = (s.option[5] ? t0_edge : commit) && s.t0_inh == 2'd0;
    pmask     = (8'h02 << s.option[2:0]) - 8'h01;
    wmask     = (8'h01 << s.option[2:0]) - 8'h01;
    presc_ovf = ((s.presc + 8'h01) & pmask) == 8'h00;          // TMR0: 1:2^(PS+1)
    wdt_ovf   = ((s.presc + 8'h01) & wmask) == 8'h00;          // WDT:  1:2^PS
    // both commit in their first WRITE cycle (no GPR write), so they are
    // taken from the phase, not from the memory handshake
    t0_write  = (s.ph == P_WRITE) && to_file && special && fa == 5'd1;
    if (t0_write)                      ns.t0_inh = 2'd2;
    else if (commit && s.t0_inh != '0) ns.t0_inh = s.t0_inh - 2'd1;
    clr_wdt   = (s.ph == P_WRITE) && is_misc && (s.ir[4:0] == 5'd3 || s.ir[4:0] == 5'd4);
    wdt_tick  = WDT_EN && (s.wdt == WDW'(WDT_CYCLES - 1));
    timeout   = 1'b0;
    ns.wdt    = (clr_wdt || wdt_tick || !WDT_EN) ? '0 : s.wdt + 1'b1;
    if (s.option[3]) begin
      // prescaler on the watchdog, TMR0 counts directly
      if (!t0_write && inc_src) ns.tmr0 = s.tmr0 + 8'h01;
      if (clr_wdt) ns.presc = '0;
      else if (wdt_tick) begin
        ns.presc = s.presc + 8'h01;
        timeout  = wdt_ovf;
      end
    end else begin
      // prescaler on TMR0, watchdog times out on every tick
      timeout = wdt_tick && !clr_wdt;
      if (t0_write) ns.presc = '0;                                   // write clears prescaler
      else if (inc_src) begin
        ns.presc = s.presc + 8'h01;
        if (presc_ovf) ns.tmr0 = s.tmr0 + 8'h01;
      end
    end
    if (timeout) begin
      ns        = CORE_RST;
      ns.w      = s.w;
      ns.fsr    = s.fsr;
      ns.tmr0   = s.tmr0;
      ns.lata   = s.lata;
      ns.latb   = s.latb;
      ns.latc   = s.latc;
      ns.stk1   = s.stk1;
      ns.stk2   = s.stk2;
      ns.t0s    = s.t0s;
      ns.status = {3'b000, 1'b0, s.ph != P_SLEEP, s.status[2:0]};
      port_wr   = '0;
      dm_req    = 1'b0;
      pm_req    = 1'b0;
    end
  end

  assign port_wdata = res;
  assign ra_out   = s.lata;
  assign rb_out   = s.latb;
  assign rc_out   = s.latc;
  assign ra_tris  = s.trisa;
  assign rb_tris  = s.trisb;
  assign rc_tris  = s.trisc;
  assign sleeping = (s.ph == P_SLEEP);
endmodule
