// pic_test_prog_pkg: PIC16C57 instruction encoders and the test program
// shared by the core and system testbenches.
//
// The program exercises the ALU and its flags (ADDWF, SUBWF, RLF, RRF,
// COMF, SWAPF, logic with literals), direct and indirect addressing, FSR
// bank selection, a nested CALL/RETLW pair (both stack levels), DECFSZ
// loops, BTFSS/BTFSC skips, a computed jump by writing PCL, page selection
// through STATUS.PA0, reading port A, TMR0 counting T0CKI pulses and
// instruction cycles through the prescaler. Each result is written to
// PORTC, and the testbench compares the sequence with exp_portc(). It then
// echoes N_ECHO bytes: it waits for RA1 (byte received), reads PORTB,
// waits for RA0 low (transmitter free), writes the byte XOR 0x20 to PORTB,
// clearing the watchdog in the loop, and finally executes SLEEP. The
// watchdog wakes it, the program starts again, and its second PORTC value
// is then STATUS with TO = PD = 0 (EXP_STATUS_WDT).
package pic_test_prog_pkg;
  // instruction encoders (PIC16C5x 12-bit format)
  function automatic logic [11:0] fop(input logic [3:0] op, input logic d, input logic [4:0] f);
    return {2'b00, op, d, f};
  endfunction
  function automatic logic [11:0] bop(input logic [1:0] op, input logic [2:0] b, input logic [4:0] f);
    return {2'b01, op, b, f};
  endfunction
  function automatic logic [11:0] lop(input logic [1:0] op, input logic [7:0] k);
    return {2'b11, op, k};
  endfunction
  function automatic logic [11:0] MOVLW(input logic [7:0] k); return lop(2'b00, k); endfunction
  function automatic logic [11:0] IORLW(input logic [7:0] k); return lop(2'b01, k); endfunction
  function automatic logic [11:0] ANDLW(input logic [7:0] k); return lop(2'b10, k); endfunction
  function automatic logic [11:0] XORLW(input logic [7:0] k); return lop(2'b11, k); endfunction
  function automatic logic [11:0] MOVWF(input logic [4:0] f); return fop(4'b0000, 1'b1, f); endfunction
  function automatic logic [11:0] CLRF (input logic [4:0] f); return fop(4'b0001, 1'b1, f); endfunction
  function automatic logic [11:0] SUBWF(input logic [4:0] f, input logic d); return fop(4'b0010, d, f); endfunction
  function automatic logic [11:0] DECF (input logic [4:0] f, input logic d); return fop(4'b0011, d, f); endfunction
  function automatic logic [11:0] ADDWF(input logic [4:0] f, input logic d); return fop(4'b0111, d, f); endfunction
  function automatic logic [11:0] MOVF (input logic [4:0] f, input logic d); return fop(4'b1000, d, f); endfunction
  function automatic logic [11:0] COMF (input logic [4:0] f, input logic d); return fop(4'b1001, d, f); endfunction
  function automatic logic [11:0] INCF (input logic [4:0] f, input logic d); return fop(4'b1010, d, f); endfunction
  function automatic logic [11:0] DECFSZ(input logic [4:0] f, input logic d); return fop(4'b1011, d, f); endfunction
  function automatic logic [11:0] RRF  (input logic [4:0] f, input logic d); return fop(4'b1100, d, f); endfunction
  function automatic logic [11:0] RLF  (input logic [4:0] f, input logic d); return fop(4'b1101, d, f); endfunction
  function automatic logic [11:0] SWAPF(input logic [4:0] f, input logic d); return fop(4'b1110, d, f); endfunction
  function automatic logic [11:0] BCF  (input logic [4:0] f, input logic [2:0] b); return bop(2'b00, b, f); endfunction
  function automatic logic [11:0] BSF  (input logic [4:0] f, input logic [2:0] b); return bop(2'b01, b, f); endfunction
  function automatic logic [11:0] BTFSC(input logic [4:0] f, input logic [2:0] b); return bop(2'b10, b, f); endfunction
  function automatic logic [11:0] BTFSS(input logic [4:0] f, input logic [2:0] b); return bop(2'b11, b, f); endfunction
  function automatic logic [11:0] RETLW(input logic [7:0] k); return {4'b1000, k}; endfunction
  function automatic logic [11:0] CALL (input logic [7:0] k); return {4'b1001, k}; endfunction
  function automatic logic [11:0] GOTO (input logic [8:0] k); return {3'b101, k}; endfunction
  function automatic logic [11:0] TRIS (input logic [2:0] f); return {9'b0, f}; endfunction
  localparam logic [11:0] SLEEP  = 12'h003;
  localparam logic [11:0] CLRWDT = 12'h004;
  localparam logic [11:0] OPTION = 12'h002;
  localparam logic [11:0] NOP   = 12'h000;

  // file register names
  localparam logic [4:0] INDF = 0, TMR0 = 1, PCL = 2, STATUS = 3, FSR = 4,
                         PORTA = 5, PORTB = 6, PORTC = 7;

  localparam int N_OUT  = 17;
  localparam int N_ECHO = 3;
  localparam int N_T0   = 5;     // T0CKI pulses the testbench gives

  function automatic logic [11:0] prog(input int a);
    case (a)
      0:  return MOVLW(8'h00);
      1:  return TRIS(3'd7);             // PORTC all outputs
      2:  return MOVLW(8'h35);
      3:  return MOVWF(5'h08);
      4:  return MOVLW(8'h0B);
      5:  return ADDWF(5'h08, 1);        // 0x40, DC=1, C=0
      6:  return MOVF(5'h08, 0);
      7:  return MOVWF(PORTC);           // 0x40
      8:  return MOVF(STATUS, 0);
      9:  return MOVWF(PORTC);           // 0x1A: TO PD DC
      10: return MOVLW(8'h50);
      11: return SUBWF(5'h08, 0);        // 0x40-0x50 = 0xF0, C=0
      12: return MOVWF(PORTC);           // 0xF0
      13: return RLF(5'h08, 0);          // 0x80
      14: return MOVWF(PORTC);
      15: return MOVLW(8'h0F);
      16: return MOVWF(FSR);
      17: return MOVLW(8'hA5);
      18: return MOVWF(INDF);            // [0x0F] = 0xA5
      19: return SWAPF(5'h0F, 0);
      20: return MOVWF(PORTC);           // 0x5A
      21: return MOVLW(8'h30);
      22: return MOVWF(FSR);             // bank 1
      23: return MOVLW(8'h11);
      24: return MOVWF(5'h10);
      25: return CLRF(FSR);              // bank 0
      26: return MOVLW(8'h22);
      27: return MOVWF(5'h10);
      28: return MOVLW(8'h30);
      29: return MOVWF(FSR);
      30: return MOVF(5'h10, 0);
      31: return MOVWF(PORTC);           // 0x11
      32: return CLRF(FSR);
      33: return MOVF(5'h10, 0);
      34: return MOVWF(PORTC);           // 0x22
      35: return CALL(8'h80);
      36: return MOVWF(PORTC);           // 0x77
      37: return MOVLW(8'h03);
      38: return MOVWF(5'h09);
      39: return CLRF(5'h0A);
      40: return INCF(5'h0A, 1);
      41: return DECFSZ(5'h09, 1);
      42: return GOTO(9'd40);
      43: return MOVF(5'h0A, 0);
      44: return MOVWF(PORTC);           // 0x03
      45: return BSF(5'h0A, 3'd7);       // 0x83
      46: return BTFSS(5'h0A, 3'd7);
      47: return MOVLW(8'hEE);           // skipped
      48: return BTFSC(5'h0A, 3'd6);
      49: return MOVLW(8'hDD);           // skipped
      50: return MOVF(5'h0A, 0);
      51: return XORLW(8'hFF);
      52: return MOVWF(PORTC);           // 0x7C
      53: return COMF(5'h0A, 0);
      54: return IORLW(8'h01);
      55: return ANDLW(8'hF7);
      56: return MOVWF(PORTC);           // 0x75
      57: return MOVLW(8'h01);
      58: return ADDWF(PCL, 1);          // jump to 60
      59: return MOVLW(8'h99);           // skipped
      60: return MOVLW(8'h42);
      61: return MOVWF(PORTC);           // 0x42
      62: return DECF(5'h0A, 1);         // 0x82
      63: return RRF(5'h0A, 0);          // 0x41
      64: return MOVWF(PORTC);
      65: return MOVF(PORTA, 0);
      66: return MOVWF(PORTC);           // 0x08 (RA3:2 = 10, no UART flags)
      67: return BSF(STATUS, 3'd5);      // PA0 = 1, page 1
      68: return GOTO(9'h010);           // to 0x210
      'h80: return CALL(8'h82);
      'h81: return RETLW(8'h77);
      'h82: return RETLW(8'h66);
      'h210: return MOVLW(8'h5C);
      'h211: return MOVWF(PORTC);        // 0x5C
      'h212: return MOVF(TMR0, 0);
      'h213: return MOVWF(PORTC);        // T0CKI pulses counted
      'h214: return CLRWDT;
      'h215: return MOVLW(8'h00);
      'h216: return OPTION;              // TMR0 on the instruction clock, prescaler 1:2
      'h217: return CLRF(TMR0);
      'h218, 'h219, 'h21A, 'h21B, 'h21C, 'h21D: return NOP;
      'h21E: return MOVF(TMR0, 0);
      'h21F: return MOVWF(PORTC);        // (6 cycles - 2 inhibited by the write) / 2 = 2
      'h220: return MOVLW(8'h3F);
      'h221: return OPTION;              // back to the reset setting
      'h222: return MOVLW(8'(N_ECHO));
      'h223: return MOVWF(5'h0C);
      'h224: return CLRWDT;
      'h225: return BTFSS(PORTA, 3'd1);  // byte received?
      'h226: return GOTO(9'h024);
      'h227: return MOVF(PORTB, 0);
      'h228: return MOVWF(5'h0B);
      'h229: return BTFSC(PORTA, 3'd0);  // transmitter busy?
      'h22A: return GOTO(9'h029);
      'h22B: return MOVF(5'h0B, 0);
      'h22C: return XORLW(8'h20);
      'h22D: return MOVWF(PORTB);        // send
      'h22E: return DECFSZ(5'h0C, 1);
      'h22F: return GOTO(9'h024);
      'h230: return BTFSC(PORTA, 3'd0);
      'h231: return GOTO(9'h030);
      'h232: return SLEEP;               // until the watchdog wakes the core
      'h7FF: return GOTO(9'h000);        // reset vector
      default: return NOP;
    endcase
  endfunction

  localparam logic [7:0] EXP_STATUS_WDT = 8'h02;

  function automatic logic [7:0] exp_portc(input int i);
    logic [7:0] e [N_OUT] = '{8'h40, 8'h1A, 8'hF0, 8'h80, 8'h5A, 8'h11, 8'h22, 8'h77,
                              8'h03, 8'h7C, 8'h75, 8'h42, 8'h41, 8'h08, 8'h5C, 8'(N_T0), 8'h02};
    return e[i];
  endfunction
endpackage
