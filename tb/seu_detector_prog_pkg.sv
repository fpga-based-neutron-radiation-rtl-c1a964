// seu_detector_prog_pkg: firmware of the SRAM SEU detector, for the
// system-level workload testbench.
//
// The SRAM under test (SUT_BYTES bytes) is reached through an address
// counter outside the microcontroller: RA3 high clears the counter, a pulse
// on RA2 writes PORTC into the addressed byte when port C drives, and the
// falling edge of RA2 advances the counter; with port C as input the pins
// show the addressed byte. The firmware fills the SRAM with PATTERN, then
// scans it in an endless loop: it counts the bytes that differ from
// PATTERN, sends the count over the UART (PORTB, waiting on RA0), and
// rewrites the pattern if it found errors, so that each upset is counted
// once. CLRWDT keeps the watchdog quiet.
package seu_detector_prog_pkg;
  import pic_test_prog_pkg::*;

  localparam int         SUT_BYTES = 16;
  localparam logic [7:0] PATTERN   = 8'h55;
  localparam logic [4:0] CNT = 5'h08, ERRS = 5'h09;

  function automatic logic [11:0] fw(input int a);
    case (a)
      // fill: write PATTERN into every byte
      'h10: return BSF(PORTA, 3'd3);
      'h11: return BCF(PORTA, 3'd3);       // address counter cleared
      'h12: return MOVLW(8'h00);
      'h13: return TRIS(3'd7);             // port C drives
      'h14: return MOVLW(PATTERN);
      'h15: return MOVWF(PORTC);
      'h16: return MOVLW(8'(SUT_BYTES));
      'h17: return MOVWF(CNT);
      'h18: return BSF(PORTA, 3'd2);       // write strobe
      'h19: return BCF(PORTA, 3'd2);       // next address
      'h1A: return DECFSZ(CNT, 1);
      'h1B: return GOTO(9'h018);
      'h1C: return MOVLW(8'hFF);
      'h1D: return TRIS(3'd7);             // port C input again
      'h1E: return RETLW(8'h00);
      // main
      'h20: return MOVLW(8'h03);
      'h21: return TRIS(3'd5);             // RA3:2 outputs, RA1:0 inputs
      'h22: return CALL(8'h10);
      // scan
      'h23: return CLRF(ERRS);
      'h24: return BSF(PORTA, 3'd3);
      'h25: return BCF(PORTA, 3'd3);
      'h26: return MOVLW(8'(SUT_BYTES));
      'h27: return MOVWF(CNT);
      'h28: return MOVF(PORTC, 0);
      'h29: return XORLW(PATTERN);
      'h2A: return BTFSS(STATUS, 3'd2);    // Z: byte intact
      'h2B: return INCF(ERRS, 1);
      'h2C: return BSF(PORTA, 3'd2);
      'h2D: return BCF(PORTA, 3'd2);
      'h2E: return DECFSZ(CNT, 1);
      'h2F: return GOTO(9'h028);
      'h30: return CLRWDT;
      'h31: return BTFSC(PORTA, 3'd0);     // transmitter busy?
      'h32: return GOTO(9'h031);
      'h33: return MOVF(ERRS, 0);
      'h34: return MOVWF(PORTB);           // report
      'h35: return MOVF(ERRS, 1);
      'h36: return BTFSS(STATUS, 3'd2);
      'h37: return CALL(8'h10);            // errors found: restore pattern
      'h38: return GOTO(9'h023);
      'h7FF: return GOTO(9'h020);
      default: return NOP;
    endcase
  endfunction
endpackage
