// repic_asm_pkg: tiny assembler for testbenches. Each function returns the 15-bit RePIC
// machine word of one instruction (PIC16F84 encodings with bit 14 = 0, reactive encodings with
// bit 14 = 1). Signal numbers: 0..7 = SIA0..SIA7, 8..15 = SIB0..SIB7.
package repic_asm_pkg;
  typedef logic [14:0] w15;
  localparam int F = 1, W = 0;  // destination bit
  // byte-oriented
  function automatic w15 bop(int op, int f, int d); return w15'({2'b00, 4'(op), 1'(d), 7'(f)}); endfunction
  function automatic w15 NOP();          return 15'h0000; endfunction
  function automatic w15 MOVWF(int f);   return bop(0, f, 1); endfunction
  function automatic w15 CLRW();         return bop(1, 0, 0); endfunction
  function automatic w15 CLRF(int f);    return bop(1, f, 1); endfunction
  function automatic w15 SUBWF(int f, int d); return bop(2, f, d); endfunction
  function automatic w15 DECF(int f, int d);  return bop(3, f, d); endfunction
  function automatic w15 IORWF(int f, int d); return bop(4, f, d); endfunction
  function automatic w15 ANDWF(int f, int d); return bop(5, f, d); endfunction
  function automatic w15 XORWF(int f, int d); return bop(6, f, d); endfunction
  function automatic w15 ADDWF(int f, int d); return bop(7, f, d); endfunction
  function automatic w15 MOVF(int f, int d);  return bop(8, f, d); endfunction
  function automatic w15 COMF(int f, int d);  return bop(9, f, d); endfunction
  function automatic w15 INCF(int f, int d);  return bop(10, f, d); endfunction
  function automatic w15 DECFSZ(int f, int d); return bop(11, f, d); endfunction
  function automatic w15 RRF(int f, int d);   return bop(12, f, d); endfunction
  function automatic w15 RLF(int f, int d);   return bop(13, f, d); endfunction
  function automatic w15 SWAPF(int f, int d); return bop(14, f, d); endfunction
  function automatic w15 INCFSZ(int f, int d); return bop(15, f, d); endfunction
  // bit-oriented
  function automatic w15 bitop(int op, int f, int b); return w15'({2'b01, 2'(op), 3'(b), 7'(f)}); endfunction
  function automatic w15 BCF(int f, int b);   return bitop(0, f, b); endfunction
  function automatic w15 BSF(int f, int b);   return bitop(1, f, b); endfunction
  function automatic w15 BTFSC(int f, int b); return bitop(2, f, b); endfunction
  function automatic w15 BTFSS(int f, int b); return bitop(3, f, b); endfunction
  // literal and control
  function automatic w15 MOVLW(int k);  return w15'({4'b0110, 3'b000, 8'(k)}); endfunction
  function automatic w15 RETLW(int k);  return w15'({4'b0110, 3'b100, 8'(k)}); endfunction
  function automatic w15 IORLW(int k);  return w15'({4'b0111, 3'b000, 8'(k)}); endfunction
  function automatic w15 ANDLW(int k);  return w15'({4'b0111, 3'b001, 8'(k)}); endfunction
  function automatic w15 XORLW(int k);  return w15'({4'b0111, 3'b010, 8'(k)}); endfunction
  function automatic w15 SUBLW(int k);  return w15'({4'b0111, 3'b100, 8'(k)}); endfunction
  function automatic w15 ADDLW(int k);  return w15'({4'b0111, 3'b110, 8'(k)}); endfunction
  function automatic w15 CALL(int a);   return w15'({4'b0100, 11'(a)}); endfunction
  function automatic w15 GOTO(int a);   return w15'({4'b0101, 11'(a)}); endfunction
  function automatic w15 RETURN();      return 15'h0008; endfunction
  function automatic w15 RETFIE();      return 15'h0009; endfunction
  function automatic w15 SLEEP();       return 15'h0063; endfunction
  function automatic w15 CLRWDT();      return 15'h0064; endfunction
  // reactive
  function automatic w15 EMIT(int s);     return w15'({3'b100, 12'(s)}); endfunction
  function automatic w15 SUSTAIN(int s);  return w15'({3'b101, 12'(s)}); endfunction
  function automatic w15 LDCADDR(int a);  return w15'({4'b1100, 11'(a)}); endfunction
  function automatic w15 LDAADDR(int a);  return w15'({4'b1101, 11'(a)}); endfunction
  function automatic w15 SETINTMR(int t, int k); return w15'({5'b11100, 2'(t), 8'(k)}); endfunction
  function automatic w15 SAWAIT(int s);   return w15'({7'b1110100, 4'b0000, 4'(s)}); endfunction
  function automatic w15 TAWAIT(int d);   return w15'({7'b1110101, 8'(d)}); endfunction
  function automatic w15 CAWAIT(int s1, int s2); return w15'({7'b1111000, 4'(s2), 4'(s1)}); endfunction
  function automatic w15 ABORT(int s);    return w15'({7'b1111100, 4'b0000, 4'(s)}); endfunction
  // file addresses
  localparam int STATUS = 3, FSR = 4, PORTA = 5, PORTB = 6, SIGINA = 7, SIGINB = 8,
                 PCLATH = 10, INTCON = 11, TMR0 = 1, PCL = 2, INDF = 0;
endpackage
