// repic_pkg: types, constants and the instruction decoder shared by the RePIC core and its
// reactive units.
//
// RePIC words are 15 bits wide. Bit 14 = 0 marks an original PIC16F84 instruction (its 14-bit
// encoding sits in bits 13:0); bit 14 = 1 marks a reactive instruction. The reactive opcode
// patterns are the ones of the instruction-format drawings:
//   EMIT     100 ssssssssssss      SUSTAIN  101 ssssssssssss
//   LDCADDR  1100 aaaaaaaaaaa      LDAADDR  1101 aaaaaaaaaaa
//   SETINTMR 11100 tt kkkkkkkk     SAWAIT   1110100 xxxx iiii
//   TAWAIT   1110101 dddddddd      CAWAIT   1111000 jjjj iiii   (jjjj = signal2, iiii = signal1)
//   ABORT    1111100 xxxx iiii
// 15-bit patterns that match none of these decode as NOP (this design's choice).
// The special-function register addresses of SIGINA (0x07) and SIGINB (0x08) are this design's
// choice; the rest of the file map is that of the PIC16F84.
package repic_pkg;

  localparam int unsigned IW = 15;  // instruction width
  localparam int unsigned PCW = 13; // program counter width (progadr[12:0])

  typedef logic [IW-1:0] instr_t;
  typedef logic [PCW-1:0] pc_t;

  typedef enum logic [5:0] {
    // byte-oriented file register operations
    I_NOP, I_MOVWF, I_CLRW, I_CLRF, I_SUBWF, I_DECF, I_IORWF, I_ANDWF, I_XORWF, I_ADDWF,
    I_MOVF, I_COMF, I_INCF, I_DECFSZ, I_RRF, I_RLF, I_SWAPF, I_INCFSZ,
    // bit-oriented
    I_BCF, I_BSF, I_BTFSC, I_BTFSS,
    // literal and control
    I_MOVLW, I_RETLW, I_IORLW, I_ANDLW, I_XORLW, I_SUBLW, I_ADDLW, I_CALL, I_GOTO,
    I_RETURN, I_RETFIE, I_SLEEP, I_CLRWDT, I_OPTION, I_TRIS,
    // reactive
    I_EMIT, I_SUSTAIN, I_LDCADDR, I_LDAADDR, I_SETINTMR, I_SAWAIT, I_TAWAIT, I_CAWAIT, I_ABORT
  } op_e;

  // ALU operations
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_IOR, ALU_XOR, ALU_PASSA, ALU_PASSB, ALU_COMB,
    ALU_INCB, ALU_DECB, ALU_RRF, ALU_RLF, ALU_SWAP, ALU_ZERO, ALU_BCLR, ALU_BSET
  } alu_op_e;

  // File register addresses (7-bit, bank selected by STATUS.RP0)
  localparam logic [6:0] A_INDF    = 7'h00;
  localparam logic [6:0] A_TMR0    = 7'h01; // OPTION in bank 1
  localparam logic [6:0] A_PCL     = 7'h02;
  localparam logic [6:0] A_STATUS  = 7'h03;
  localparam logic [6:0] A_FSR     = 7'h04;
  localparam logic [6:0] A_PORTA   = 7'h05; // TRISA in bank 1
  localparam logic [6:0] A_PORTB   = 7'h06; // TRISB in bank 1
  localparam logic [6:0] A_SIGINA  = 7'h07;
  localparam logic [6:0] A_SIGINB  = 7'h08;
  localparam logic [6:0] A_PCLATH  = 7'h0A;
  localparam logic [6:0] A_INTCON  = 7'h0B;
  localparam logic [6:0] A_GPR_LO  = 7'h0C; // first general purpose register (external RAM)

  // STATUS bits
  localparam int unsigned ST_C = 0, ST_DC = 1, ST_Z = 2, ST_PD = 3, ST_TO = 4, ST_RP0 = 5;
  // INTCON bits
  localparam int unsigned IC_RBIF = 0, IC_INTF = 1, IC_T0IF = 2, IC_RBIE = 3, IC_INTE = 4,
                          IC_T0IE = 5, IC_GIE = 7;

  // Instruction decoder: classifies a 15-bit word.
  function automatic op_e decode(instr_t i);
    op_e o;
    o = I_NOP;
    if (i[14]) begin
      if      (i[13:12] == 2'b00)      o = I_EMIT;
      else if (i[13:12] == 2'b01)      o = I_SUSTAIN;
      else if (i[13:11] == 3'b100)     o = I_LDCADDR;
      else if (i[13:11] == 3'b101)     o = I_LDAADDR;
      else if (i[13:10] == 4'b1100)    o = I_SETINTMR;
      else if (i[13:8]  == 6'b110100)  o = I_SAWAIT;
      else if (i[13:8]  == 6'b110101)  o = I_TAWAIT;
      else if (i[13:8]  == 6'b111000)  o = I_CAWAIT;
      else if (i[13:8]  == 6'b111100)  o = I_ABORT;
    end else begin
      unique case (i[13:12])
        2'b00: begin
          unique case (i[11:8])
            4'b0000: begin
              if (i[7])                o = I_MOVWF;
              else if (i[6:0] == 7'h08) o = I_RETURN;
              else if (i[6:0] == 7'h09) o = I_RETFIE;
              else if (i[6:0] == 7'h62) o = I_OPTION;
              else if (i[6:0] == 7'h63) o = I_SLEEP;
              else if (i[6:0] == 7'h64) o = I_CLRWDT;
              else if (i[6:0] inside {7'h65, 7'h66, 7'h67}) o = I_TRIS;
              else                      o = I_NOP;
            end
            4'b0001: o = i[7] ? I_CLRF : I_CLRW;
            4'b0010: o = I_SUBWF;
            4'b0011: o = I_DECF;
            4'b0100: o = I_IORWF;
            4'b0101: o = I_ANDWF;
            4'b0110: o = I_XORWF;
            4'b0111: o = I_ADDWF;
            4'b1000: o = I_MOVF;
            4'b1001: o = I_COMF;
            4'b1010: o = I_INCF;
            4'b1011: o = I_DECFSZ;
            4'b1100: o = I_RRF;
            4'b1101: o = I_RLF;
            4'b1110: o = I_SWAPF;
            4'b1111: o = I_INCFSZ;
          endcase
        end
        2'b01: begin
          unique case (i[11:10])
            2'b00: o = I_BCF;
            2'b01: o = I_BSF;
            2'b10: o = I_BTFSC;
            2'b11: o = I_BTFSS;
          endcase
        end
        2'b10: o = i[11] ? I_GOTO : I_CALL;
        2'b11: begin
          if      (i[11:10] == 2'b00) o = I_MOVLW;
          else if (i[11:10] == 2'b01) o = I_RETLW;
          else if (i[11:8] == 4'b1000) o = I_IORLW;
          else if (i[11:8] == 4'b1001) o = I_ANDLW;
          else if (i[11:8] == 4'b1010) o = I_XORLW;
          else if (i[11:9] == 3'b110)  o = I_SUBLW;
          else if (i[11:9] == 3'b111)  o = I_ADDLW;
          else                         o = I_NOP;
        end
      endcase
    end
    return o;
  endfunction

  // The three await instructions delimit the Esterel tick.
  function automatic logic is_await(op_e o);
    return (o == I_TAWAIT) || (o == I_SAWAIT) || (o == I_CAWAIT);
  endfunction

endpackage
