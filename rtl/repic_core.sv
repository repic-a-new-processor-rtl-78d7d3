// repic_core: the RePIC reactive microcontroller core, a PIC16F84-compatible processor whose
// 15-bit instruction set adds direct support for Esterel's pure signals, ticks, waits and
// nested preemption.
//
// Datapath and timing. An instruction cycle is four clkin periods (phases Q1..Q4, counter q).
// The core is pipelined in two stages: while the instruction in ir executes, the word at pc is
// fetched from the program ROM (progadr = pc for the whole cycle, synchronous ROM). In Q2 the
// core asks the data RAM for the operand (readram), at the end of Q3 the operand (from RAM or
// from a special-function register) is latched, and in Q4 the ALU result is written back
// (writeram for RAM) while every architectural register updates at the end of Q4 (strobe ce).
// Every instruction takes one instruction cycle; one that changes the flow (GOTO, CALL, RETURN,
// RETLW, RETFIE, a taken skip, a write to PCL, a taken CAWAIT branch, an abort or an interrupt)
// discards the prefetched word and so costs a second cycle, as on the PIC16F84.
// Reactive extension (bit 14 = 1, see repic_pkg):
//  * EMIT / SUSTAIN drive sig_output; SIGOUT is cleared at every tick boundary.
//  * TAWAIT / SAWAIT / CAWAIT go to await_unit, which stalls the pipeline (pc and ir held)
//    until the delay has passed or the polled signal is present; the first cycle of each await
//    is the tick boundary. LDCADDR loads the CAWAIT branch address.
//  * LDAADDR / ABORT arm one of four nested abort levels in abort_handler. A present abort
//    signal redirects the program, after the current instruction, to {PCLATH[4:3], AADDRx}.
//  * SETINTMR loads one of the four internal timers whose overflows raise SIB4..SIB7.
//  * SIGINA / SIGINB are file registers 0x07 / 0x08 (both banks), so the PIC's BTFSS + GOTO
//    pair implements Esterel's present test.
// The PIC16F84 part follows that processor's instruction set, file map (INDF, TMR0/OPTION,
// PCL, STATUS, FSR, PORTA/TRISA, PORTB/TRISB, PCLATH, INTCON), 8-level stack, TMR0 with
// prescaler, RB0/INT edge and port-B change interrupts (vector 0x004) and SLEEP. Not modelled:
// the watchdog timer and data EEPROM (registers 0x09 reads as 0). An interrupt or abort that
// arrives during a stalled await cancels the wait; the interrupt returns to the await, which
// then starts again. Interrupts are only taken when no abort is taken in the same cycle.
// Reset (ponrst_n or mclr_n low) is asynchronous.
// The INTMRx and INTMRCOND registers are used only by SETINTMR and have no file address, as the
// description states; their values, and the abort state (AF, PRN, JASR), come out of the
// reactive units but are left unconnected here. They stay visible for debugging in simulation.
module repic_core
  import repic_pkg::*;
(
  input  logic        clkin,
  input  logic        ponrst_n,
  input  logic        mclr_n,
  // program ROM
  output logic [12:0] progadr,
  input  logic [14:0] progdata,
  // data RAM
  output logic [8:0]  ramadr,
  output logic        readram,
  output logic        writeram,
  output logic [7:0]  ramtout,
  input  logic [7:0]  ramdtin,
  // PIC ports
  input  logic [4:0]  porta_in,
  output logic [4:0]  porta_out,
  output logic [4:0]  porta_dir,   // TRISA, 1 = input
  input  logic [7:0]  portb_in,
  output logic [7:0]  portb_out,
  output logic [7:0]  portb_dir,   // TRISB, 1 = input
  output logic        rbpu,        // port-B weak pull-up enable (OPTION.RBPU inverted)
  input  logic [3:0]  int_in,      // port-B change interrupt inputs
  // reactive signal ports
  input  logic [7:0]  signal_ina,
  input  logic [3:0]  signal_inb,
  output logic [7:0]  signal_outa,
  output logic [3:0]  signal_outb,
  // clock / power status
  output logic        powerdown,
  output logic        startclkin,
  output logic        clkout
);
  // ---------------------------------------------------------------- state
  logic        rst_n;
  logic [1:0]  q;
  logic        ce;
  pc_t         pc, exec_pc;
  instr_t      ir;
  logic        ir_valid;
  logic [7:0]  w, status, fsr, intcon, option_r, tmr0;
  logic [4:0]  pclath;
  logic [4:0]  trisa, porta_lat;
  logic [7:0]  trisb, portb_lat;
  logic [7:0]  fdata;         // operand latched at the end of Q3
  logic [7:0]  prescaler;
  logic        sleeping;
  logic        rb0_last, ra4_last;
  logic [3:0]  int_latch;

  assign rst_n = ponrst_n & mclr_n;

  // ---------------------------------------------------------------- decode
  op_e        op;
  logic [6:0] f;
  logic       d;
  logic [2:0] bitn;
  logic [7:0] k8;
  logic [10:0] k11;

  assign op   = ir_valid ? decode(ir) : I_NOP;
  assign f    = ir[6:0];
  assign d    = ir[7];
  assign bitn = ir[9:7];
  assign k8   = ir[7:0];
  assign k11  = ir[10:0];

  // operand address: INDF goes through FSR (with IRP), the rest through RP1:RP0
  logic       indirect;
  logic [8:0] addr;
  logic       is_sfr, is_gpr;
  assign indirect = (f == A_INDF);
  assign addr     = indirect ? {status[7], fsr} : {status[6:5], f};
  assign is_sfr   = (addr[6:0] < A_GPR_LO);
  assign is_gpr   = !is_sfr;

  logic uses_file, writes_file;
  always_comb begin
    uses_file = op inside {I_MOVWF, I_CLRF, I_SUBWF, I_DECF, I_IORWF, I_ANDWF, I_XORWF,
                           I_ADDWF, I_MOVF, I_COMF, I_INCF, I_DECFSZ, I_RRF, I_RLF, I_SWAPF,
                           I_INCFSZ, I_BCF, I_BSF, I_BTFSC, I_BTFSS};
    writes_file = (op inside {I_MOVWF, I_CLRF, I_BCF, I_BSF}) ||
                  ((op inside {I_SUBWF, I_DECF, I_IORWF, I_ANDWF, I_XORWF, I_ADDWF, I_MOVF,
                               I_COMF, I_INCF, I_DECFSZ, I_RRF, I_RLF, I_SWAPF, I_INCFSZ}) && d);
  end

  // ---------------------------------------------------------------- reactive units
  logic [7:0]  sigina, siginb;
  logic [15:0] sir;
  logic        stall, tick, cawait_br;
  logic [10:0] caddr;
  logic        abort_take;
  logic [10:0] abort_target;
  logic [3:0]  af;
  logic [1:0]  prn;
  logic [15:0] jasr;
  logic [3:0]  tmr_fire;
  logic [7:0]  intmrcond;
  logic [7:0]  intmr [4];
  logic        cancel_wait;
  logic        exec_ce;     // an instruction completes its cycle (not asleep)
  logic        wr_file;     // file write at the end of this cycle
  logic [7:0]  alu_y;       // ALU result

  assign sir = {siginb, sigina};

  await_unit u_await (
    .clk(clkin), .rst_n, .ce(exec_ce), .op, .ir, .sir, .cancel(cancel_wait),
    .stall, .tick, .cawait_branch(cawait_br), .caddr
  );

  abort_handler u_abort (
    .clk(clkin), .rst_n, .ce(exec_ce), .op, .ir, .exec_valid(ir_valid),
    .exec_pc(exec_pc[10:0]), .sir, .take(abort_take), .target(abort_target),
    .af, .prn, .jasr
  );

  internal_timers u_timers (
    .clk(clkin), .rst_n, .ce(exec_ce), .set(op == I_SETINTMR), .tmr_id(ir[9:8]),
    .tmr_val(ir[7:0]), .fire(tmr_fire), .intmrcond, .intmr
  );

  sig_input u_sigin (
    .clk(clkin), .rst_n, .ce(exec_ce), .signal_ina, .signal_inb, .fire(tmr_fire), .tick,
    .wr_sigintb(wr_file && is_sfr && addr[6:0] == A_SIGINB), .wdata(alu_y[7:4]),
    .sigina, .siginb
  );

  sig_output u_sigout (
    .clk(clkin), .rst_n, .ce(exec_ce), .emit(op == I_EMIT), .sustain(op == I_SUSTAIN),
    .tick, .field(ir[11:0]), .signal_outa, .signal_outb
  );

  // ---------------------------------------------------------------- SFR read
  logic [7:0] sfr_rd;
  always_comb begin
    sfr_rd = '0;
    unique case (addr[6:0])
      A_INDF:   sfr_rd = '0;                      // INDF through INDF reads 0
      A_TMR0:   sfr_rd = addr[7] ? option_r : tmr0;
      A_PCL:    sfr_rd = 8'(exec_pc + 13'd1);
      A_STATUS: sfr_rd = status;
      A_FSR:    sfr_rd = fsr;
      A_PORTA:  sfr_rd = addr[7] ? {3'b000, trisa} : {3'b000, porta_in};
      A_PORTB:  sfr_rd = addr[7] ? trisb : portb_in;
      A_SIGINA: sfr_rd = sigina;
      A_SIGINB: sfr_rd = siginb;
      A_PCLATH: sfr_rd = {3'b000, pclath};
      A_INTCON: sfr_rd = intcon;
      default:  sfr_rd = '0;
    endcase
  end

  // ---------------------------------------------------------------- ALU
  alu_op_e    alu_op;
  logic [7:0] alu_b;
  logic       alu_c, alu_dc, alu_z;
  logic       lit_op;

  assign lit_op = op inside {I_MOVLW, I_RETLW, I_IORLW, I_ANDLW, I_XORLW, I_SUBLW, I_ADDLW};
  assign alu_b  = lit_op ? k8 : fdata;

  always_comb begin
    unique case (op)
      I_ADDWF, I_ADDLW: alu_op = ALU_ADD;
      I_SUBWF, I_SUBLW: alu_op = ALU_SUB;
      I_ANDWF, I_ANDLW: alu_op = ALU_AND;
      I_IORWF, I_IORLW: alu_op = ALU_IOR;
      I_XORWF, I_XORLW: alu_op = ALU_XOR;
      I_MOVWF:          alu_op = ALU_PASSA;
      I_COMF:           alu_op = ALU_COMB;
      I_INCF, I_INCFSZ: alu_op = ALU_INCB;
      I_DECF, I_DECFSZ: alu_op = ALU_DECB;
      I_RRF:            alu_op = ALU_RRF;
      I_RLF:            alu_op = ALU_RLF;
      I_SWAPF:          alu_op = ALU_SWAP;
      I_CLRF, I_CLRW:   alu_op = ALU_ZERO;
      I_BCF:            alu_op = ALU_BCLR;
      I_BSF:            alu_op = ALU_BSET;
      default:          alu_op = ALU_PASSB;       // MOVF, MOVLW, RETLW, bit tests
    endcase
  end

  pic_alu u_alu (
    .op(alu_op), .a(w), .b(alu_b), .cin(status[ST_C]), .bitsel(bitn),
    .y(alu_y), .c(alu_c), .dc(alu_dc), .z(alu_z)
  );

  // ---------------------------------------------------------------- stack
  logic push, pop;
  pc_t  push_val, stack_top;
  pic_stack #(.DEPTH(8), .W(PCW)) u_stack (
    .clk(clkin), .rst_n, .push, .pop, .din(push_val), .top(stack_top)
  );

  // ---------------------------------------------------------------- flow control
  logic skip, redirect, int_pending, int_take, wake;
  pc_t  target, resume;

  always_comb begin
    skip = 1'b0;
    unique case (op)
      I_DECFSZ, I_INCFSZ: skip = alu_z;
      I_BTFSC:            skip = !fdata[bitn];
      I_BTFSS:            skip = fdata[bitn];
      default: ;
    endcase
  end

  assign int_pending = (intcon[IC_T0IE] & intcon[IC_T0IF]) | (intcon[IC_INTE] & intcon[IC_INTF]) |
                       (intcon[IC_RBIE] & intcon[IC_RBIF]);

  always_comb begin
    redirect = 1'b1;
    target   = pc;
    if (op == I_GOTO || op == I_CALL)               target = {pclath[4:3], k11};
    else if (op inside {I_RETURN, I_RETLW, I_RETFIE}) target = stack_top;
    else if (op == I_CAWAIT && cawait_br)           target = {pclath[4:3], caddr};
    else if (skip)                                  target = pc + 13'd1;
    else if (wr_file && is_sfr && addr[6:0] == A_PCL) target = {pclath, alu_y};
    else                                            redirect = 1'b0;
  end

  // where the program would continue after this cycle if nothing intervened
  assign resume   = stall ? exec_pc : (redirect ? target : pc);
  // not beside a stack operation of the instruction itself: taken one cycle later instead
  assign int_take = !abort_take && intcon[IC_GIE] && int_pending &&
                    !(op inside {I_CALL, I_RETURN, I_RETLW, I_RETFIE});
  assign wake     = int_pending;

  assign exec_ce     = ce && !sleeping;
  assign cancel_wait = abort_take || int_take;
  assign wr_file     = writes_file;

  assign push     = exec_ce && (int_take || op == I_CALL);
  assign push_val = int_take ? resume : exec_pc + 13'd1;
  assign pop      = exec_ce && (op inside {I_RETURN, I_RETLW, I_RETFIE});

  // ---------------------------------------------------------------- data RAM port
  assign ramadr   = addr;
  assign readram  = (q == 2'd1) && uses_file && is_gpr && !sleeping;
  assign writeram = (q == 2'd3) && wr_file && is_gpr && !sleeping;
  assign ramtout  = alu_y;

  // ---------------------------------------------------------------- phase counter, clocks
  assign ce         = (q == 2'd3);
  assign clkout     = !sleeping && !q[1];
  assign powerdown  = sleeping;
  assign startclkin = sleeping && wake;
  assign rbpu       = !option_r[7];
  assign progadr    = pc;
  assign porta_out  = porta_lat;
  assign porta_dir  = trisa;
  assign portb_out  = portb_lat;
  assign portb_dir  = trisb;

  always_ff @(posedge clkin or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q + 2'd1;
  end

  // operand latch at the end of Q3
  always_ff @(posedge clkin or negedge rst_n) begin
    if (!rst_n) fdata <= '0;
    else if (q == 2'd2) fdata <= is_sfr ? sfr_rd : ramdtin;
  end

  // ---------------------------------------------------------------- TMR0 increment
  logic       t0_inc;
  logic [7:0] ps_mask;
  logic       ra4_edge;
  assign ps_mask  = 8'((9'd2 << option_r[2:0]) - 9'd1);
  assign ra4_edge = option_r[4] ? (ra4_last && !porta_in[4]) : (!ra4_last && porta_in[4]);
  always_comb begin
    logic src;
    src = option_r[5] ? ra4_edge : 1'b1;   // T0CS: RA4 edge or instruction clock
    if (option_r[3]) t0_inc = src;          // PSA = 1: prescaler not assigned to TMR0
    else             t0_inc = src && ((prescaler & ps_mask) == ps_mask);
  end

  // ---------------------------------------------------------------- architectural update
  logic wr_sfr;
  assign wr_sfr = wr_file && is_sfr;

  always_ff @(posedge clkin or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      exec_pc   <= '0;
      ir        <= '0;
      ir_valid  <= 1'b0;
      w         <= '0;
      status    <= 8'h18;
      fsr       <= '0;
      pclath    <= '0;
      intcon    <= '0;
      option_r  <= 8'hFF;
      tmr0      <= '0;
      prescaler <= '0;
      trisa     <= 5'h1F;
      trisb     <= 8'hFF;
      porta_lat <= '0;
      portb_lat <= '0;
      sleeping  <= 1'b0;
      rb0_last  <= 1'b0;
      ra4_last  <= 1'b0;
      int_latch <= '0;
    end else if (ce) begin
      // interrupt sources are watched also during sleep
      rb0_last <= portb_in[0];
      if (option_r[6] ? (!rb0_last && portb_in[0]) : (rb0_last && !portb_in[0]))
        intcon[IC_INTF] <= 1'b1;
      if (int_in != int_latch) intcon[IC_RBIF] <= 1'b1;

      if (sleeping) begin
        if (wake) sleeping <= 1'b0;
      end else begin
        // ---- TMR0
        ra4_last <= porta_in[4];
        if (t0_inc) begin
          tmr0 <= tmr0 + 8'd1;
          if (tmr0 == 8'hFF) intcon[IC_T0IF] <= 1'b1;
        end
        if (!option_r[3] && (option_r[5] ? ra4_edge : 1'b1)) prescaler <= prescaler + 8'd1;

        // ---- register writes of the instruction
        if (!stall) begin
          if (uses_file && addr[6:0] == A_PORTB && !addr[7]) int_latch <= int_in;
          if (op inside {I_MOVLW, I_RETLW, I_IORLW, I_ANDLW, I_XORLW, I_SUBLW, I_ADDLW, I_CLRW})
            w <= alu_y;
          else if (uses_file && !writes_file && !(op inside {I_BTFSC, I_BTFSS}))
            w <= alu_y;                          // byte operation with d = 0
          if (op == I_OPTION) option_r <= w;
          if (op == I_TRIS) begin
            if (ir[2:0] == 3'd5) trisa <= w[4:0];
            if (ir[2:0] == 3'd6) trisb <= w;
          end

          if (wr_sfr) begin
            unique case (addr[6:0])
              A_TMR0: if (addr[7]) option_r <= alu_y;
                      else begin tmr0 <= alu_y; prescaler <= '0; end
              A_STATUS: status <= {alu_y[7:5], status[4:3], alu_y[2:0]};
              A_FSR:    fsr <= alu_y;
              A_PORTA:  if (addr[7]) trisa <= alu_y[4:0]; else porta_lat <= alu_y[4:0];
              A_PORTB:  if (addr[7]) trisb <= alu_y;      else portb_lat <= alu_y;
              A_PCLATH: pclath <= alu_y[4:0];
              A_INTCON: intcon <= alu_y;
              default: ;
            endcase
          end

          // flags (take precedence over a write of STATUS)
          unique case (op)
            I_ADDWF, I_ADDLW, I_SUBWF, I_SUBLW: begin
              status[ST_C]  <= alu_c;
              status[ST_DC] <= alu_dc;
              status[ST_Z]  <= alu_z;
            end
            I_ANDWF, I_ANDLW, I_IORWF, I_IORLW, I_XORWF, I_XORLW, I_CLRF, I_CLRW, I_COMF,
            I_DECF, I_INCF, I_MOVF:
              status[ST_Z] <= alu_z;
            I_RRF, I_RLF:
              status[ST_C] <= alu_c;
            I_SLEEP: begin
              status[ST_PD] <= 1'b0;
              status[ST_TO] <= 1'b1;
            end
            I_CLRWDT: begin
              status[ST_PD] <= 1'b1;
              status[ST_TO] <= 1'b1;
            end
            default: ;
          endcase
          if (op == I_RETFIE) intcon[IC_GIE] <= 1'b1;
          if (op == I_SLEEP)  sleeping <= 1'b1;
        end

        // ---- program flow
        if (abort_take) begin
          pc       <= {pclath[4:3], abort_target};
          ir       <= '0;
          ir_valid <= 1'b0;
        end else if (int_take) begin
          intcon[IC_GIE] <= 1'b0;
          pc       <= 13'h004;
          ir       <= '0;
          ir_valid <= 1'b0;
        end else if (stall) begin
          // hold pc and ir: the await instruction executes again next cycle
        end else if (redirect) begin
          pc       <= target;
          ir       <= '0;
          ir_valid <= 1'b0;
        end else begin
          ir       <= progdata;
          ir_valid <= 1'b1;
          exec_pc  <= pc;
          pc       <= pc + 13'd1;
        end
      end
    end
  end
endmodule
