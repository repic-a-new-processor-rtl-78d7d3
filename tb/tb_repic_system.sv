// tb_repic_system: end-to-end test of the RePIC microcontroller (core + program ROM + data RAM)
// at its default sizes (4096-word ROM, 128-byte RAM).
//
// The ROM holds five programs behind a jump table (after a GOTO at address 0) that reads PORTA
// and writes PCL, so each scenario picks its program through porta_in and a pulse on mclr_n:
//   0: the ATM controller (an Esterel loop with two nested weak aborts, a CAWAIT case and
//      multi-signal EMIT). The testbench plays the customer: it raises each input when the
//      matching prompt appears on signal_outA and checks which outputs were (and were not)
//      produced. Four runs: withdraw path (ends by non-preemptive termination), check-balance
//      path (CAWAIT branch), invalid card while waiting for the PIN (preemption) and invalid card
//      together with incorrect PIN (outer level wins).
//   1: the tick example: EMIT A, PRESENT S, EMIT B, TAWAIT 1, EMIT C, TAWAIT 10, EMIT D. The
//      outputs are checked instruction cycle by instruction cycle: A and B are visible together
//      until the await that ends the tick, TAWAIT 1 lasts one cycle and TAWAIT 10 ten; run with
//      S present and with S absent.
//   2: nested aborts with an internal timer: the inner abort waits for SIB4, raised by SETINTMR
//      after a checked number of cycles; then outer and inner signals arrive together and the
//      outer level must win. Then SIB5 is raised by a software write of SIGINB, tested with
//      BTFSS + GOTO (Esterel's present) and consumed by SAWAIT; SUSTAIN keeps SOB3 high.
//   3: TMR0 measures a TAWAIT 20 from software.
//   4: the same ATM written with PIC16F84 instructions only (polling loops, BSF/BCF output
//      pulses on port B, the aborts as a port-B change interrupt whose handler jumps to the
//      continuation), run on the same core: the check-balance path and an invalid card. The
//      reaction time from invalidCard to ejectCard is measured for both versions and the native
//      abort must be the faster one (5 against 11 instruction cycles in this design).
// Each mechanism is counted from the core's internal strobes; one that never happened counts
// as a failure.
module tb_repic_system;
  import repic_pkg::*;
  import repic_asm_pkg::*;

  logic clk = 0, ponrst_n = 0, mclr_n = 1;
  logic [4:0] porta_in = '0, porta_out, porta_dir;
  logic [7:0] portb_in = '0, portb_out, portb_dir;
  logic rbpu, powerdown, startclkin, clkout;
  logic [3:0] int_in = '0;
  logic [7:0] sia = '0, souta;
  logic [3:0] sib = '0, soutb;
  int checks = 0, failures = 0, cycles = 0;

  repic_system dut (.clkin(clk), .ponrst_n, .mclr_n, .porta_in, .porta_out, .porta_dir,
    .portb_in, .portb_out, .portb_dir, .rbpu, .Int(int_in), .signal_inA(sia), .signal_inB(sib),
    .signal_outA(souta), .signal_outB(soutb), .powerdown, .startclkin, .clkout);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 200000);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- observation
  // Sampled in the last clkin period of each instruction cycle: exec_pc, the outputs seen
  // during that cycle and the core's strobes.
  int icyc = 0;
  logic [7:0] seen_a = '0;          // outputs seen since the last clear
  logic [3:0] seen_b = '0;
  logic [7:0] seen_pb = '0;         // port B pulses seen since the last clear
  int lat_repic = -1, lat_pic = -1; // abort reaction, instruction cycles
  int n_emit, n_sustain, n_tick, n_stall, n_tawait, n_sawait_wait, n_cawait_branch,
      n_cawait_fall, n_ldcaddr, n_ldaaddr, n_abort, n_preempt, n_terminate, n_outer_wins,
      n_setintmr, n_timer_signal, n_present, n_sib_write, n_pcl_write;
  int take_lvl = -1;                // level of the last preemption
  int last_setintmr = 0, last_take = 0;
  logic rec = 0;                    // record the trace below
  int tr_pc[$];
  logic tr_valid[$];
  logic [7:0] tr_out[$];

  always @(negedge clk) begin
    seen_a |= souta;
    seen_b |= soutb;
    seen_pb |= portb_out & ~portb_dir;
    if (dut.u_core.exec_ce) begin
      op_e o;
      o = dut.u_core.op;
      icyc++;
      if (rec) begin
        tr_pc.push_back(int'(dut.u_core.exec_pc));
        tr_valid.push_back(dut.u_core.ir_valid);
        tr_out.push_back(souta);
      end
      if (o == I_EMIT) n_emit++;
      if (o == I_SUSTAIN) n_sustain++;
      if (dut.u_core.tick) n_tick++;
      if (dut.u_core.stall) n_stall++;
      if (o == I_TAWAIT && dut.u_core.stall) n_tawait++;
      if (o == I_SAWAIT && dut.u_core.stall) n_sawait_wait++;
      if (o == I_CAWAIT && dut.u_core.cawait_br) n_cawait_branch++;
      if (o == I_CAWAIT && !dut.u_core.stall && !dut.u_core.cawait_br) n_cawait_fall++;
      if (o == I_LDCADDR) n_ldcaddr++;
      if (o == I_LDAADDR) n_ldaaddr++;
      if (o == I_ABORT) n_abort++;
      if (o == I_SETINTMR) begin n_setintmr++; last_setintmr = icyc; end
      if (dut.u_core.abort_take) begin
        n_preempt++;
        last_take = icyc;
        take_lvl = int'(dut.u_core.u_abort.clr_lvl);
        // an outer level wins although an inner active level's signal is present too
        for (int x = 0; x < 4; x++)
          if (x > take_lvl && dut.u_core.u_abort.hit[x]) n_outer_wins++;
      end
      if (dut.u_core.u_abort.clr && !dut.u_core.abort_take) n_terminate++;
      if (o inside {I_BTFSS, I_BTFSC} && dut.u_core.is_sfr &&
          dut.u_core.addr[6:0] inside {A_SIGINA, A_SIGINB}) n_present++;
      if (dut.u_core.u_sigin.wr_sigintb) n_sib_write++;
      if (dut.u_core.wr_file && dut.u_core.is_sfr && dut.u_core.addr[6:0] == A_PCL) n_pcl_write++;
      if (dut.u_core.tmr_fire != 0) n_timer_signal++;
    end
  end

  // wait until every output in mask has been seen (since the last clear)
  task automatic wait_out(logic [7:0] mask, string what);
    int t = 0;
    while ((seen_a & mask) != mask && t < 4000) begin @(posedge clk); t++; end
    check($sformatf("%s appears (seen %h)", what, seen_a), (seen_a & mask) == mask);
  endtask
  task automatic wait_pb(logic [7:0] mask, string what);
    int t = 0;
    while ((seen_pb & mask) != mask && t < 4000) begin @(posedge clk); t++; end
    check($sformatf("PIC ATM: %s appears (seen %h)", what, seen_pb), (seen_pb & mask) == mask);
  endtask
  task automatic icycles(int n); repeat (4 * n) @(posedge clk); endtask

  // restart the core in program sel
  task automatic start(int sel);
    mclr_n = 0;
    porta_in = 5'(sel);
    repeat (6) @(posedge clk);
    @(negedge clk);
    seen_a = '0;
    seen_b = '0;
    seen_pb = '0;
    mclr_n = 1;
    repeat (40) @(posedge clk);   // the jump table has read PORTA
    porta_in = '0;
  endtask

  // ---------------------------------------------------------------- program
  int p;
  task automatic put(w15 w); dut.u_rom.mem[p] = w; p++; endtask

  // ATM signals: inputs on SIA0..SIA7, outputs on SOA0..SOA6
  localparam int CARD_INSERTED = 0, PIN_ENTERED = 1, WITHDRAW = 2, SUM_ENTERED = 3,
                 TRANSACTION_OK = 4, CHECK_BALANCE = 5, INVALID_CARD = 6, INCORRECT_PIN = 7;
  localparam logic [7:0] INSERT_CARD = 8'h01, ENTER_PIN = 8'h02, SELECT_OPTION = 8'h04,
                         PROCESS_TRANSACTION = 8'h08, RELEASE_SUM = 8'h10,
                         PRINT_RECEIPT = 8'h20, EJECT_CARD = 8'h40;
  localparam int ATM = 'h10, L1 = 'h20, L0 = 'h22;
  localparam int FIG = 'h40, PRIO = 'h60, LIN = 'h68, LIN2 = 'h6E, LOUT = 'h70, MISC = 'h90;
  // PIC-only ATM: inputs on PORTA[4:0] (cardInserted, pinEntered, withdraw, sumEntered,
  // transactionOK) and RB7 (checkBalance), aborts on the port-B change inputs Int[0]
  // (incorrectPin) and Int[1] (invalidCard), outputs as BSF/BCF pulses on RB6..RB0
  localparam int PATM = 'h100, PLOOP = 'h103, PLA = 'h105, PLB = 'h10C, PLC = 'h110,
                 PL3 = 'h115, PL4 = 'h119, PL5 = 'h120, PL6 = 'h122, PL7 = 'h126, PISR = 'h12A;

  task automatic load_program();
    for (int i = 0; i < 4096; i++) dut.u_rom.mem[i] = NOP();
    // jump table: PCL = 7 + PORTA; the interrupt vector (4) serves the PIC version of the ATM
    p = 0; put(GOTO(5));
    p = 4; put(GOTO(PISR));
    put(MOVF(PORTA, W)); put(ADDWF(PCL, F));
    put(GOTO(ATM)); put(GOTO(FIG)); put(GOTO(PRIO)); put(GOTO(MISC)); put(GOTO(PATM));
    // ATM controller
    p = ATM;
    put(EMIT(INSERT_CARD));
    put(SAWAIT(CARD_INSERTED));
    put(LDAADDR(L0)); put(ABORT(INVALID_CARD));     // outer level
    put(LDAADDR(L0)); put(ABORT(INCORRECT_PIN));    // inner level
    put(EMIT(ENTER_PIN));
    put(SAWAIT(PIN_ENTERED));
    put(EMIT(SELECT_OPTION));
    put(LDCADDR(L1));
    put(CAWAIT(WITHDRAW, CHECK_BALANCE));
    put(SAWAIT(SUM_ENTERED));
    put(EMIT(PROCESS_TRANSACTION));
    put(SAWAIT(TRANSACTION_OK));
    put(EMIT(RELEASE_SUM | PRINT_RECEIPT));
    put(GOTO(L0));
    if (p != L1) $display("ATM layout error");
    put(EMIT(PROCESS_TRANSACTION));
    put(SAWAIT(TRANSACTION_OK));
    put(EMIT(PRINT_RECEIPT));                        // L0
    put(EMIT(EJECT_CARD));
    put(GOTO(ATM));
    // tick example, S = SIA0; A, B, C, D = SOA0..SOA3
    p = FIG;
    put(EMIT(1)); put(BTFSC(SIGINA, 0)); put(EMIT(2)); put(TAWAIT(1)); put(EMIT(4));
    put(TAWAIT(10)); put(EMIT(8)); put(SAWAIT(15)); put(GOTO(FIG + 7));
    // nested aborts, internal timer, SIGINB write, present, sustain
    p = PRIO;
    put(SUSTAIN(12'h800));
    put(LDAADDR(LOUT)); put(ABORT(6));               // level 0 on SIA6
    put(LDAADDR(LIN));  put(ABORT(12));              // level 1 on SIB4 (timer 0)
    put(SETINTMR(0, 5));
    put(SAWAIT(1)); put(GOTO(PRIO + 7));
    if (p != LIN) $display("PRIO layout error");
    put(EMIT(8'h02));
    put(LDAADDR(LIN2)); put(ABORT(5));               // level 1 again, on SIA5
    put(EMIT(8'h01));
    put(SAWAIT(1)); put(GOTO(LIN + 5));
    put(EMIT(8'h08)); put(GOTO(LIN2 + 1));           // LIN2: must not be reached
    put(EMIT(8'h04));                                // LOUT
    put(MOVLW(8'h20)); put(MOVWF(SIGINB));           // raise SIB5 by software
    put(BTFSS(SIGINB, 5)); put(GOTO(LOUT + 6)); put(EMIT(8'h10));
    put(SAWAIT(13));                                 // SIB5 still present: one cycle
    put(EMIT(8'h20));
    put(SAWAIT(13));                                 // SIB5 gone with the tick: waits
    put(EMIT(8'h40)); put(GOTO(LOUT + 10));
    // TMR0 measures TAWAIT 20 (OPTION = 0x08: TMR0 on the instruction clock, no prescaler)
    p = MISC;
    put(MOVLW(8'h08)); put(15'h0062); put(CLRF(TMR0)); put(TAWAIT(20)); put(MOVF(TMR0, W));
    put(MOVWF(8'h20)); put(EMIT(8'h80)); put(SAWAIT(15)); put(GOTO(MISC + 7));
    // ATM with the PIC16F84 instructions only: polling loops, pulses, interrupt-on-change
    p = PATM;
    put(MOVLW(8'h80)); put(15'h0066 /* TRIS PORTB */); put(BSF(INTCON, 3));
    put(BSF(PORTB, 0)); put(BCF(PORTB, 0));                               // PLOOP: insertCard
    put(BTFSS(PORTA, 0)); put(GOTO(PLA));                                 // PLA
    put(MOVF(PORTB, W)); put(BCF(INTCON, 0)); put(BSF(INTCON, 7));        // arm the aborts
    put(BSF(PORTB, 1)); put(BCF(PORTB, 1));                               // enterPin
    put(BTFSS(PORTA, 1)); put(GOTO(PLB));                                 // PLB
    put(BSF(PORTB, 2)); put(BCF(PORTB, 2));                               // selectOption
    put(BTFSC(PORTA, 2)); put(GOTO(PL3)); put(BTFSC(PORTB, 7)); put(GOTO(PL5)); put(GOTO(PLC));
    put(BTFSS(PORTA, 3)); put(GOTO(PL3));                                 // PL3
    put(BSF(PORTB, 3)); put(BCF(PORTB, 3));                               // processTransaction
    put(BTFSS(PORTA, 4)); put(GOTO(PL4));                                 // PL4
    put(BSF(PORTB, 4)); put(BCF(PORTB, 4)); put(BSF(PORTB, 5)); put(BCF(PORTB, 5));
    put(GOTO(PL7));
    put(BSF(PORTB, 3)); put(BCF(PORTB, 3));                               // PL5
    put(BTFSS(PORTA, 4)); put(GOTO(PL6));                                 // PL6
    put(BSF(PORTB, 5)); put(BCF(PORTB, 5));
    put(BCF(INTCON, 7)); put(BSF(PORTB, 6)); put(BCF(PORTB, 6)); put(GOTO(PLOOP)); // PL7
    put(MOVF(PORTB, W)); put(BCF(INTCON, 0)); put(GOTO(PL7));             // PISR
    if (p != PISR + 3) $display("PIC ATM layout error p=%h", p);
  endtask

  // ---------------------------------------------------------------- scenarios
  task automatic atm_enter_card_and_pin();
    wait_out(INSERT_CARD, "insertCard");
    check("ATM waits for the card", (seen_a & ENTER_PIN) == 0);
    sia[CARD_INSERTED] = 1;
    wait_out(ENTER_PIN, "enterPin");
    sia[CARD_INSERTED] = 0;
  endtask

  task automatic atm_withdraw();
    start(0);
    atm_enter_card_and_pin();
    sia[PIN_ENTERED] = 1;
    wait_out(SELECT_OPTION, "selectOption");
    sia[PIN_ENTERED] = 0;
    sia[WITHDRAW] = 1;
    icycles(10);
    sia[WITHDRAW] = 0;
    check("no transaction before sumEntered", (seen_a & PROCESS_TRANSACTION) == 0);
    sia[SUM_ENTERED] = 1;
    wait_out(PROCESS_TRANSACTION, "processTransaction");
    sia[SUM_ENTERED] = 0;
    icycles(5);
    check("no releaseSum before transactionOK", (seen_a & RELEASE_SUM) == 0);
    sia[TRANSACTION_OK] = 1;
    wait_out(RELEASE_SUM | PRINT_RECEIPT | EJECT_CARD, "releaseSum, printReceipt, ejectCard");
    sia[TRANSACTION_OK] = 0;
    seen_a = '0;
    wait_out(INSERT_CARD, "insertCard again");
    check("both abort levels ended at L0", dut.u_core.u_abort.af == 4'b0000);
    check("abort levels free after termination", dut.u_core.u_abort.prn == 2'd0);
  endtask

  task automatic atm_check_balance();
    start(0);
    atm_enter_card_and_pin();
    sia[PIN_ENTERED] = 1;
    wait_out(SELECT_OPTION, "selectOption");
    sia[PIN_ENTERED] = 0;
    sia[CHECK_BALANCE] = 1;
    wait_out(PROCESS_TRANSACTION, "processTransaction (check balance)");
    sia[CHECK_BALANCE] = 0;
    sia[TRANSACTION_OK] = 1;
    wait_out(PRINT_RECEIPT | EJECT_CARD, "printReceipt, ejectCard");
    sia[TRANSACTION_OK] = 0;
    check("check balance releases no money", (seen_a & RELEASE_SUM) == 0);
  endtask

  task automatic atm_abort(logic both);
    int t0;
    start(0);
    atm_enter_card_and_pin();
    icycles(5);
    check("two abort levels active", dut.u_core.u_abort.af == 4'b0011);
    seen_a = '0;
    take_lvl = -1;
    sia[INVALID_CARD] = 1;
    if (both) sia[INCORRECT_PIN] = 1;
    t0 = icyc;
    wait_out(PRINT_RECEIPT | EJECT_CARD, "printReceipt, ejectCard after abort");
    if (!both) lat_repic = icyc - t0;
    sia[INVALID_CARD] = 0;
    sia[INCORRECT_PIN] = 0;
    check("aborted before selectOption", (seen_a & SELECT_OPTION) == 0);
    check($sformatf("outer level taken (got %0d)", take_lvl), take_lvl == 0);
    check("all abort levels cleared", dut.u_core.u_abort.af == 4'b0000);
  endtask

  // the tick example; returns after the EMIT D cycle was recorded
  task automatic tick_example(logic s_present);
    int i0, k, n1, n10;
    sia[0] = s_present;
    tr_pc.delete(); tr_valid.delete(); tr_out.delete();
    rec = 1;
    start(1);
    icycles(30);
    rec = 0;
    sia[0] = 0;
    i0 = -1;
    foreach (tr_pc[i]) if (i0 < 0 && tr_valid[i] && tr_pc[i] == FIG) i0 = i;
    check("tick example started", i0 >= 0);
    if (i0 < 0) return;
    // cycle by cycle from EMIT A: output register contents during each cycle
    k = i0;
    check("during PRESENT: A", tr_out[k + 1] == 8'h01);
    check("during the next cycle: A", tr_out[k + 2] == 8'h01);
    if (s_present) begin
      check($sformatf("TAWAIT 1 starts after EMIT B (pc %h)", tr_pc[k + 3]), tr_pc[k + 3] == FIG + 3);
      check($sformatf("A and B together in the await cycle (%h)", tr_out[k + 3]), tr_out[k + 3] == 8'h03);
      k = k + 3;
    end else begin
      // BTFSC skips EMIT B, which leaves a bubble cycle
      check("skipped EMIT B", !tr_valid[k + 2] && tr_pc[k + 3] == FIG + 3);
      check($sformatf("only A in the await cycle (%h)", tr_out[k + 3]), tr_out[k + 3] == 8'h01);
      k = k + 3;
    end
    n1 = 0; while (tr_pc[k] == FIG + 3) begin n1++; k++; end
    check($sformatf("TAWAIT 1 lasts 1 cycle (got %0d)", n1), n1 == 1);
    check("A and B cleared by the tick", tr_out[k] == 8'h00 && tr_pc[k] == FIG + 4);
    k++;
    check($sformatf("C alone in tick 2 (%h)", tr_out[k]), tr_out[k] == 8'h04);
    n10 = 0; while (tr_pc[k] == FIG + 5) begin n10++; k++; end
    check($sformatf("TAWAIT 10 lasts 10 cycles (got %0d)", n10), n10 == 10);
    check("EMIT D after the delay", tr_pc[k] == FIG + 6 && tr_out[k + 1] == 8'h08);
  endtask

  task automatic nested_aborts();
    start(2);
    wait_out(8'h02, "inner abort on the timer signal SIB4");
    check($sformatf("timer signal preempts 7 cycles after SETINTMR 0,5 (got %0d)",
                    last_take - last_setintmr), last_take - last_setintmr == 7);
    check("inner level taken", take_lvl == 1);
    check("SOB3 sustained", soutb == 4'b1000);
    wait_out(8'h01, "re-armed inner level");
    icycles(3);
    check("outer + new inner level active", dut.u_core.u_abort.af == 4'b0011 &&
          dut.u_core.u_abort.prn == 2'd2);
    seen_a = '0;
    sia[5] = 1; sia[6] = 1;
    wait_out(8'h04, "outer continuation");
    sia[5] = 0; sia[6] = 0;
    check("inner continuation not taken", (seen_a & 8'h08) == 0);
    check("outer level taken over the inner", take_lvl == 0);
    wait_out(8'h30, "present SIB5 and SAWAIT SIB5 at once");
    icycles(10);
    check("SIB5 cleared with the tick: SAWAIT waits", (seen_a & 8'h40) == 0 &&
          dut.u_core.stall);
    check("SOB3 still sustained across ticks", soutb == 4'b1000);
  endtask

  // the same ATM dialogue on the PIC-only program
  task automatic pic_atm(logic abort);
    int t0;
    start(4);
    wait_pb(8'h01, "insertCard");
    porta_in[0] = 1;
    wait_pb(8'h02, "enterPin");
    porta_in[0] = 0;
    icycles(5);
    if (abort) begin
      seen_pb = '0;
      int_in[1] = 1;                 // invalidCard
      t0 = icyc;
      wait_pb(8'h40, "ejectCard after invalidCard");
      lat_pic = icyc - t0;
      check("PIC ATM aborted before selectOption", (seen_pb & 8'h04) == 0);
      int_in[1] = 0;
      return;
    end
    porta_in[1] = 1;
    wait_pb(8'h04, "selectOption");
    porta_in[1] = 0;
    portb_in[7] = 1;                 // checkBalance
    wait_pb(8'h08, "processTransaction");
    portb_in[7] = 0;
    porta_in[4] = 1;
    wait_pb(8'h60, "printReceipt, ejectCard");
    porta_in[4] = 0;
    check("PIC ATM: check balance releases no money", (seen_pb & 8'h10) == 0);
  endtask

  task automatic tawait_by_tmr0();
    start(3);
    wait_out(8'h80, "TMR0 measurement done");
    check($sformatf("TMR0 counts 20 cycles over TAWAIT 20 (got %0d)", dut.u_ram.mem[8'h20]),
          dut.u_ram.mem[8'h20] == 8'd20);
  endtask

  initial begin
    load_program();
    repeat (3) @(posedge clk);
    ponrst_n = 1;
    atm_withdraw();
    atm_check_balance();
    atm_abort(1'b0);
    atm_abort(1'b1);
    tick_example(1'b1);
    tick_example(1'b0);
    nested_aborts();
    tawait_by_tmr0();
    pic_atm(1'b0);
    pic_atm(1'b1);
    // a native abort reacts faster than the interrupt-based one
    check($sformatf("abort reaction RePIC %0d < PIC %0d instruction cycles", lat_repic, lat_pic),
          lat_repic > 0 && lat_pic > lat_repic);
    // every mechanism must have happened
    check($sformatf("EMIT x%0d", n_emit), n_emit > 0);
    check($sformatf("SUSTAIN x%0d", n_sustain), n_sustain > 0);
    check($sformatf("tick x%0d", n_tick), n_tick > 0);
    check($sformatf("pipeline stall x%0d", n_stall), n_stall > 0);
    check($sformatf("TAWAIT delay x%0d", n_tawait), n_tawait > 0);
    check($sformatf("SAWAIT waiting x%0d", n_sawait_wait), n_sawait_wait > 0);
    check($sformatf("CAWAIT branch x%0d", n_cawait_branch), n_cawait_branch > 0);
    check($sformatf("CAWAIT fall-through x%0d", n_cawait_fall), n_cawait_fall > 0);
    check($sformatf("LDCADDR x%0d", n_ldcaddr), n_ldcaddr > 0);
    check($sformatf("LDAADDR x%0d", n_ldaaddr), n_ldaaddr > 0);
    check($sformatf("ABORT x%0d", n_abort), n_abort > 0);
    check($sformatf("preemption x%0d", n_preempt), n_preempt > 0);
    check($sformatf("non-preemptive termination x%0d", n_terminate), n_terminate > 0);
    check($sformatf("outer level wins x%0d", n_outer_wins), n_outer_wins > 0);
    check($sformatf("SETINTMR x%0d", n_setintmr), n_setintmr > 0);
    check($sformatf("internal timer signal x%0d", n_timer_signal), n_timer_signal > 0);
    check($sformatf("present test x%0d", n_present), n_present > 0);
    check($sformatf("SIGINB write x%0d", n_sib_write), n_sib_write > 0);
    check($sformatf("PCL write x%0d", n_pcl_write), n_pcl_write > 0);
    $display("mechanisms: emit=%0d sustain=%0d tick=%0d stall=%0d tawait=%0d sawait=%0d cawait_br=%0d cawait_fall=%0d preempt=%0d terminate=%0d outer_wins=%0d timer=%0d present=%0d",
             n_emit, n_sustain, n_tick, n_stall, n_tawait, n_sawait_wait, n_cawait_branch,
             n_cawait_fall, n_preempt, n_terminate, n_outer_wins, n_timer_signal, n_present);
    $display("abort reaction (input to ejectCard): RePIC %0d, PIC %0d instruction cycles",
             lat_repic, lat_pic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
