// tb_repic_core: runs a PIC16F84 instruction-set program on the core (with program ROM and
// data RAM) and checks the results it leaves in the file registers and ports: arithmetic and
// flags, loops with DECFSZ, indirect addressing, CALL/RETLW, rotates, bit tests and skips,
// bank switching, TMR0 overflow interrupt, RB0/INT wake-up from SLEEP and the port-B change
// interrupt. The program measures its own timing with TMR0: three one-cycle instructions and
// a GOTO must take 5 instruction cycles; the testbench checks that clkout has a period of four
// clkin cycles.
module tb_repic_core;
  import repic_asm_pkg::*;
  logic clk = 0, ponrst_n = 0, mclr_n = 1;
  logic [12:0] progadr;
  logic [14:0] progdata;
  logic [8:0] ramadr;
  logic readram, writeram;
  logic [7:0] ramtout, ramdtin;
  logic [4:0] porta_in = '0, porta_out, porta_dir;
  logic [7:0] portb_in = '0, portb_out, portb_dir;
  logic rbpu, powerdown, startclkin, clkout;
  logic [3:0] int_in = '0;
  logic [7:0] sina = '0, souta;
  logic [3:0] sinb = '0, soutb;
  int checks = 0, failures = 0, cycles = 0;

  repic_core dut (.clkin(clk), .ponrst_n, .mclr_n, .progadr, .progdata, .ramadr, .readram,
    .writeram, .ramtout, .ramdtin, .porta_in, .porta_out, .porta_dir, .portb_in, .portb_out,
    .portb_dir, .rbpu, .int_in, .signal_ina(sina), .signal_inb(sinb), .signal_outa(souta),
    .signal_outb(soutb), .powerdown, .startclkin, .clkout);
  prog_rom #(.DEPTH(4096)) u_rom (.clk, .addr(progadr), .data(progdata));
  data_ram #(.DEPTH(128)) u_ram (.clk, .ramadr, .readram, .writeram, .ramtout, .ramdtin);

  always #5 clk = ~clk;
  // optional instruction trace: run the simulation with +trace
  always @(posedge clk)
    if ($test$plusargs("trace") && dut.ce && !dut.sleeping)
      $display("%0d pc=%0d v=%b ir=%h W=%h st=%h intcon=%h tmr0=%h", cycles, dut.exec_pc,
               dut.ir_valid, dut.ir, dut.w, dut.status, dut.intcon, dut.tmr0);
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 40000);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic ram_is(int a, int v);
    check($sformatf("RAM[%h] = %h (got %h)", a, v, u_ram.mem[a]), u_ram.mem[a] == 8'(v));
  endtask

  int p;
  task automatic put(w15 w); u_rom.mem[p] = w; p++; endtask

  initial begin
    for (int i = 0; i < 4096; i++) u_rom.mem[i] = NOP();
    p = 0;   put(GOTO(8));
    p = 4;   put(INCF(8'h28, F)); put(BCF(INTCON, 2)); put(BCF(INTCON, 1)); put(GOTO(8'h78));
    p = 8;   put(MOVLW(8'h48)); put(15'h0062 /* OPTION */);
    // timing: CLRF TMR0, 3 x NOP, GOTO, read TMR0
    put(CLRF(TMR0)); put(NOP()); put(NOP()); put(NOP()); put(GOTO(15));
    put(MOVF(TMR0, W)); put(MOVWF(8'h20));
    // arithmetic and flags
    put(MOVLW(8'hF5)); put(MOVWF(8'h21)); put(MOVLW(8'h1B)); put(ADDWF(8'h21, F));
    put(MOVF(STATUS, W)); put(MOVWF(8'h22));
    put(MOVLW(8'h50)); put(SUBWF(8'h21, W)); put(MOVWF(8'h23)); put(MOVF(STATUS, W)); put(MOVWF(8'h24));
    // loop
    put(MOVLW(3)); put(MOVWF(8'h25)); put(CLRF(8'h26));
    put(INCF(8'h26, F)); put(DECFSZ(8'h25, F)); put(GOTO(31));
    // indirect
    put(MOVLW(8'h30)); put(MOVWF(FSR)); put(MOVLW(8'hA5)); put(MOVWF(INDF)); put(SWAPF(INDF, W));
    put(MOVWF(8'h27));
    // call / retlw
    put(CALL(8'h70)); put(MOVWF(8'h29));
    // rotates
    put(MOVLW(8'h81)); put(MOVWF(8'h2A)); put(BSF(STATUS, 0)); put(RRF(8'h2A, F)); put(RLF(8'h2A, W));
    put(MOVWF(8'h2B));
    // bit tests
    put(CLRF(8'h2C)); put(BTFSS(8'h2A, 7)); put(INCF(8'h2C, F)); put(BTFSC(8'h2A, 0));
    put(INCF(8'h2C, F)); put(INCF(8'h2C, F));
    // bank 1: TRISB, then PORTB
    put(MOVLW(8'hF0)); put(BSF(STATUS, 5)); put(MOVWF(PORTB)); put(BCF(STATUS, 5));
    put(MOVLW(8'h0A)); put(MOVWF(PORTB));
    // TMR0 interrupt
    put(MOVLW(8'hA0)); put(MOVWF(INTCON)); put(MOVLW(8'hFC)); put(MOVWF(TMR0));
    put(BTFSS(8'h28, 0)); put(GOTO(64));
    // RB0/INT wakes SLEEP
    put(MOVLW(8'h90)); put(MOVWF(INTCON)); put(SLEEP()); put(NOP());
    put(MOVF(8'h28, W)); put(MOVWF(8'h2D));
    // port-B change interrupt
    put(MOVLW(8'h88)); put(MOVWF(INTCON));
    put(MOVF(8'h28, W)); put(XORLW(3)); put(BTFSS(STATUS, 2)); put(GOTO(74));
    put(MOVLW(8'h55)); put(MOVWF(PORTA)); put(GOTO(80));
    if (p != 81) $display("program layout error p=%0d", p);
    p = 8'h70; put(RETLW(8'h77));
    p = 8'h78; put(MOVF(PORTB, W)); put(BCF(INTCON, 0)); put(RETFIE());

    for (int i = 0; i < 128; i++) u_ram.mem[i] = '0;  // the program expects a cleared RAM
    repeat (3) @(posedge clk);
    ponrst_n = 1;
    // clkout period
    begin
      int t0, t1;
      @(posedge clkout); t0 = cycles;
      @(posedge clkout); t1 = cycles;
      check($sformatf("clkout period 4 clkin (got %0d)", t1 - t0), t1 - t0 == 4);
    end
    wait (powerdown);
    check("SLEEP asserts powerdown", powerdown && !clkout);
    repeat (20) @(posedge clk);
    check("still asleep", powerdown);
    portb_in[0] = 1;   // rising edge on RB0/INT
    wait (!powerdown);
    repeat (100) @(posedge clk);
    int_in = 4'b0100;  // port-B change
    wait (porta_out == 5'h15);
    repeat (8) @(posedge clk);
    ram_is(8'h20, 5);
    ram_is(8'h21, 8'h10);
    ram_is(8'h22, 8'h1B);
    ram_is(8'h23, 8'hC0);
    ram_is(8'h24, 8'h1A);
    ram_is(8'h25, 0);
    ram_is(8'h26, 3);
    ram_is(8'h30, 8'hA5);
    ram_is(8'h27, 8'h5A);
    ram_is(8'h29, 8'h77);
    ram_is(8'h2A, 8'hC0);
    ram_is(8'h2B, 8'h81);
    ram_is(8'h2C, 1);
    ram_is(8'h2D, 2);
    ram_is(8'h28, 3);
    check("PORTB latch", portb_out == 8'h0A);
    check("TRISB", portb_dir == 8'hF0);
    check("TRISA reset value", porta_dir == 5'h1F);
    check("RBPU from OPTION", rbpu == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
