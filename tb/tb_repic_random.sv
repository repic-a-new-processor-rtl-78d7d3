// tb_repic_random: random-program test of the PIC16F84 instruction set on the RePIC core.
//
// Each round writes a random straight-line program into the program ROM and runs it from reset.
// The program mixes every byte-oriented file instruction, the bit set/clear/test instructions
// and the literal instructions. They work on sixteen RAM registers (0x20..0x2F), on INDF through
// a fixed FSR, and on the C, DC and Z bits of STATUS. A random prologue gives the registers, W,
// FSR and the flags their starting values. An epilogue stores W and the swapped STATUS, then
// writes a marker and loops. The skip instructions (DECFSZ, INCFSZ, BTFSC, BTFSS) jump over the
// next random word, so the skip path is covered too.
//
// An instruction-set model in this testbench, written from the PIC16F84 rules for results and
// flags, runs the same words. The testbench then compares the sixteen registers, W and the C/DC/Z
// flags. It also checks that the program took exactly one instruction cycle per word (a skipped
// word costs its cycle as a NOP), timed from reset release to the marker.
module tb_repic_random;
  import repic_asm_pkg::*;
  localparam int ROUNDS = 40, LEN = 120, NREG = 16, BASE = 32;

  logic clk = 0, ponrst_n = 0, mclr_n = 1;
  logic [12:0] progadr;
  logic [14:0] progdata;
  logic [8:0] ramadr;
  logic readram, writeram;
  logic [7:0] ramtout, ramdtin;
  logic [4:0] porta_out, porta_dir;
  logic [7:0] portb_out, portb_dir;
  logic rbpu, powerdown, startclkin, clkout;
  logic [7:0] souta;
  logic [3:0] soutb;
  int checks = 0, failures = 0, cycles = 0;

  repic_core dut (.clkin(clk), .ponrst_n, .mclr_n, .progadr, .progdata, .ramadr, .readram,
    .writeram, .ramtout, .ramdtin, .porta_in(5'd0), .porta_out, .porta_dir, .portb_in(8'd0),
    .portb_out, .portb_dir, .rbpu, .int_in(4'd0), .signal_ina(8'd0), .signal_inb(4'd0),
    .signal_outa(souta), .signal_outb(soutb), .powerdown, .startclkin, .clkout);
  prog_rom #(.DEPTH(4096)) u_rom (.clk, .addr(progadr), .data(progdata));
  data_ram #(.DEPTH(128)) u_ram (.clk, .ramadr, .readram, .writeram, .ramtout, .ramdtin);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > ROUNDS * (LEN + 80) * 4 * 2 + 1000);
    failures++;
    $display("watchdog: a program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- instruction-set model ----
  logic [7:0] mreg [NREG];
  logic [7:0] wreg, fsr;
  logic       fc, fdc, fz;

  function automatic logic [7:0] rd(int f);
    if (f == STATUS) return {5'b00011, fz, fdc, fc};
    if (f == INDF) return mreg[int'(fsr) - BASE];
    return mreg[f - BASE];
  endfunction
  function automatic void wr(int f, logic [7:0] v);
    if (f == STATUS) begin fc = v[0]; fdc = v[1]; fz = v[2]; end
    else if (f == INDF) mreg[int'(fsr) - BASE] = v;
    else mreg[f - BASE] = v;
  endfunction

  // Executes one word; returns 1 when the next word is skipped.
  function automatic logic step(w15 i);
    logic [7:0] a, r, k;
    logic [8:0] s;
    int f, d, b;
    logic skip;
    skip = 0;
    f = int'(i[6:0]); d = int'(i[7]); b = int'(i[9:7]); k = i[7:0];
    if (i[13:12] == 2'b00) begin
      a = rd(f);
      r = a;
      unique case (i[11:8])
        4'h0: begin wr(f, wreg); return 0; end                       // MOVWF (NOP not generated)
        4'h1: begin r = 8'h00; fz = 1; end                           // CLRW / CLRF
        4'h2: begin s = {1'b0, a} + {1'b0, ~wreg} + 9'd1; r = s[7:0]; // SUBWF
                fc = s[8]; fdc = (a[3:0] >= wreg[3:0]); fz = (r == 0); end
        4'h3: begin r = a - 8'd1; fz = (r == 0); end                 // DECF
        4'h4: begin r = a | wreg; fz = (r == 0); end                 // IORWF
        4'h5: begin r = a & wreg; fz = (r == 0); end                 // ANDWF
        4'h6: begin r = a ^ wreg; fz = (r == 0); end                 // XORWF
        4'h7: begin s = {1'b0, a} + {1'b0, wreg}; r = s[7:0];        // ADDWF
                fc = s[8]; fdc = ({1'b0, a[3:0]} + {1'b0, wreg[3:0]}) > 5'd15; fz = (r == 0); end
        4'h8: begin r = a; fz = (r == 0); end                        // MOVF
        4'h9: begin r = ~a; fz = (r == 0); end                       // COMF
        4'hA: begin r = a + 8'd1; fz = (r == 0); end                 // INCF
        4'hB: begin r = a - 8'd1; skip = (r == 0); end               // DECFSZ
        4'hC: begin r = {fc, a[7:1]}; fc = a[0]; end                 // RRF
        4'hD: begin r = {a[6:0], fc}; fc = a[7]; end                 // RLF
        4'hE: r = {a[3:0], a[7:4]};                                  // SWAPF
        4'hF: begin r = a + 8'd1; skip = (r == 0); end               // INCFSZ
      endcase
      if (i[11:8] == 4'h1 && !i[7]) wreg = r;                        // CLRW
      else if (d == 1) wr(f, r);
      else wreg = r;
    end else if (i[13:12] == 2'b01) begin
      a = rd(f);
      unique case (i[11:10])
        2'b00: begin a[b] = 1'b0; wr(f, a); end
        2'b01: begin a[b] = 1'b1; wr(f, a); end
        2'b10: skip = !a[b];
        2'b11: skip = a[b];
      endcase
    end else begin
      unique casez (i[11:8])
        4'b00??: wreg = k;                                           // MOVLW
        4'b1000: begin wreg = wreg | k; fz = (wreg == 0); end
        4'b1001: begin wreg = wreg & k; fz = (wreg == 0); end
        4'b1010: begin wreg = wreg ^ k; fz = (wreg == 0); end
        4'b110?: begin s = {1'b0, k} + {1'b0, ~wreg} + 9'd1;        // SUBLW
                   fc = s[8]; fdc = (k[3:0] >= wreg[3:0]); wreg = s[7:0]; fz = (wreg == 0); end
        4'b111?: begin s = {1'b0, k} + {1'b0, wreg};                // ADDLW
                   fc = s[8]; fdc = ({1'b0, k[3:0]} + {1'b0, wreg[3:0]}) > 5'd15;
                   wreg = s[7:0]; fz = (wreg == 0); end
        default: ;
      endcase
    end
    return skip;
  endfunction

  // ---- random program generation ----
  function automatic int rfile();
    int x = int'($urandom_range(0, 19));
    if (x < NREG) return BASE + x;
    if (x < 18) return INDF;
    return STATUS;
  endfunction

  function automatic w15 rinstr();
    int kind = int'($urandom_range(0, 9));
    int f;
    if (kind < 6) begin
      int op = int'($urandom_range(0, 15));
      int d = int'($urandom_range(0, 1));
      // byte ops on STATUS would overwrite the flags they compute; keep them on data registers
      f = rfile();
      if (f == STATUS) f = INDF;
      if (op == 0) return MOVWF(f);
      if (op == 1) return (d != 0) ? CLRF(f) : CLRW();
      return bop(op, f, d);
    end else if (kind < 8) begin
      f = rfile();
      return bitop(int'($urandom_range(0, 3)), f, f == STATUS ? int'($urandom_range(0, 2))
                                                                : int'($urandom_range(0, 7)));
    end else begin
      int k = int'($urandom_range(0, 255));
      int sel = int'($urandom_range(0, 5));
      unique case (sel)
        0: return MOVLW(k);
        1: return IORLW(k);
        2: return ANDLW(k);
        3: return XORLW(k);
        4: return SUBLW(k);
        default: return ADDLW(k);
      endcase
    end
  endfunction

  int p;
  task automatic put(w15 w); u_rom.mem[p] = w; p++; endtask

  initial begin
    w15 body [LEN];
    int body_start, done_at, t0, elapsed;
    logic skip;
    for (int round = 0; round < ROUNDS; round++) begin
      ponrst_n = 0;
      for (int i = 0; i < 4096; i++) u_rom.mem[i] = NOP();
      for (int i = 0; i < 128; i++) u_ram.mem[i] = '0;
      p = 0;
      // prologue: registers, FSR, W and flags
      for (int r = 0; r < NREG; r++) begin
        mreg[r] = 8'($urandom);
        put(MOVLW(int'(mreg[r]))); put(MOVWF(BASE + r));
      end
      fsr = 8'(BASE + $urandom_range(0, NREG - 1));
      put(MOVLW(int'(fsr))); put(MOVWF(FSR));
      {fz, fdc, fc} = 3'($urandom);
      put(fc ? BSF(STATUS, 0) : BCF(STATUS, 0));
      put(fdc ? BSF(STATUS, 1) : BCF(STATUS, 1));
      put(fz ? BSF(STATUS, 2) : BCF(STATUS, 2));
      wreg = 8'($urandom);
      put(MOVLW(int'(wreg)));
      body_start = p;
      for (int j = 0; j < LEN; j++) begin body[j] = rinstr(); put(body[j]); end
      // a skip in the last word jumps over this NOP
      put(NOP());
      put(MOVWF('h30)); put(SWAPF(STATUS, W)); put(MOVWF('h31));
      put(MOVLW('hA5)); put(MOVWF('h32));
      done_at = p;
      put(GOTO(done_at));

      // model
      skip = 0;
      for (int j = 0; j < LEN; j++) begin
        if (skip) skip = 0;
        else skip = step(body[j]);
      end

      repeat (3) @(posedge clk);
      ponrst_n = 1;
      t0 = cycles;
      wait (u_ram.mem[7'h32] == 8'hA5);
      elapsed = cycles - t0;
      repeat (8) @(posedge clk);

      for (int r = 0; r < NREG; r++)
        check($sformatf("round %0d reg %h = %h (got %h)", round, BASE + r, mreg[r],
                        u_ram.mem[7'(BASE + r)]), u_ram.mem[7'(BASE + r)] == mreg[r]);
      check($sformatf("round %0d W = %h (got %h)", round, wreg, u_ram.mem[7'h30]),
            u_ram.mem[7'h30] == wreg);
      check($sformatf("round %0d C/DC/Z = %b (got %b)", round, {fz, fdc, fc},
                      u_ram.mem[7'h31][6:4]), u_ram.mem[7'h31][6:4] == {fz, fdc, fc});
      // one instruction cycle per word up to the marker store; the marker is written at the end
      // of its instruction cycle, so about 4 clocks per word plus the reset start-up
      check($sformatf("round %0d took %0d clocks for %0d words", round, elapsed, done_at),
            elapsed >= 4 * done_at && elapsed <= 4 * done_at + 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
