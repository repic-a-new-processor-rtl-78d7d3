// tb_await_unit: TAWAIT d must occupy exactly max(d,1) instruction cycles; SAWAIT must stall
// until its signal is present; CAWAIT must continue on signal1, branch on signal2 alone (to the
// LDCADDR address) and prefer signal1 when both are present; tick must be high only in the
// first cycle of an await; cancel must drop a wait in progress.
module tb_await_unit;
  import repic_pkg::*;
  import repic_asm_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, cancel = 0;
  instr_t ir = '0;
  op_e op;
  logic [15:0] sir = '0;
  logic stall, tick, cbr;
  logic [10:0] caddr;
  int checks = 0, failures = 0, cycles = 0;

  assign op = decode(ir);
  await_unit dut (.clk, .rst_n, .ce, .op, .ir, .sir, .cancel, .stall, .tick,
                  .cawait_branch(cbr), .caddr);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  // runs the instruction in ir until it stops stalling; returns the number of cycles used
  task automatic run(output int n, output logic branched, output int ticks);
    n = 0; ticks = 0;
    forever begin
      #1;
      n++;
      if (tick) ticks++;
      branched = cbr;
      if (!stall) break;
      @(negedge clk);
    end
    @(posedge clk);
  endtask

  initial begin
    int n, ticks;
    logic br;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // TAWAIT
    for (int d = 0; d < 40; d++) begin
      @(negedge clk); ir = TAWAIT(d);
      run(n, br, ticks);
      check($sformatf("TAWAIT %0d cycles %0d", d, n), n == ((d == 0) ? 1 : d));
      check("TAWAIT one tick", ticks == 1);
      ir = NOP();
    end
    // SAWAIT: signal arrives after a random delay
    for (int t = 0; t < 50; t++) begin
      int s, delay, c;
      s = $urandom % 16; delay = $urandom % 10;
      sir = '0;
      @(negedge clk); ir = SAWAIT(s);
      c = 0;
      forever begin
        @(negedge clk);
        if (c == delay) sir = 16'(1 << s) | 16'($urandom) & ~16'(1 << s) & 16'h0;
        #1;
        if (c >= delay) begin
          check("SAWAIT completes when present", !stall);
          break;
        end else begin
          check("SAWAIT stalls when absent", stall);
          sir = 16'($urandom) & ~16'(1 << s);
        end
        @(posedge clk);
        c++;
      end
      @(posedge clk);
      ir = NOP(); sir = '0;
    end
    // CAWAIT with LDCADDR
    @(negedge clk); ir = LDCADDR(11'h5A5);
    @(negedge clk); ir = NOP();
    check("LDCADDR loads caddr", caddr == 11'h5A5);
    for (int t = 0; t < 60; t++) begin
      int s1, s2, which;
      s1 = $urandom % 16; s2 = (s1 + 1 + $urandom % 15) % 16;
      which = $urandom % 3;  // 0: s1, 1: s2, 2: both
      sir = '0;
      @(negedge clk); ir = CAWAIT(s1, s2);
      repeat ($urandom % 4) begin
        #1; check("CAWAIT stalls", stall && !cbr);
        @(negedge clk);
      end
      sir = (which != 1 ? 16'(1 << s1) : 16'h0) | (which != 0 ? 16'(1 << s2) : 16'h0);
      #1;
      check("CAWAIT completes", !stall);
      check($sformatf("CAWAIT branch only on signal2 alone (which=%0d)", which), cbr == (which == 1));
      @(posedge clk);
      ir = NOP(); sir = '0;
    end
    // cancel a wait in progress, then a new await starts a new tick
    @(negedge clk); ir = SAWAIT(3);
    @(negedge clk); check("waiting", stall && !tick);
    cancel = 1;
    @(negedge clk); cancel = 0;
    #1; check("after cancel the await starts again", tick);
    @(negedge clk); ir = NOP();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
