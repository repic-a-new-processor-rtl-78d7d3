// tb_abort_handler: directed scenarios for the nested weak-abort unit: activation through
// LDAADDR + ABORT, PRN counting and wrap, JASR, preemption with outermost-first priority and
// clearing of the inner levels, non-preemptive termination at the continuation address, and
// no reaction while no level is active.
module tb_abort_handler;
  import repic_pkg::*;
  import repic_asm_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, exec_valid = 0;
  instr_t ir = '0;
  op_e op;
  logic [10:0] exec_pc = '0;
  logic [15:0] sir = '0;
  logic take;
  logic [10:0] target;
  logic [3:0] af;
  logic [1:0] prn;
  logic [15:0] jasr;
  int checks = 0, failures = 0, cycles = 0;

  assign op = decode(ir);
  abort_handler dut (.clk, .rst_n, .ce, .op, .ir, .exec_valid, .exec_pc, .sir, .take, .target,
                     .af, .prn, .jasr);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (af=%b prn=%0d take=%b target=%h)", what, af, prn, take, target); end
  endtask
  task automatic step(instr_t i);  // execute one instruction for one cycle
    @(negedge clk); ir = i; exec_valid = 1; exec_pc = 11'h7FF;
    @(posedge clk); #1;
    ir = NOP();
  endtask
  task automatic arm(int addr, int sig);
    step(LDAADDR(addr));
    step(ABORT(sig));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // no level active: a signal does nothing
    sir = 16'hFFFF; #1;
    check("idle: no take", !take && af == 0);
    sir = 0;
    // one level
    arm(11'h100, 3);
    check("level 0 armed", af == 4'b0001 && prn == 1 && jasr == 16'h0008);
    @(negedge clk); sir = 16'h0004; #1;
    check("other signal: no take", !take);
    sir = 16'h0008; #1;
    check("abort signal: take to AADDR0", take && target == 11'h100);
    @(posedge clk); #1; sir = 0;
    check("level cleared, PRN back to 0", af == 0 && prn == 0);
    // four levels, PRN wraps
    arm(11'h010, 2); arm(11'h020, 9); arm(11'h030, 5); arm(11'h040, 15);
    check("four levels armed", af == 4'b1111 && prn == 0 && jasr == 16'h8224);
    @(negedge clk); sir = 16'h0020; #1;  // SIA5: level 2
    check("level 2 preempts", take && target == 11'h030);
    @(posedge clk); #1; sir = 0;
    check("levels 2,3 cleared", af == 4'b0011 && prn == 2);
    @(negedge clk); sir = 16'h0204; #1;  // levels 0 and 1 both present
    check("outermost wins", take && target == 11'h010);
    @(posedge clk); #1; sir = 0;
    check("all cleared", af == 0 && prn == 0);
    // non-preemptive termination: the instruction at AADDR executes
    arm(11'h058, 1); arm(11'h050, 4); arm(11'h060, 6);
    @(negedge clk); exec_valid = 0; exec_pc = 11'h050; #1;
    check("bubble at the address does not terminate", !take && af == 4'b0111);
    @(negedge clk); exec_valid = 1; exec_pc = 11'h050; sir = 16'h0040; #1; // level 2 signal
    check("termination of level 1 beats inner signal", !take);
    @(posedge clk); #1; sir = 0;
    check("levels 1..2 terminated", af == 4'b0001 && prn == 1);
    // termination of an inner level while the outer signal is present: outer preempts
    arm(11'h070, 7);
    @(negedge clk); exec_valid = 1; exec_pc = 11'h070; sir = 16'h0002; #1;
    check("outer signal preempts despite inner termination", take && target == 11'h058);
    @(posedge clk); #1; sir = 0;
    check("all cleared after outer preemption", af == 0 && prn == 0);
    // internal signal SIB6 as abort signal (code 14)
    arm(11'h123, 14);
    @(negedge clk); sir = 16'h4000; #1;
    check("SIB6 aborts", take && target == 11'h123);
    @(posedge clk); #1; sir = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
