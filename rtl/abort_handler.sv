// abort_handler: four nested levels of weak abort (preemption) with static priority.
//
// Level x (0 = outermost = highest priority) owns an activation flag AF[x], a continuation
// address AADDR[x] (11 bits) and a 16-bit abort signal register ASR[x] (one-hot over
// {SIGINB, SIGINA}). The 2-bit priority node PRN points at the next free level:
//  * LDAADDR a  writes AADDR[PRN];
//  * ABORT s    writes the decoded mask of s into ASR[PRN], sets AF[PRN] and increments PRN.
// While any level is active, JASR = ASR0|ASR1|ASR2|ASR3 is ANDed with the signal input
// register SIR = {SIGINB, SIGINA}. A non-zero result means preemption: the lowest-numbered
// active level whose signal is present wins, take is raised with target = AADDR[x], and AF[x]
// and all inner levels are cleared (PRN returns to x). Preemption is weak: it is taken at the
// end of an instruction cycle, after the current instruction has done its work.
// Non-preemptive termination: when the instruction being executed sits at AADDR[x] of an
// active level (compared on the low 11 address bits), level x and all inner levels end. When a
// level terminates and a more inner level's signal is present in the same cycle, the
// termination wins; an outer level's signal still preempts.
// The compiler keeps nesting within four levels; a fifth ABORT reuses level 0 because PRN wraps.
// Registers update at the end-of-cycle strobe ce; take and target are combinational.
module abort_handler
  import repic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  op_e         op,          // decoded instruction in execute
  input  instr_t      ir,
  input  logic        exec_valid,  // ir is a real instruction, not a pipeline bubble
  input  logic [10:0] exec_pc,     // low bits of the address of ir
  input  logic [15:0] sir,         // {SIGINB, SIGINA}
  output logic        take,        // preempt at the end of this cycle
  output logic [10:0] target,
  output logic [3:0]  af,
  output logic [1:0]  prn,
  output logic [15:0] jasr
);
  logic [10:0] aaddr [4];
  logic [15:0] asr   [4];
  logic [8:0]  mask;
  logic [15:0] mask16;
  logic [3:0]  hit, term;
  logic        clr;
  logic [1:0]  clr_lvl;
  logic [1:0]  prn_eff;

  assign prn_eff = clr ? clr_lvl : prn;

  sig_decoder u_dec (.code(ir[3:0]), .mask(mask));
  assign mask16 = mask[8] ? {mask[7:0], 8'h00} : {8'h00, mask[7:0]};

  always_comb begin
    jasr = '0;
    for (int x = 0; x < 4; x++) begin
      jasr    |= asr[x];
      hit[x]  = af[x] && ((asr[x] & sir) != '0);
      term[x] = af[x] && exec_valid && (exec_pc == aaddr[x]);
    end
    // priority resolution, outermost level first
    take    = 1'b0;
    clr     = 1'b0;
    clr_lvl = '0;
    target  = '0;
    if (af[0] && ((jasr & sir) != '0 || term != '0)) begin
      for (int x = 3; x >= 0; x--) begin
        if (term[x]) begin
          clr = 1'b1; clr_lvl = 2'(x); take = 1'b0;
        end else if (hit[x]) begin
          clr = 1'b1; clr_lvl = 2'(x); take = 1'b1; target = aaddr[x];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      af  <= '0;
      prn <= '0;
      for (int x = 0; x < 4; x++) begin
        aaddr[x] <= '0;
        asr[x]   <= '0;
      end
    end else if (ce) begin
      if (clr) begin
        for (int x = 0; x < 4; x++)
          if (2'(x) >= clr_lvl) begin
            af[x]  <= 1'b0;
            asr[x] <= '0;
          end
        prn <= clr_lvl;
      end
      // an instruction that completes without preemption may open a level, also in the cycle
      // in which it terminates older ones
      if (!take && op == I_LDAADDR) aaddr[prn_eff] <= ir[10:0];
      if (!take && op == I_ABORT) begin
        asr[prn_eff] <= mask16;
        af[prn_eff]  <= 1'b1;
        prn          <= prn_eff + 2'd1;
      end
    end
  end
endmodule
