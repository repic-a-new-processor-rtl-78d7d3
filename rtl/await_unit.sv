// await_unit: the busy-wait instructions TAWAIT, SAWAIT and CAWAIT, and the LDCADDR register.
//
// The instruction in the execute stage is looked at every instruction cycle. An await whose
// condition already holds in its first cycle completes in that cycle; otherwise the unit raises
// stall, which makes the core keep its program counter and the instruction register, and keeps
// an operation flag (DELAY_OP, SIGPOLL_OP or CSIGPOLL_OP) set until the condition holds.
//  * TAWAIT d: DELAY_CNT counts the remaining cycles. The instruction occupies d instruction
//    cycles (TAWAIT 1 is one cycle, as in the document's tick timing drawing; TAWAIT 0 also takes
//    one cycle).
//  * SAWAIT s: SIGPOLLA holds the 9-bit mask of s (from sig_decoder); done when the masked
//    SIGINA or SIGINB bit is 1.
//  * CAWAIT s1, s2: SIGPOLLA holds s1 (bits 3:0), SIGPOLLB holds s2 (bits 7:4). If s1 is present
//    the next instruction follows; else if s2 is present cawait_branch asks the core to jump to
//    the address loaded by LDCADDR (caddr). s1 wins when both are present.
// tick is high in the first cycle of every await instruction: the current logical tick ends
// there. cancel (an abort or interrupt taken) drops a wait in progress. All registers update at
// the end-of-cycle strobe ce; stall, tick and cawait_branch are combinational.
module await_unit
  import repic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  op_e         op,             // decoded instruction in execute
  input  instr_t      ir,
  input  logic [15:0] sir,            // {SIGINB, SIGINA}
  input  logic        cancel,
  output logic        stall,
  output logic        tick,
  output logic        cawait_branch,
  output logic [10:0] caddr
);
  logic       delay_op, sigpoll_op, csigpoll_op;
  logic [7:0] delay_cnt;
  logic [8:0] sigpolla, sigpollb;
  logic [8:0] mask_a, mask_b;
  logic       busy;

  sig_decoder u_dec_a (.code(ir[3:0]), .mask(mask_a));
  sig_decoder u_dec_b (.code(ir[7:4]), .mask(mask_b));

  function automatic logic present(logic [8:0] m, logic [15:0] s);
    return |(m[7:0] & (m[8] ? s[15:8] : s[7:0]));
  endfunction

  assign busy = delay_op | sigpoll_op | csigpoll_op;
  assign tick = is_await(op) && !busy;

  logic [8:0] pa, pb;
  logic       hit_a, hit_b;
  always_comb begin
    pa    = busy ? sigpolla : mask_a;
    pb    = busy ? sigpollb : mask_b;
    hit_a = present(pa, sir);
    hit_b = present(pb, sir);
    stall = 1'b0;
    cawait_branch = 1'b0;
    unique case (op)
      I_TAWAIT: stall = busy ? (delay_cnt != 8'd0) : (ir[7:0] > 8'd1);
      I_SAWAIT: stall = !hit_a;
      I_CAWAIT: begin
        stall = !hit_a && !hit_b;
        cawait_branch = !hit_a && hit_b;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delay_op    <= 1'b0;
      sigpoll_op  <= 1'b0;
      csigpoll_op <= 1'b0;
      delay_cnt   <= '0;
      sigpolla    <= '0;
      sigpollb    <= '0;
      caddr       <= '0;
    end else if (ce) begin
      if (op == I_LDCADDR) caddr <= ir[10:0];
      if (cancel || !stall) begin
        delay_op    <= 1'b0;
        sigpoll_op  <= 1'b0;
        csigpoll_op <= 1'b0;
      end else if (!busy) begin
        // first cycle of a wait that did not complete at once
        delay_op    <= (op == I_TAWAIT);
        sigpoll_op  <= (op == I_SAWAIT);
        csigpoll_op <= (op == I_CAWAIT);
        delay_cnt   <= ir[7:0] - 8'd2;
        sigpolla    <= mask_a;
        sigpollb    <= mask_b;
      end else if (delay_op) begin
        delay_cnt   <= delay_cnt - 8'd1;
      end
    end
  end
endmodule
