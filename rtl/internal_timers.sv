// internal_timers: the four 8-bit internal timers INTMR0..INTMR3 and their status register
// INTMRCOND = {ITE3..ITE0, ITOF3..ITOF0}.
//
// SETINTMR tmr_id, k loads INTMR[tmr_id] with k and sets its enable bit ITE. An enabled timer
// counts down by one every instruction cycle; in the cycle that takes it to zero (or at once if
// it was loaded with 0) it is disabled and its overflow flag ITOF is set. A set ITOF is reported
// on fire[x] during the following cycle, which is when the signal SIB(4+x) is raised, and is
// cleared at the end of that cycle. So after SETINTMR x, k (cycle 0, k >= 1) ITOF is set at the
// end of cycle k, fire is high in cycle k+1 and SIB(4+x) is visible from cycle k+2. Counting
// per instruction cycle, disable-at-zero and flag-then-signal follow the document; the exact
// cycle of each step is this design's choice.
module internal_timers (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       set,        // SETINTMR executes this cycle
  input  logic [1:0] tmr_id,
  input  logic [7:0] tmr_val,
  output logic [3:0] fire,       // = ITOF
  output logic [7:0] intmrcond,
  output logic [7:0] intmr [4]
);
  logic [3:0] ite, itof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ite  <= '0;
      itof <= '0;
      for (int i = 0; i < 4; i++) intmr[i] <= '0;
    end else if (ce) begin
      for (int i = 0; i < 4; i++) begin
        itof[i] <= 1'b0;  // reported for one cycle
        if (set && tmr_id == 2'(i)) begin
          intmr[i] <= tmr_val;
          ite[i]   <= 1'b1;
        end else if (ite[i]) begin
          if (intmr[i] <= 8'd1) begin
            intmr[i] <= '0;
            ite[i]   <= 1'b0;
            itof[i]  <= 1'b1;
          end else begin
            intmr[i] <= intmr[i] - 8'd1;
          end
        end
      end
    end
  end

  assign fire      = itof;
  assign intmrcond = {ite, itof};
endmodule
