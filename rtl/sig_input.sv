// sig_input: the SIGINA and SIGINB input-signal registers.
//
// SIGINA[7:0] holds SIA7..SIA0 from the signal_inA pins and SIGINB[3:0] holds SIB3..SIB0 from
// the signal_inB pins; both are sampled once per instruction cycle (at the end-of-cycle strobe
// ce) so that every instruction of a cycle sees one stable set of signals, as the document asks
// of these "synchronising" flip-flops. SIGINB[7:4] are the internal signals SIB7..SIB4. Each is
// set for one logical tick when its internal timer reports an overflow (fire), and is cleared at
// the next tick boundary (tick = first cycle of an await instruction). Because the await that
// opens the new tick still sees the old value in its first cycle, an await on a timer signal that
// fired just before it is satisfied. Software may also write SIGINB[7:4] (drawn as R/W in the
// register map), which is how a program raises its own internal Esterel signals. The write
// port and the sampling on ce are this design's choices.
module sig_input (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,          // end of instruction cycle
  input  logic [7:0] signal_ina,
  input  logic [3:0] signal_inb,
  input  logic [3:0] fire,        // internal timer overflow, one cycle
  input  logic       tick,        // tick boundary (await instruction starts)
  input  logic       wr_sigintb,  // software write of SIGINB
  input  logic [3:0] wdata,       // value for SIGINB[7:4]
  output logic [7:0] sigina,
  output logic [7:0] siginb
);
  logic [3:0] sib_int;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sigina  <= '0;
      siginb[3:0] <= '0;
      sib_int <= '0;
    end else if (ce) begin
      sigina      <= signal_ina;
      siginb[3:0] <= signal_inb;
      if (wr_sigintb) sib_int <= wdata | fire;
      else if (tick)  sib_int <= fire;
      else            sib_int <= sib_int | fire;
    end
  end
  assign siginb[7:4] = sib_int;
endmodule
