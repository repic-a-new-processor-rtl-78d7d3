// sig_output: the SIGOUTA/SIGOUTB and SUSTAINA/SUSTAINB registers behind the signal_outA/B pins.
//
// EMIT ORs its 12-bit field (bits 11:8 = SOB3..SOB0, bits 7:0 = SOA7..SOA0) into SIGOUT, so that
// every signal emitted during one logical tick stays high together until the tick ends; the
// next await instruction (tick) clears SIGOUT. SUSTAIN ORs its field into SUSTAIN, which is never
// cleared except by reset. Each output pin is SIGOUTx(i) OR SUSTAINx(i), as drawn in the
// document. Registers change at the end-of-cycle strobe ce of the instruction that writes them.
module sig_output (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        emit,     // EMIT executes this cycle
  input  logic        sustain,  // SUSTAIN executes this cycle
  input  logic        tick,     // an await instruction starts: end of the logical tick
  input  logic [11:0] field,    // instruction bits 11:0
  output logic [7:0]  signal_outa,
  output logic [3:0]  signal_outb
);
  logic [11:0] sigout, sustain_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sigout    <= '0;
      sustain_r <= '0;
    end else if (ce) begin
      if (tick)      sigout <= '0;
      else if (emit) sigout <= sigout | field;
      if (sustain)   sustain_r <= sustain_r | field;
    end
  end

  assign signal_outa = sigout[7:0]  | sustain_r[7:0];
  assign signal_outb = sigout[11:8] | sustain_r[11:8];
endmodule
