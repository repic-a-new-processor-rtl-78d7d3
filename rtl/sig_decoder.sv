// sig_decoder: turns a 4-bit input-signal code into the 9-bit polling mask of the await and
// abort instructions.
//
// Codes 0000..0111 name SIA0..SIA7 (the SIGINA register), 1000..1111 name SIB0..SIB7 (the
// SIGINB register; SIB4..SIB7 are the internal timer signals). The mask is {bank, one-hot[7:0]}:
// bit 8 says which register the one-hot part is ANDed with, so code 0110 gives 0_0100_0000 and
// code 1111 gives 1_1000_0000, exactly as in the decoder table of the document. The abort
// unit widens the mask to the 16-bit {SIGINB, SIGINA} view. Purely combinational.
module sig_decoder (
  input  logic [3:0] code,  // signal number SI3..SI0
  output logic [8:0] mask   // {SIGINB select, 8-bit one-hot mask}
);
  always_comb begin
    mask = '0;
    mask[8] = code[3];
    mask[{1'b0, code[2:0]}] = 1'b1;
  end
endmodule
