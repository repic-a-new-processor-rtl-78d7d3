// pic_alu: the 8-bit arithmetic and logic unit of the PIC16F84-compatible datapath.
//
// Operand a is W, operand b is the file register value or the 8-bit literal. Subtraction is
// b - a (SUBWF: f - W, SUBLW: k - W) with the PIC carry convention: C = 1 and DC = 1 mean "no
// borrow" out of bit 7 and bit 3. Rotates go through the carry flag (cin). BCF/BSF clear or set
// bit number bitsel of b. z is set when the result is zero; which flags an instruction actually
// updates is decided by the core. Purely combinational. The operation set is that of the PIC16F84
// instruction set; its grouping into ALU operations is this design's own.
module pic_alu
  import repic_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  input  logic [2:0] bitsel,
  output logic [7:0] y,
  output logic       c,
  output logic       dc,
  output logic       z
);
  logic [8:0] s9;
  logic [4:0] s5;

  always_comb begin
    y  = '0;
    c  = cin;
    dc = 1'b0;
    s9 = '0;
    s5 = '0;
    unique case (op)
      ALU_ADD: begin
        s9 = {1'b0, a} + {1'b0, b};
        s5 = {1'b0, a[3:0]} + {1'b0, b[3:0]};
        y  = s9[7:0]; c = s9[8]; dc = s5[4];
      end
      ALU_SUB: begin
        s9 = {1'b0, b} + {1'b0, ~a} + 9'd1;
        s5 = {1'b0, b[3:0]} + {1'b0, ~a[3:0]} + 5'd1;
        y  = s9[7:0]; c = s9[8]; dc = s5[4];
      end
      ALU_AND:  y = a & b;
      ALU_IOR:  y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      ALU_COMB: y = ~b;
      ALU_INCB: y = b + 8'd1;
      ALU_DECB: y = b - 8'd1;
      ALU_RRF:  begin y = {cin, b[7:1]}; c = b[0]; end
      ALU_RLF:  begin y = {b[6:0], cin}; c = b[7]; end
      ALU_SWAP: y = {b[3:0], b[7:4]};
      ALU_ZERO: y = '0;
      ALU_BCLR: begin y = b; y[bitsel] = 1'b0; end
      ALU_BSET: begin y = b; y[bitsel] = 1'b1; end
    endcase
    z = (y == 8'h00);
  end
endmodule
