// pic_stack: the 8-level hardware return-address stack of the PIC16F84-compatible core.
//
// CALL and interrupt entry push a 13-bit address, RETURN, RETLW and RETFIE pop it. As in the
// PIC16F84 the stack is a circular buffer with no overflow or underflow indication: a ninth
// push overwrites the oldest entry. top always shows the most recent entry. push and pop take
// effect at a rising clock edge when enabled; they are never requested together. The depth
// is the PIC16F84's; the document only mentions that the stack cannot be reached by software.
module pic_stack #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic         pop,
  input  logic [W-1:0] din,
  output logic [W-1:0] top
);
  localparam int unsigned PW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] sp;  // points at the next free entry

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push) begin
      mem[sp] <= din;
      sp      <= sp + 1'b1;
    end else if (pop) begin
      sp <= sp - 1'b1;
    end
  end

  assign top = mem[sp - 1'b1];
endmodule
