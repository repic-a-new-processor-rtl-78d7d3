// repic_system: a complete single-processor RePIC microcontroller, the RePIC core with its
// program ROM and its data RAM.
//
// The core's memory buses (progadr/progdata, ramadr/ramdtin/ramtout/readram/writeram) are
// wired to prog_rom and data_ram inside; everything else of the core's external view is
// brought out: the two PIC ports with their direction outputs, the port-B change interrupt
// inputs Int[3:0], the reactive signal ports signal_inA/B and signal_outA/B, the two resets,
// the clock and the power/clock status outputs. One instruction cycle is four clkin periods.
// Memory sizes default to 4096 x 15-bit program words and 128 data bytes, the sizes implied
// by the memory-bit counts the document reports for this system; the program is loaded from
// the hex file PROG_INIT (one 15-bit word per line) or written into u_rom.mem by a testbench.
// The port names are those of the document's pin diagram. Two choices are this design's own:
// each bidirectional PIC port is split into _in, _out and _dir (TRIS) signals, and rbpu, drawn
// there on the input side, is the PIC16F84's port-B pull-up enable and therefore an output.
module repic_system #(
  parameter int unsigned PROG_DEPTH = 4096,
  parameter int unsigned DATA_DEPTH = 128,
  parameter string       PROG_INIT  = ""
) (
  input  logic       clkin,
  input  logic       ponrst_n,
  input  logic       mclr_n,
  input  logic [4:0] porta_in,
  output logic [4:0] porta_out,
  output logic [4:0] porta_dir,
  input  logic [7:0] portb_in,
  output logic [7:0] portb_out,
  output logic [7:0] portb_dir,
  output logic       rbpu,
  input  logic [3:0] Int,
  input  logic [7:0] signal_inA,
  input  logic [3:0] signal_inB,
  output logic [7:0] signal_outA,
  output logic [3:0] signal_outB,
  output logic       powerdown,
  output logic       startclkin,
  output logic       clkout
);
  logic [12:0] progadr;
  logic [14:0] progdata;
  logic [8:0]  ramadr;
  logic        readram, writeram;
  logic [7:0]  ramtout, ramdtin;

  repic_core u_core (
    .clkin, .ponrst_n, .mclr_n,
    .progadr, .progdata,
    .ramadr, .readram, .writeram, .ramtout, .ramdtin,
    .porta_in, .porta_out, .porta_dir, .portb_in, .portb_out, .portb_dir, .rbpu,
    .int_in(Int),
    .signal_ina(signal_inA), .signal_inb(signal_inB),
    .signal_outa(signal_outA), .signal_outb(signal_outB),
    .powerdown, .startclkin, .clkout
  );

  prog_rom #(.DEPTH(PROG_DEPTH), .INIT(PROG_INIT)) u_rom (
    .clk(clkin), .addr(progadr), .data(progdata)
  );

  data_ram #(.DEPTH(DATA_DEPTH)) u_ram (
    .clk(clkin), .ramadr, .readram, .writeram, .ramtout, .ramdtin
  );
endmodule
