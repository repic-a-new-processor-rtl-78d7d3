// data_ram: general-purpose file-register RAM of the RePIC system, DEPTH bytes.
//
// One port: when readram is high the byte at ramadr is registered onto ramdtin at the rising
// clock edge; when writeram is high ramtout is written to ramadr at the rising clock edge. The
// low log2(DEPTH) address bits select the byte, so with the default 128 bytes both register
// banks see the same RAM (like the mirrored general-purpose registers of the PIC16F84). The
// core never addresses the special-function range 0x00..0x0B here. DEPTH = 128 matches the
// memory-bit count the document reports for the RePIC system (1024 bits of data RAM).
module data_ram #(
  parameter int unsigned DEPTH = 128
) (
  input  logic       clk,
  input  logic [8:0] ramadr,
  input  logic       readram,
  input  logic       writeram,
  input  logic [7:0] ramtout,   // data from the core
  output logic [7:0] ramdtin    // data to the core
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (writeram) mem[ramadr[AW-1:0]] <= ramtout;
    if (readram)  ramdtin <= mem[ramadr[AW-1:0]];
  end
endmodule
