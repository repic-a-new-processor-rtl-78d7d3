// prog_rom: program memory of the RePIC system, DEPTH words of 15 bits with a synchronous read
// port (address registered at the rising clock edge, data valid one clock later).
//
// The core keeps its program address stable for a whole four-clock instruction cycle, so one
// clock of read latency is hidden. DEPTH = 4096 matches the memory-bit count the document
// reports for the RePIC system (4096 words x 15 bits of program store). The contents come from
// the hex file named by INIT when it is not empty; a testbench may also fill mem directly.
// Having no write port (this design's choice), the array is removed by synthesis when INIT is
// empty, since nothing could ever be stored in it.
module prog_rom #(
  parameter int unsigned DEPTH = 4096,
  parameter string       INIT  = ""
) (
  input  logic        clk,
  input  logic [12:0] addr,
  output logic [14:0] data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [14:0] mem [DEPTH];

  initial begin
    if (INIT != "") $readmemh(INIT, mem);
  end

  always_ff @(posedge clk) data <= mem[addr[AW-1:0]];
endmodule
