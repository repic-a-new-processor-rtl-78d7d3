// tb_prog_rom: fills the program memory with a pattern computed from the address and checks
// the synchronous read (data one clock after the address) over the whole address range.
module tb_prog_rom;
  logic clk = 0;
  logic [12:0] addr = '0;
  logic [14:0] data;
  int checks = 0, failures = 0, cycles = 0;

  prog_rom #(.DEPTH(4096)) dut (.clk, .addr, .data);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [14:0] pat(int a); return 15'((a * 7919) ^ (a << 3)); endfunction
  initial begin
    for (int i = 0; i < 4096; i++) dut.mem[i] = pat(i);
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); addr = 13'(i);
      @(posedge clk); #1;
      checks++;
      if (data !== pat(i)) begin failures++; $display("FAIL addr %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
