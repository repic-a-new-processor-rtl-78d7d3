// tb_data_ram: random reads and writes against an array model; read data appears one clock
// after readram, and the two register banks alias onto the same 128 bytes.
module tb_data_ram;
  logic clk = 0, readram = 0, writeram = 0;
  logic [8:0] ramadr = '0;
  logic [7:0] ramtout = '0, ramdtin;
  logic [7:0] model [128];
  logic [7:0] exp;
  int checks = 0, failures = 0, cycles = 0;

  data_ram #(.DEPTH(128)) dut (.clk, .ramadr, .readram, .writeram, .ramtout, .ramdtin);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); ramadr = 9'(i); ramtout = 8'($urandom); writeram = 1; model[i] = ramtout;
    end
    @(negedge clk); writeram = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ramadr = 9'($urandom);
      writeram = ($urandom % 2) == 0;
      readram = !writeram;
      ramtout = 8'($urandom);
      exp = model[ramadr[6:0]];
      @(posedge clk);
      if (writeram) model[ramadr[6:0]] = ramtout;
      #1;
      if (readram) begin
        checks++;
        if (ramdtin !== exp) begin failures++; $display("FAIL n=%0d adr=%h got %h exp %h", n, ramadr, ramdtin, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
