// tb_pic_stack: random push/pop sequences against a queue model, including the PIC16F84's
// circular wrap after eight pushes.
module tb_pic_stack;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [12:0] din = '0, top;
  logic [12:0] model [8];
  int sp = 0, checks = 0, failures = 0, cycles = 0;

  pic_stack #(.DEPTH(8), .W(13)) dut (.clk, .rst_n, .push, .pop, .din, .top);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      push = ($urandom % 2) == 0;
      pop  = !push && ($urandom % 3) != 0;
      din  = 13'($urandom);
      @(posedge clk);
      if (push) begin model[sp] = din; sp = (sp + 1) % 8; end
      else if (pop) sp = (sp + 7) % 8;
      #1;
      checks++;
      if (top !== model[(sp + 7) % 8]) begin
        failures++; $display("FAIL n=%0d top=%h exp=%h", n, top, model[(sp + 7) % 8]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
