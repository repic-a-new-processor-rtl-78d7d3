// tb_sig_decoder: checks all 16 signal codes against the decoder table (bank bit + one-hot).
module tb_sig_decoder;
  logic [3:0] code;
  logic [8:0] mask;
  int checks = 0, failures = 0;
  sig_decoder dut (.code, .mask);
  initial begin  // watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [8:0] exp;
      code = 4'(i);
      #1;
      exp = {i >= 8, 8'(1 << (i % 8))};
      checks++;
      if (mask !== exp) begin failures++; $display("FAIL code %0d mask %b exp %b", i, mask, exp); end
    end
    // the table rows printed in the document
    code = 4'b0110; #1; checks++; if (mask !== 9'b001000000) failures++;
    code = 4'b1111; #1; checks++; if (mask !== 9'b110000000) failures++;
    code = 4'b1000; #1; checks++; if (mask !== 9'b100000001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
