// tb_sig_input: checks sampling of the external input signals on ce, and the internal signals
// SIB4..SIB7: set by a timer overflow, held through the tick, cleared at the next tick
// boundary, written by software.
module tb_sig_input;
  logic clk = 0, rst_n = 0, ce = 0, tick = 0, wr = 0;
  logic [7:0] ina = '0;
  logic [3:0] inb = '0, fire = '0, wdata = '0;
  logic [7:0] sigina, siginb;
  logic [7:0] m_a = '0;
  logic [3:0] m_b = '0, m_i = '0;
  int checks = 0, failures = 0, cycles = 0;

  sig_input dut (.clk, .rst_n, .ce, .signal_ina(ina), .signal_inb(inb), .fire, .tick,
                 .wr_sigintb(wr), .wdata, .sigina, .siginb);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ce    = ($urandom % 3) != 0;
      ina   = 8'($urandom);
      inb   = 4'($urandom);
      fire  = (($urandom % 4) == 0) ? 4'(1 << ($urandom % 4)) : 4'h0;
      tick  = ($urandom % 5) == 0;
      wr    = ($urandom % 17) == 0;
      wdata = 4'($urandom);
      @(posedge clk);
      if (ce) begin
        m_a = ina; m_b = inb;
        if (wr) m_i = wdata | fire; else if (tick) m_i = fire; else m_i |= fire;
      end
      #1;
      checks++;
      if (sigina !== m_a || siginb !== {m_i, m_b}) begin
        failures++;
        $display("FAIL n=%0d a=%h/%h b=%h/%h", n, sigina, m_a, siginb, {m_i, m_b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
