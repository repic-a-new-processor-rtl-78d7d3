// tb_sig_output: random EMIT / SUSTAIN / tick sequences against a reference model of the
// SIGOUT and SUSTAIN registers; also checks that nothing changes when ce is low.
module tb_sig_output;
  logic clk = 0, rst_n = 0, ce = 0, emit = 0, sustain = 0, tick = 0;
  logic [11:0] field = '0;
  logic [7:0] outa;
  logic [3:0] outb;
  logic [11:0] m_sig = '0, m_sus = '0;
  int checks = 0, failures = 0, cycles = 0;

  sig_output dut (.clk, .rst_n, .ce, .emit, .sustain, .tick, .field,
                  .signal_outa(outa), .signal_outb(outb));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin  // watchdog
    wait (cycles > 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int r;
      @(negedge clk);
      ce = ($urandom % 4) != 0;
      r = $urandom % 6;
      unique case (r)
        0, 1, 2: begin emit = 1; sustain = 0; tick = 0; end
        3:       begin emit = 0; sustain = ($urandom % 8) == 0; tick = 0; end
        default: begin emit = 0; sustain = 0; tick = 1; end
      endcase
      field = 12'(1 << ($urandom % 12)) | (($urandom % 3 == 0) ? 12'($urandom) : 12'h0);
      if (sustain) field = 12'(1 << ($urandom % 12));
      @(posedge clk);
      if (ce) begin
        if (tick) m_sig = '0; else if (emit) m_sig |= field;
        if (sustain) m_sus |= field;
      end
      #1;
      checks++;
      if ({outb, outa} !== (m_sig | m_sus)) begin
        failures++;
        $display("FAIL n=%0d out=%h exp=%h", n, {outb, outa}, m_sig | m_sus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
