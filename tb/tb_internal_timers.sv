// tb_internal_timers: SETINTMR x, k must report the overflow (fire[x], ITOF) in exactly the
// (k+1)-th cycle after the load (k >= 1), with the timer disabled from then on; four timers
// run concurrently and are checked against a cycle-accurate model of the counters.
module tb_internal_timers;
  logic clk = 0, rst_n = 0, ce = 1, set = 0;
  logic [1:0] tmr_id = '0;
  logic [7:0] tmr_val = '0;
  logic [3:0] fire;
  logic [7:0] intmrcond;
  logic [7:0] intmr [4];
  int checks = 0, failures = 0, cycles = 0;
  int remaining [4];   // model: cycles until the overflow is reported, -1 = idle

  internal_timers dut (.clk, .rst_n, .ce, .set, .tmr_id, .tmr_val, .fire, .intmrcond, .intmr);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles > 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) remaining[i] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: timer 2 with k = 5, fire expected in cycle 6 after the load cycle
    @(negedge clk); set = 1; tmr_id = 2; tmr_val = 5;
    @(negedge clk); set = 0;
    for (int c = 1; c <= 7; c++) begin
      checks++;
      if (fire[2] !== (c == 6)) begin failures++; $display("FAIL directed c=%0d fire=%b", c, fire); end
      @(negedge clk);
    end
    checks++;
    if (intmrcond[6] !== 1'b0) failures++;  // ITE2 cleared after reaching zero
    // random concurrent use
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check the model before this cycle's edge
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (fire[i] !== (remaining[i] == 0)) begin
          failures++; $display("FAIL n=%0d tmr %0d fire=%b rem=%0d", n, i, fire[i], remaining[i]);
        end
      end
      set = ($urandom % 20) == 0;
      tmr_id = 2'($urandom);
      tmr_val = 8'(1 + $urandom % 40);
      @(posedge clk);
      for (int i = 0; i < 4; i++) if (remaining[i] >= 0) remaining[i]--;
      if (set) remaining[tmr_id] = tmr_val;  // overflow reported k+1 cycles after the load
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
