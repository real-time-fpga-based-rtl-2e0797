// Self-checking test of step_timer: the step strobe must be one cycle wide,
// come every 200 clock cycles (5 us at 40 MHz) and stop while enable is low.
module tb_step_timer;
  logic clk = 0, rst = 1, enable = 0;
  logic step_en;
  logic [31:0] step_cnt;
  int checks = 0, failures = 0;
  int cycle = 0, last = -1, nsteps = 0;

  step_timer dut (.clk, .rst, .enable, .step_en, .step_cnt);

  always #12.5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && step_en) begin
      if (last >= 0) begin
        checks++;
        if (cycle - last != 200) begin
          failures++;
          $display("FAIL: step period %0d cycles, expected 200", cycle - last);
        end
      end
      last <= cycle;
      nsteps <= nsteps + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; enable <= 1;
    repeat (200 * 10 + 5) @(posedge clk);
    checks++;
    if (step_cnt != 10) begin failures++; $display("FAIL: step_cnt %0d, expected 10", step_cnt); end
    // hold enable low: no steps
    enable <= 0;
    begin
      int n0;
      n0 = nsteps;
      repeat (600) @(posedge clk);
      checks++;
      if (nsteps != n0) begin failures++; $display("FAIL: step while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
