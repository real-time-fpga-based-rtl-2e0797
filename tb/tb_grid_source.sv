// Self-checking test of grid_source: the angle must advance by 50 Hz per
// 5 us step (one turn in 4000 steps), and a dip must hold the amplitude at the
// dip level for exactly dip_steps steps and then return to nominal. A start
// pulse with dip_en low must be ignored.
module tb_grid_source;
  import hil_pkg::*;
  logic clk = 0, rst = 1, step_en = 0, dip_en = 0, dip_start = 0, dip_active;
  fx_t amp, dip_level, amp_eff;
  logic [31:0] dip_steps;
  angle_t theta_s;
  int checks = 0, failures = 0, low_steps = 0;

  grid_source dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk); step_en <= 1;
    @(posedge clk); step_en <= 0;
    @(posedge clk);
  endtask

  initial begin
    amp = to_fx(1.0); dip_level = to_fx(0.2); dip_steps = 300;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) step();
    // 4000 steps = 20 ms = one period
    checks++;
    if (theta_s > 32'd2000 && theta_s < 32'hFFFF_F830) begin
      failures++; $display("FAIL: angle after one period %h", theta_s);
    end
    checks++;
    if (amp_eff != amp) failures++;
    // start ignored without dip_en
    @(posedge clk) dip_start <= 1; @(posedge clk) dip_start <= 0;
    for (int n = 0; n < 5; n++) step();
    checks++;
    if (dip_active || amp_eff != amp) begin failures++; $display("FAIL: dip without enable"); end
    dip_en <= 1;
    @(posedge clk) dip_start <= 1; @(posedge clk) dip_start <= 0;
    for (int n = 0; n < 400; n++) begin
      step();
      if (dip_active) begin
        low_steps++;
        checks++;
        if (amp_eff != dip_level) failures++;
      end
    end
    checks++;
    if (low_steps != 300) begin failures++; $display("FAIL: dip lasted %0d steps", low_steps); end
    checks++;
    if (amp_eff != amp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
