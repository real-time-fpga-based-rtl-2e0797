// Self-checking test of encoder_sim: with a 128-tick line period, A must rise
// every 128 clocks and stay high 64, B must rise 32 clocks after A
// (phase_b = 0.75) turning forwards and 32 clocks before it turning
// backwards, and Z must come once per z_count lines, 64 clocks wide.
module tb_encoder_sim;
  logic clk = 0, rst = 1, enable = 0, a, b, z;
  logic signed [31:0] freq;
  logic [31:0] phase_a, phase_b, duty;
  logic [15:0] z_count, line_cnt;
  int checks = 0, failures = 0;
  int cyc = 0, last_a = -1, last_b = -1, last_z = -1, a_hi = 0, z_hi = 0, nz = 0;
  logic pa = 0, pb = 0, pz = 0;
  logic fwd = 1;

  encoder_sim dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && enable) begin
    cyc <= cyc + 1;
    pa <= a; pb <= b; pz <= z;
    if (a) a_hi <= a_hi + 1;
    if (z) z_hi <= z_hi + 1;
    if (a && !pa) begin
      if (last_a >= 0 && cyc > 300) begin
        checks++;
        if (cyc - last_a != 128) begin failures++; $display("FAIL: A period %0d", cyc - last_a); end
      end
      last_a <= cyc;
    end
    if (b && !pb) begin
      if (cyc > 300 && last_a >= 0) begin
        checks++;
        if (fwd && cyc - last_a != 32) begin failures++; $display("FAIL: B lag %0d", cyc - last_a); end
        if (!fwd && cyc - last_a != 96) begin failures++; $display("FAIL: B lead %0d", cyc - last_a); end
      end
    end
    if (pz && !z) begin
      checks++;
      if (z_hi != 64) begin failures++; $display("FAIL: Z width %0d", z_hi); end
    end
    if (z && !pz) begin
      z_hi <= 1;
      nz <= nz + 1;
      if (last_z >= 0) begin
        checks++;
        if (cyc - last_z != 8 * 128) begin failures++; $display("FAIL: Z period %0d", cyc - last_z); end
      end
      last_z <= cyc;
    end
  end

  initial begin
    freq = 32'sh0200_0000;     // 1/128 period per tick
    phase_a = 0; phase_b = 32'hC000_0000; duty = 32'h8000_0000; z_count = 8;
    repeat (3) @(posedge clk);
    rst <= 0; enable <= 1;
    repeat (128 * 40) @(posedge clk);
    checks++;
    if (nz < 4) begin failures++; $display("FAIL: only %0d Z pulses", nz); end
    // reverse
    fwd = 0;
    freq = -32'sh0200_0000;
    @(posedge clk);
    last_a = -1; cyc = 0; last_z = -1;
    repeat (128 * 20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
