// Self-checking test of lpf_bw: a step and a 500 Hz tone against the
// difference equation in double precision with the coefficients computed
// from the 30 Hz cut-off and the 5 us step; the DC gain must be one and the
// tone attenuated about 16.7 times.
module tb_lpf_bw;
  import hil_pkg::*;
  localparam real PI = 3.14159265358979, TS = 5.0e-6;
  logic clk = 0, rst = 1, step_en = 0;
  fx_t x, y;
  int checks = 0, failures = 0;

  lpf_bw dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    real k, a, b, yr, xp, xv, amp;
    k = 2.0 * PI * 30.0 * TS / 2.0;
    a = (1.0 - k) / (1.0 + k);
    b = k / (1.0 + k);
    yr = 0; xp = 0; amp = 0;
    x = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 40000; n++) begin
      xv = (n < 20000) ? 1.5 : 1.0 * $sin(2.0 * PI * 500.0 * n * TS);
      x = to_fx(xv);
      xv = real'(x) / 65536.0;
      yr = a * yr + b * (xv + xp);
      xp = xv;
      @(posedge clk) step_en <= 1;
      @(posedge clk) step_en <= 0;
      @(posedge clk);
      check("y", real'(y) / 65536.0, yr, 2.0e-4);
      if (n == 19999) check("dc", real'(y) / 65536.0, 1.5, 1.0e-3);
      if (n > 36000 && (real'(y) / 65536.0) > amp) amp = real'(y) / 65536.0;
    end
    check("500Hz gain", amp, 1.0 / $sqrt(1.0 + (500.0 / 30.0) ** 2), 0.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
