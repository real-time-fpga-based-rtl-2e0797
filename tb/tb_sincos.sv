// Self-checking test of sincos: the four quadrant boundaries and 20000
// random angles against the simulator's $sin and $cos.
module tb_sincos;
  import hil_pkg::*;
  localparam real PI = 3.14159265358979;
  angle_t theta;
  fx_t sin_o, cos_o;
  int checks = 0, failures = 0;
  real maxerr = 0;

  sincos dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(angle_t a);
    real ang, es, ec;
    theta = a;
    #1;
    ang = real'(a) / 4294967296.0 * 2.0 * PI;
    es = real'(sin_o) / 65536.0 - $sin(ang);
    ec = real'(cos_o) / 65536.0 - $cos(ang);
    if (es < 0) es = -es;
    if (ec < 0) ec = -ec;
    if (es > maxerr) maxerr = es;
    if (ec > maxerr) maxerr = ec;
    checks++;
    if (es > 5.0e-5 || ec > 5.0e-5) begin
      failures++;
      if (failures < 20) $display("FAIL angle %h: sin %f cos %f", a, real'(sin_o) / 65536.0, real'(cos_o) / 65536.0);
    end
  endtask

  initial begin
    for (int q = 0; q < 4; q++) one(angle_t'(q) << 30);
    for (int n = 0; n < 20000; n++) one($urandom);
    $display("max error %g", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
