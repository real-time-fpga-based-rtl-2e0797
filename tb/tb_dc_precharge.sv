// Self-checking test of dc_precharge: random grid voltages, link voltages and
// command states against the half-wave rectifier law in double precision;
// then a closed loop with a 20 mF capacitor must settle near 896 V from a
// 563 V peak grid and raise done at an 850 V set-point.
module tb_dc_precharge;
  import hil_pkg::*;
  localparam real PI = 3.14159265358979, KTR = 896.0 / 563.0;
  logic cmd, done;
  abc_t e_g;
  fx_t udc, setpoint, i_pre;
  int checks = 0, failures = 0;

  dc_precharge dut (.*);

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
    real u, mx, e[3];
    setpoint = to_fx(850.0);
    for (int n = 0; n < 3000; n++) begin
      for (int x = 0; x < 3; x++) e[x] = (real'($urandom % 120000) - 60000.0) / 100.0;
      u = ($urandom % 100000) / 100.0;
      cmd = ($urandom % 4) != 0;
      e_g = '{a: to_fx(e[0]), b: to_fx(e[1]), c: to_fx(e[2])};
      udc = to_fx(u);
      #1;
      mx = e[0];
      if (e[1] > mx) mx = e[1];
      if (e[2] > mx) mx = e[2];
      check("i_pre", real'(i_pre) / 65536.0, (cmd && KTR * mx > u) ? KTR * mx - u : 0.0, 0.01);
      checks++;
      if (done != (u >= 850.0)) failures++;
    end
    // closed loop: C = 20 mF, 5 us steps, 400 ms
    u = 0; cmd = 1;
    for (int n = 0; n < 80000; n++) begin
      real t;
      t = n * 5.0e-6;
      for (int x = 0; x < 3; x++) e[x] = 563.0 * $cos(2.0 * PI * 50.0 * t - x * 2.0 * PI / 3.0);
      e_g = '{a: to_fx(e[0]), b: to_fx(e[1]), c: to_fx(e[2])};
      udc = to_fx(u);
      #1;
      u = u + 5.0e-6 / 20.0e-3 * real'(i_pre) / 65536.0;
    end
    check("precharged", u, 896.0, 10.0);
    checks++;
    if (!done) begin failures++; $display("FAIL: done not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
