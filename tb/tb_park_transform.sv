// Self-checking test of park_transform: balanced and unbalanced random
// three-phase sets at random angles, against the dq definition evaluated in
// double precision (d = 2/3*sum(x_k*cos(theta - k*2pi/3)), q = -2/3*sum(x_k*sin(...))).
module tb_park_transform;
  import hil_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real G = 0.5;
  abc_t x_abc;
  fx_t sin_t, cos_t;
  dq_t x_dq;
  int checks = 0, failures = 0;

  park_transform #(.GAIN(G)) dut (.*);

  initial begin
    #1ms;
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
    for (int n = 0; n < 5000; n++) begin
      real th, x[3], d, q;
      th = ($urandom % 100000) / 100000.0 * 2.0 * PI;
      for (int k = 0; k < 3; k++) x[k] = (real'($urandom % 200000) - 100000.0) / 100.0;
      if (n % 2 == 0) begin   // balanced set
        x[0] = 500.0 * $cos(th + 0.3);
        x[1] = 500.0 * $cos(th + 0.3 - 2.0 * PI / 3.0);
        x[2] = 500.0 * $cos(th + 0.3 + 2.0 * PI / 3.0);
      end
      sin_t = to_fx($sin(th));
      cos_t = to_fx($cos(th));
      x_abc = '{a: to_fx(x[0]), b: to_fx(x[1]), c: to_fx(x[2])};
      #1;
      d = 0; q = 0;
      for (int k = 0; k < 3; k++) begin
        d += 2.0 / 3.0 * x[k] * $cos(th - k * 2.0 * PI / 3.0);
        q -= 2.0 / 3.0 * x[k] * $sin(th - k * 2.0 * PI / 3.0);
      end
      check("d", real'(x_dq.d) / 65536.0, G * d, 0.05);
      check("q", real'(x_dq.q) / 65536.0, G * q, 0.05);
      if (n % 2 == 0) begin
        check("d_bal", real'(x_dq.d) / 65536.0, G * 500.0 * $cos(0.3), 0.05);
        check("q_bal", real'(x_dq.q) / 65536.0, G * 500.0 * $sin(0.3), 0.05);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
