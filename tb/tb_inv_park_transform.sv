// Self-checking test of inv_park_transform: random dq pairs and angles
// against x_k = G*(d*cos(theta - k*2pi/3) - q*sin(theta - k*2pi/3)) in
// double precision.
module tb_inv_park_transform;
  import hil_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real G = 965.6;
  dq_t x_dq;
  fx_t sin_t, cos_t;
  abc_t x_abc;
  int checks = 0, failures = 0;

  inv_park_transform #(.GAIN(G)) dut (.*);

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
      real th, d, q;
      th = ($urandom % 100000) / 100000.0 * 2.0 * PI;
      d = (real'($urandom % 40000) - 20000.0) / 10000.0;
      q = (real'($urandom % 40000) - 20000.0) / 10000.0;
      sin_t = to_fx($sin(th));
      cos_t = to_fx($cos(th));
      x_dq = '{d: to_fx(d), q: to_fx(q)};
      #1;
      d = real'(x_dq.d) / 65536.0;
      q = real'(x_dq.q) / 65536.0;
      check("a", real'(x_abc.a) / 65536.0, G * (d * $cos(th) - q * $sin(th)), 0.2);
      check("b", real'(x_abc.b) / 65536.0, G * (d * $cos(th - 2.0 * PI / 3.0) - q * $sin(th - 2.0 * PI / 3.0)), 0.2);
      check("c", real'(x_abc.c) / 65536.0, G * (d * $cos(th + 2.0 * PI / 3.0) - q * $sin(th + 2.0 * PI / 3.0)), 0.2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
