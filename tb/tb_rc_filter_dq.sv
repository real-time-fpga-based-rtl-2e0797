// Self-checking test of rc_filter_dq: a stepped and then rippled generator
// voltage, compared each step with a double-precision forward-Euler model of
// the filter equations; the settled response to a constant input must match
// the analytic steady state of the rotating-frame RC circuit.
module tb_rc_filter_dq;
  import hil_pkg::*;
  localparam real TS = 5.0e-6, WB = 2.0 * 3.14159265358979 * 50.0, TAU = 0.2 * 1.0e-3;
  logic clk = 0, rst = 1, step_en = 0;
  dq_t v_gen, v_f;
  fx_t we;
  int checks = 0, failures = 0;

  rc_filter_dq dut (.*);
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
    real vd, vq, gd, gq, w, nd, nq, den;
    vd = 0; vq = 0; w = 1.0;
    we = to_fx(w);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      gd = 0.9;
      gq = (n < 2000) ? 0.3 : 0.3 + (((n / 7) % 2 == 0) ? 0.05 : -0.05);
      v_gen = '{d: to_fx(gd), q: to_fx(gq)};
      nq = vq + TS / TAU * (gq - vq) - TS * WB * w * vd;
      nd = vd + TS / TAU * (gd - vd) + TS * WB * w * vq;
      vq = nq; vd = nd;
      @(posedge clk); step_en <= 1;
      @(posedge clk); step_en <= 0;
      @(posedge clk);
      check("vd", real'(v_f.d) / 65536.0, vd, 1.0e-3);
      check("vq", real'(v_f.q) / 65536.0, vq, 1.0e-3);
      if (n == 1999) begin
        // steady state: (v_gen - v)/tau = J*w*WB*v  ->  solve 2x2
        real a;
        a = WB * w * TAU;
        den = 1.0 + a * a;
        check("ss_d", real'(v_f.d) / 65536.0, (0.9 + a * 0.3) / den, 2.0e-3);
        check("ss_q", real'(v_f.q) / 65536.0, (0.3 - a * 0.9) / den, 2.0e-3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
