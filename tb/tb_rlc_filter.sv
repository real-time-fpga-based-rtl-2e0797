// Self-checking test of rlc_filter: steps and a square wave on the three
// inputs, compared each step with a double-precision model of the same
// discretised equations, and the settled output against the DC gain of one.
module tb_rlc_filter;
  import hil_pkg::*;
  localparam real TS = 5.0e-6, LR = 100.0e-6, RR = 2.0e-3, RF = 0.5, CF = 5.0e-6;
  logic clk = 0, rst = 1, step_en = 0;
  abc_t v_in, v_out, i_f, u_cf;
  int checks = 0, failures = 0;

  rlc_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fr(fx_t v);
    return real'(v) / 65536.0;
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    real ri[3], ru[3], vin[3];
    for (int x = 0; x < 3; x++) begin ri[x] = 0; ru[x] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      vin[0] = (n < 1500) ? 525.0 : -525.0;
      vin[1] = ((n / 200) % 2 == 0) ? 350.0 : -175.0;
      vin[2] = -200.0;
      v_in = '{a: to_fx(vin[0]), b: to_fx(vin[1]), c: to_fx(vin[2])};
      for (int x = 0; x < 3; x++) begin
        ri[x] = ri[x] + TS / LR * (vin[x] - (RR + RF) * ri[x] - ru[x]);
        ru[x] = ru[x] + TS / CF * ri[x];
      end
      @(posedge clk); step_en <= 1;
      @(posedge clk); step_en <= 0;
      @(posedge clk);
      check("Va", fr(v_out.a), RF * ri[0] + ru[0], 0.5);
      check("Vb", fr(v_out.b), RF * ri[1] + ru[1], 0.5);
      check("Vc", fr(v_out.c), RF * ri[2] + ru[2], 0.5);
      check("Ia", fr(i_f.a), ri[0], 0.5);
      check("Ucf_a", fr(u_cf.a), ru[0], 0.5);
    end
    // phase c has had a constant input for 15 ms: settled to it
    check("settled", fr(v_out.c), -200.0, 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
