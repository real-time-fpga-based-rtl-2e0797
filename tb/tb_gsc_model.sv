// Self-checking test of gsc_model against a double-precision forward-Euler
// model of the same equations, written independently here. The grid is a
// balanced 50 Hz source, the gates follow a sine-triangle PWM pattern, and the
// DC link is first precharged by a current source, then loaded, then the
// chopper is switched on. The contactor is opened at the end: currents must
// drop to zero. One model step per step_en pulse; outputs are checked one
// clock after each step.
module tb_gsc_model;
  import hil_pkg::*;
  localparam real TS = 5.0e-6, LG = 0.3e-3, RG = 3.0e-3, CD = 20.0e-3;
  localparam real RCHOP = 1.0, RDIS = 220.0e3;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1, step_en = 0, gsc_en = 0, chopper_cmd = 0;
  logic [2:0] gate_up = 0, gate_dn = 0, k;
  abc_t e_g, i_g;
  fx_t  i_load = 0, i_pre = 0, udc, i_chop;
  logic shoot_through;
  int checks = 0, failures = 0, nchop = 0;

  real r_ig[3], r_udc;

  gsc_model dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50ms;
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
    real e[3], kk[3], idc, u3;
    for (int x = 0; x < 3; x++) r_ig[x] = 0.0;
    r_udc = 0.0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 6000; n++) begin
      real t, tri_w;
      t = n * TS;
      for (int x = 0; x < 3; x++) e[x] = 563.0 * $cos(2.0 * PI * 50.0 * t - x * 2.0 * PI / 3.0);
      gsc_en      = (n >= 10 && n < 5800);
      i_pre       = (n < 2000) ? to_fx(300.0) : '0;
      i_load      = (n >= 3000) ? to_fx(150.0) : '0;
      chopper_cmd = (n >= 4500 && n < 4700);
      tri_w = 2.0 * ((n % 57) / 57.0) - 1.0;   // ~3.5 kHz carrier
      for (int x = 0; x < 3; x++) begin
        logic up;
        up = (0.8 * $cos(2.0 * PI * 50.0 * t - x * 2.0 * PI / 3.0 - 0.2) > tri_w);
        gate_up[x] = (n >= 2200) ? up : 1'b0;
        gate_dn[x] = (n >= 2200) ? ~up : 1'b0;
      end
      e_g = '{a: to_fx(e[0]), b: to_fx(e[1]), c: to_fx(e[2])};
      // reference step
      for (int x = 0; x < 3; x++) begin
        if (gate_up[x] != gate_dn[x]) kk[x] = gate_up[x] ? 1.0 : 0.0;
        else kk[x] = (r_ig[x] >= 0.0) ? 1.0 : 0.0;
      end
      u3 = r_udc / 3.0;
      idc = kk[0] * r_ig[0] + kk[1] * r_ig[1] + kk[2] * r_ig[2] - fr(i_load)
          - (chopper_cmd ? r_udc / RCHOP : 0.0) - r_udc / RDIS + fr(i_pre);
      begin
        real nig[3];
        for (int x = 0; x < 3; x++)
          nig[x] = gsc_en ? r_ig[x] + TS / LG * (e[x] - RG * r_ig[x]
                   - u3 * (2.0 * kk[x] - kk[(x + 1) % 3] - kk[(x + 2) % 3])) : 0.0;
        r_udc = r_udc + TS / CD * idc;
        for (int x = 0; x < 3; x++) r_ig[x] = nig[x];
      end
      @(posedge clk); step_en <= 1;
      @(posedge clk); step_en <= 0;
      @(posedge clk);
      if (chopper_cmd) nchop++;
      // once the diode-rectifier interval is over compare tightly;
      // during it the diode choice near zero current may differ
      if (n >= 2200) begin
        check("udc", fr(udc), r_udc, 0.05 * (r_udc > 0 ? r_udc : -r_udc) / 100.0 + 2.0);
        check("igA", fr(i_g.a), r_ig[0], 5.0);
        check("igB", fr(i_g.b), r_ig[1], 5.0);
        check("igC", fr(i_g.c), r_ig[2], 5.0);
      end
      if (n == 2199) begin
        // after precharge with 300 A for 2000 steps (10 ms): ~150 V plus rectifier
        check("udc_precharged", fr(udc), r_udc, 10.0);
        r_udc = fr(udc);
        for (int x = 0; x < 3; x++) r_ig[x] = fr(x == 0 ? i_g.a : x == 1 ? i_g.b : i_g.c);
      end
      if (chopper_cmd) check("i_chop", fr(i_chop), fr(udc) / RCHOP, 1.0);
    end
    checks++;
    if (i_g.a != 0 || i_g.b != 0 || i_g.c != 0) begin
      failures++; $display("FAIL: currents not zero with contactor open");
    end
    checks++;
    if (nchop == 0) failures++;
    $display("udc final %f", fr(udc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
