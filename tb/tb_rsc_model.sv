// Self-checking test of rsc_model: every gate combination of the three legs
// (including both-off legs with both current signs) with random DC link
// voltages and rotor currents, against the converter equations evaluated in
// double precision here.
module tb_rsc_model;
  import hil_pkg::*;
  fx_t udc, i_in;
  logic [2:0] gate_up, gate_dn, sf2;
  abc_t i_r, v_o, v_ll, v_n, i_sw;
  logic shoot_through;
  int checks = 0, failures = 0;

  rsc_model dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fr(fx_t v);
    return real'(v) / 65536.0;
  endfunction

  task automatic check(string what, real got, real exp);
    checks++;
    if (got - exp > 0.01 || exp - got > 0.01) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      real vd, ir[3], sf1[3], s2[3], vo[3], vno;
      vd = 800.0 + ($urandom % 40000) / 100.0;
      for (int x = 0; x < 3; x++) ir[x] = (real'($urandom % 200000) - 100000.0) / 100.0;
      gate_up = 3'($urandom);
      gate_dn = 3'($urandom) & ~gate_up;   // no shoot-through here
      udc = to_fx(vd);
      i_r = '{a: to_fx(ir[0]), b: to_fx(ir[1]), c: to_fx(ir[2])};
      #1;
      for (int x = 0; x < 3; x++) begin
        ir[x] = fr(x == 0 ? i_r.a : x == 1 ? i_r.b : i_r.c);
        if (gate_up[x]) s2[x] = 1.0;
        else if (gate_dn[x]) s2[x] = 0.0;
        else s2[x] = (ir[x] < 0.0) ? 1.0 : 0.0;   // upper diode carries returning current
        sf1[x] = 2.0 * s2[x] - 1.0;
        vo[x] = fr(udc) / 2.0 * sf1[x];
      end
      vno = (vo[0] + vo[1] + vo[2]) / 3.0;
      check("Vao", fr(v_o.a), vo[0]);
      check("Vbo", fr(v_o.b), vo[1]);
      check("Vco", fr(v_o.c), vo[2]);
      check("Vab", fr(v_ll.a), vo[0] - vo[1]);
      check("Vbc", fr(v_ll.b), vo[1] - vo[2]);
      check("Vca", fr(v_ll.c), vo[2] - vo[0]);
      check("Van", fr(v_n.a), vo[0] - vno);
      check("Vbn", fr(v_n.b), vo[1] - vno);
      check("Vcn", fr(v_n.c), vo[2] - vno);
      check("Is1", fr(i_sw.a), ir[0] * s2[0]);
      check("Is3", fr(i_sw.b), ir[1] * s2[1]);
      check("Is5", fr(i_sw.c), ir[2] * s2[2]);
      check("iin", fr(i_in), ir[0] * s2[0] + ir[1] * s2[1] + ir[2] * s2[2]);
      checks++;
      if (shoot_through) failures++;
    end
    gate_up = 3'b001; gate_dn = 3'b001; #1;
    checks++;
    if (!shoot_through) begin failures++; $display("FAIL: shoot-through not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
