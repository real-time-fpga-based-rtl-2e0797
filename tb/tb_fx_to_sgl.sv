// Self-checking test of fx_to_sgl: zero, the extreme values and 20000 random
// Q16.16 numbers; the float read back must equal the fixed-point value to
// within one unit in the last of its 24 significant bits.
module tb_fx_to_sgl;
  import hil_pkg::*;
  fx_t x;
  logic [31:0] sgl;
  int checks = 0, failures = 0;

  fx_to_sgl dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(fx_t v);
    real exact, got, err;
    int e;
    x = v;
    #1;
    exact = real'(v) / 65536.0;
    // decode the float by hand
    e = int'(sgl[30:23]);
    if (sgl[30:0] == 0) got = 0.0;
    else got = (1.0 + real'(sgl[22:0]) / 8388608.0) * (2.0 ** (e - 127));
    if (sgl[31]) got = -got;
    err = got - exact;
    if (err < 0) err = -err;
    checks++;
    if (err > (exact < 0 ? -exact : exact) / 8388608.0 + 1.0e-12 || (v != 0 && sgl[31] != v[31])) begin
      failures++;
      if (failures < 20) $display("FAIL: %h -> %h (%g vs %g)", v, sgl, got, exact);
    end
  endtask

  initial begin
    one('0);
    one(32'sh7FFF_FFFF);
    one(32'sh8000_0000);
    one(32'sh0000_0001);
    one(32'shFFFF_FFFF);
    one(to_fx(1.845));
    one(to_fx(-0.55));
    for (int n = 0; n < 20000; n++) one(fx_t'($urandom) >>> ($urandom % 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
