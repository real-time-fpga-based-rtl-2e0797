// Self-checking test of ao_scale with its defaults (8 channels, +/-10 V).
// Random per-unit signals and gains, plus values chosen to hit both
// saturation limits, are applied one model step at a time. The expected
// DAC code is computed in real arithmetic, floor(x*gain/10*32768) clipped
// to 16 bits, and must match within 2 codes (fixed-point rounding of the
// intermediate products); the saturation flag must match exactly away from
// the limit. Codes must change only on the step strobe, one clock later.
module tb_ao_scale;
  import hil_pkg::*;
  localparam int NCH = 8;

  logic clk = 0, rst = 1, step_en = 0;
  fx_t  x [NCH], gain [NCH];
  logic signed [15:0] code [NCH];
  logic [NCH-1:0] clip;
  int checks = 0, failures = 0;

  ao_scale dut (.clk, .rst, .step_en, .x, .gain, .code, .clip);

  always #12.5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fr(fx_t v);
    return real'(v) / 65536.0;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic signed [15:0] held [NCH];
    for (int c = 0; c < NCH; c++) begin x[c] = '0; gain[c] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      for (int c = 0; c < NCH; c++) begin
        real xr, gr;
        if (n % 10 == 9) begin xr = (c % 2 == 1) ? 7.5 : -7.5; gr = 5.0; end   // saturates
        else begin
          xr = (real'($urandom_range(0, 40000)) - 20000.0) / 10000.0;      // +/-2 pu
          gr = real'($urandom_range(0, 50000)) / 10000.0;                  // 0..5 V/pu
        end
        x[c] = to_fx(xr); gain[c] = to_fx(gr);
      end
      // codes must not move between strobes
      for (int c = 0; c < NCH; c++) held[c] = code[c];
      repeat (5) @(posedge clk);
      for (int c = 0; c < NCH; c++) check("code held between steps", code[c] == held[c]);
      step_en <= 1;
      @(posedge clk);
      step_en <= 0;
      @(posedge clk);
      for (int c = 0; c < NCH; c++) begin
        real e;
        bit  es;
        e  = fr(x[c]) * fr(gain[c]) / 10.0 * 32768.0;
        es = (e >= 32768.0) || (e < -32768.0);
        if (e > 32767.0) e = 32767.0;
        if (e < -32768.0) e = -32768.0;
        check($sformatf("ch %0d code %0d expected %f", c, code[c], e),
              real'(code[c]) - e < 2.0 && e - real'(code[c]) < 2.0);
        if (e < 32760.0 && e > -32760.0 || es)
          check($sformatf("ch %0d saturation flag", c), clip[c] == es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
