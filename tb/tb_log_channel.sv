// Self-checking test of log_channel (3 variables of 6, 64-element FIFO):
// each logged sample must hold the selected variables' values at the step,
// as single-precision floats split into upper and lower halves, in
// selection order; decim = 1 must log every second step; a full FIFO must
// raise the overflow alarm.
module tb_log_channel;
  import hil_pkg::*;
  localparam int NVAR = 3, NSRC = 6, DEPTH = 64;
  logic clk = 0, rst = 1, step_en = 0, enable = 0, decim = 0, rd_en = 0, alarm_clr = 0;
  fx_t src [NSRC];
  logic [$clog2(NSRC)-1:0] sel [NVAR];
  logic [15:0] rd_data, missed;
  logic rd_valid, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  fx_t expq[$];

  log_channel #(.NVAR(NVAR), .NSRC(NSRC), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sgl2r(logic [31:0] s);
    real v;
    int e;
    if (s[30:0] == 0) return 0.0;
    v = 1.0 + real'(s[22:0]) / 8388608.0;
    e = int'(s[30:23]) - 127;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    if (s[31]) v = -v;
    return v;
  endfunction

  task automatic step();
    for (int i = 0; i < NSRC; i++) src[i] = fx_t'($urandom) >>> ($urandom % 16);
    @(posedge clk) step_en <= 1;
    @(posedge clk) step_en <= 0;
    repeat (2 * NVAR + 4) @(posedge clk);
  endtask

  // drain the FIFO and compare with the expected values
  task automatic drain();
    logic [31:0] w;
    while (count != 0) begin
      @(posedge clk) rd_en <= 1;
      @(posedge clk) rd_en <= 0;
      #1 w[31:16] = rd_data;
      @(posedge clk) rd_en <= 1;
      @(posedge clk) rd_en <= 0;
      #1 w[15:0] = rd_data;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected data");
      end else begin
        fx_t e;
        real er, g, tol;
        e = expq.pop_front();
        er = real'(e) / 65536.0;
        g = sgl2r(w);
        tol = (er < 0 ? -er : er) / 8388608.0 + 1.0e-12;
        if (g - er > tol || er - g > tol) begin
          failures++; if (failures < 10) $display("FAIL: logged %g expected %g", g, er);
        end
      end
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d values missing", expq.size()); end
  endtask

  initial begin
    for (int i = 0; i < NSRC; i++) src[i] = '0;
    sel[0] = 4; sel[1] = 0; sel[2] = 5;
    repeat (3) @(posedge clk);
    rst <= 0;
    // disabled: nothing logged
    step();
    checks++;
    if (count != 0) failures++;
    enable <= 1;
    for (int n = 0; n < 5; n++) begin
      step();
      for (int i = 0; i < NVAR; i++) expq.push_back(src[sel[i]]);
    end
    checks++;
    if (count != 5 * 2 * NVAR) begin failures++; $display("FAIL: count %0d", count); end
    drain();
    // 10 us resolution
    decim <= 1;
    for (int n = 0; n < 6; n++) begin
      step();
      if (count == (expq.size() + NVAR) * 2) for (int i = 0; i < NVAR; i++) expq.push_back(src[sel[i]]);
    end
    checks++;
    if (expq.size() != 3 * NVAR) begin failures++; $display("FAIL: decimated %0d values", expq.size()); end
    drain();
    // overflow
    decim <= 0;
    for (int n = 0; n < 12; n++) step();
    checks++;
    if (!overflow || !full) begin failures++; $display("FAIL: no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
