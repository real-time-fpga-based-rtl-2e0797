// Self-checking test of breaker_status with a short pulse window (10
// steps). Commands, forces, trip and gate patterns are randomised once per
// model step (every 7 clocks here); a reference model in the testbench
// applies closed = !trip && (command || force), registered on the strobe,
// and counts down the pulse windows. All six outputs are compared on every
// clock, which also checks that nothing moves between strobes. Long runs
// of blocked gates make the pulse flags time out.
module tb_breaker_status;
  localparam int WIN = 10;

  logic clk = 0, rst = 1, step_en = 0;
  logic mcb_cmd = 0, precharge_cmd = 0, gsc_cmd = 0, synch_cmd = 0;
  logic force_precharge = 0, force_gsc = 0, force_synch = 0, trip = 0;
  logic [5:0] gsc_gates = 0, rsc_gates = 0;
  logic mcb_closed, precharge_closed, gsc_closed, stator_closed;
  logic gsc_pulses_active, rsc_pulses_active;
  int checks = 0, failures = 0;
  int n_trip = 0, n_force = 0, n_timeout = 0;

  breaker_status #(.PULSE_WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic m_mcb = 0, m_pre = 0, m_gsc = 0, m_st = 0;
  int   m_gcnt = 0, m_rcnt = 0;
  always @(posedge clk) begin
    if (rst) begin
      m_mcb <= 0; m_pre <= 0; m_gsc <= 0; m_st <= 0; m_gcnt <= 0; m_rcnt <= 0;
    end else if (step_en) begin
      m_mcb <= !trip && mcb_cmd;
      m_pre <= !trip && (precharge_cmd || force_precharge);
      m_gsc <= !trip && (gsc_cmd || force_gsc);
      m_st  <= !trip && (synch_cmd || force_synch);
      m_gcnt <= (gsc_gates != 0) ? WIN : (m_gcnt > 0 ? m_gcnt - 1 : 0);
      m_rcnt <= (rsc_gates != 0) ? WIN : (m_rcnt > 0 ? m_rcnt - 1 : 0);
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if ({mcb_closed, precharge_closed, gsc_closed, stator_closed, gsc_pulses_active, rsc_pulses_active}
        != {m_mcb, m_pre, m_gsc, m_st, m_gcnt > 0, m_rcnt > 0}) begin
      failures++;
      if (failures < 10)
        $display("FAIL at %0t: dut %b%b%b%b%b%b model %b%b%b%b%b%b", $time,
                 mcb_closed, precharge_closed, gsc_closed, stator_closed, gsc_pulses_active, rsc_pulses_active,
                 m_mcb, m_pre, m_gsc, m_st, m_gcnt > 0, m_rcnt > 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      int phase;
      phase = (n / 60) % 3;                 // 0: random, 1: gates blocked, 2: gates active
      mcb_cmd         <= ($urandom_range(0, 9) != 0);
      precharge_cmd   <= 1'($urandom_range(0, 1));
      gsc_cmd         <= 1'($urandom_range(0, 1));
      synch_cmd       <= 1'($urandom_range(0, 1));
      force_precharge <= ($urandom_range(0, 5) == 0);
      force_gsc       <= ($urandom_range(0, 5) == 0);
      force_synch     <= ($urandom_range(0, 5) == 0);
      trip            <= ($urandom_range(0, 19) == 0);
      gsc_gates <= (phase == 1) ? 6'd0 : (phase == 2) ? 6'b010101 : 6'(($urandom_range(0, 1) == 1) ? $urandom : 0);
      rsc_gates <= (phase == 1) ? 6'd0 : (phase == 2) ? 6'b101010 : 6'($urandom_range(0, 3) == 0 ? $urandom : 0);
      repeat (6) @(posedge clk);
      step_en <= 1;
      @(posedge clk);
      step_en <= 0;
      if (trip) n_trip++;
      if (force_synch && !synch_cmd && !trip) n_force++;
      if (phase == 1 && m_gcnt == 0) n_timeout++;
    end
    @(posedge clk);
    checks += 3;
    if (n_trip == 0)    begin failures++; $display("FAIL: no trip applied"); end
    if (n_force == 0)   begin failures++; $display("FAIL: no force applied"); end
    if (n_timeout == 0) begin failures++; $display("FAIL: pulse window never timed out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
