// End-to-end test of hil_dfig_top at its default sizes (200 clocks per 5 us
// step, 65535- and 262143-element logging FIFOs). The testbench plays the
// converter control board through a start-up sequence, one gate update per
// model step:
//   0. main circuit breaker open (no grid voltage), then closed
//   1. precharge from the grid through the diode path until precharge_done
//   2. GSC contactor closed, gates blocked: the GSC diodes conduct
//   3. GSC sine-triangle PWM (3.5 kHz carrier) slightly behind the grid
//   4. chopper on for 5 ms: the DC link must fall
//   5. RSC PWM at slip frequency with the stator open: the machine must
//      build a stator voltage (open loop: no attempt to match the grid)
//   6. stator contactor closed: stator voltage equals the grid, stator
//      current and power appear, the 30 Hz filtered power follows
//   7. a 0.2 pu grid voltage dip of 2 ms
//   8. one step with a shoot-through on an RSC leg
//   9. the operator forces the stator contactor, then trips the emulator:
//      every breaker opens, voltages and currents vanish, and the
//      pulses-active indicators time out
// Alongside, the encoder runs at 128 ticks per line, channel 1 logs without
// being read until its FIFO overflows, and channel 2 logs at 10 us and is
// read back and decoded. Each mechanism is counted; one that never happened
// is a failure. Values are checked against physical bounds and against the
// testbench's own expectations (grid waveform, chopper current, logged
// values, analog output codes of every step).
module tb_hil_dfig_top;
  import hil_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  STEPS_PRE = 30000;

  logic clk = 0, clk_enc = 0, rst = 1, enc_rst = 1, clk_en = 0;
  logic [2:0] gsc_gate_up = 0, gsc_gate_dn = 0, rsc_gate_up = 0, rsc_gate_dn = 0;
  logic chopper_cmd = 0, precharge_cmd = 0, gsc_contactor = 0, stator_contactor = 0;
  fx_t  wr, grid_amp, precharge_set, dip_level;
  logic dip_en = 0, dip_start = 0;
  logic [31:0] dip_steps;
  fx_t  udc, te_f, ps_f, qs_f;
  abc_t v_grid, v_stator, i_grid, i_stator, i_rotor, i_gsc;
  logic precharge_done, shoot_through, dip_active;
  logic [31:0] step_cnt;
  logic enc_en = 0;
  logic signed [31:0] enc_freq;
  logic [31:0] enc_phase_a, enc_phase_b, enc_duty;
  logic [15:0] enc_z_count, enc_count;
  logic enc_a, enc_b, enc_z;
  logic log1_en = 0, log1_rd = 0, log1_clr = 0, log1_valid, log1_full, log1_ovf;
  logic [4:0] log1_sel [8];
  logic [15:0] log1_data, log1_count, log1_missed;
  logic log2_en = 0, log2_decim = 1, log2_rd = 0, log2_clr = 0, log2_valid, log2_full, log2_ovf;
  logic [4:0] log2_sel [16];
  logic [15:0] log2_data, log2_missed;
  logic [17:0] log2_count;

  hil_dfig_top dut (.*);

  always #12.5 clk = ~clk;     // 40 MHz
  always #5    clk_enc = ~clk_enc;  // 100 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pre = 0, n_diode = 0, n_gpwm = 0, n_chop = 0, n_rpwm = 0, n_emf = 0;
  localparam real AO_GAIN = 2.0;              // volts per pu on every AO
  fx_t  ao_gain [8];
  logic signed [15:0] ao_code [8];
  logic [7:0] ao_clip;
  int n_ao = 0, n_clip = 0;
  logic mcb_cmd = 0, force_precharge = 0, force_gsc = 0, force_synch = 0, trip = 0;
  logic mcb_closed, precharge_cb, gsc_cb, stator_cb, gsc_pulses_active, rsc_pulses_active;
  int n_mcb = 0, n_force = 0, n_trip = 0, n_pact = 0, n_pidle = 0;
  int n_synch = 0, n_dip = 0, n_shoot = 0, n_ovf = 0, n_log2 = 0, n_enc = 0, n_lpf = 0;

  initial begin
    #500ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at step %0d", what, step_cnt);
    end
  endtask

  function automatic real fr(fx_t v);
    return real'(v) / 65536.0;
  endfunction

  function automatic real absr(real v);
    return v < 0 ? -v : v;
  endfunction

  // encoder: count A rising edges and check their spacing
  int enc_last = -1, enc_cyc = 0;
  logic enc_pa = 0;
  always @(posedge clk_enc) begin
    enc_cyc <= enc_cyc + 1;
    enc_pa <= enc_a;
    if (enc_en && enc_a && !enc_pa) begin
      if (enc_last >= 0) begin
        checks++;
        if (enc_cyc - enc_last != 128) failures++;
      end
      enc_last <= enc_cyc;
      n_enc <= n_enc + 1;
    end
  end

  // model time kept by the testbench: angles for the PWM references
  real th_s = 0.0, th_r = 0.0;
  int  nstep = 0;

  // wait for the next step strobe, then one more clock for the outputs
  // analog outputs: the codes loaded at a strobe come from the values
  // shown before it; expected code = x / base * gain / 10 V * 32768
  function automatic real ao_exp(real x_pu);
    real e;
    e = x_pu * AO_GAIN / 10.0 * 32768.0;
    if (e > 32767.0) e = 32767.0;
    if (e < -32768.0) e = -32768.0;
    return e;
  endfunction

  task automatic next_step();
    real ex [8];
    #1;                                      // let this step's inputs settle
    ex[0] = ao_exp(fr(i_grid.a) / 2953.0);   ex[1] = ao_exp(fr(i_rotor.a) / 965.6);
    ex[2] = ao_exp(fr(i_rotor.b) / 965.6);   ex[3] = ao_exp(fr(i_rotor.c) / 965.6);
    ex[4] = ao_exp(fr(i_gsc.a) / 2953.0);    ex[5] = ao_exp(fr(udc) / 563.0);
    ex[6] = ao_exp(fr(v_grid.a) / 563.0);    ex[7] = ao_exp(fr(v_stator.a) / 563.0);
    @(posedge clk iff dut.step_en);
    @(posedge clk);
    #1;
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (real'(ao_code[c]) - ex[c] > 4.0 || ex[c] - real'(ao_code[c]) > 4.0) begin
        failures++;
        if (failures < 20) $display("FAIL: AO%0d code %0d expected %f", c, ao_code[c], ex[c]);
      end
      if (ao_code[c] != 0) n_ao++;
      if (ao_clip[c]) n_clip++;
    end
    nstep++;
    th_s = th_s + 2.0 * PI * 50.0 * 5.0e-6;
    th_r = th_r + 2.0 * PI * 50.0 * 5.0e-6 * fr(wr);
  endtask

  // sine-triangle PWM: gates for the next step
  function automatic logic [2:0] pwm(real m, real ang);
    real ph, carrier;
    logic [2:0] g;
    ph = (nstep % 57) / 57.0;                       // 57 steps: 3.5 kHz
    carrier = (ph < 0.5) ? 4.0 * ph - 1.0 : 3.0 - 4.0 * ph;
    for (int x = 0; x < 3; x++)
      g[x] = (m * $cos(ang - x * 2.0 * PI / 3.0) > carrier);
    return g;
  endfunction

  function automatic real amp3(abc_t v);
    // space-vector amplitude of a three-phase set
    real al, be;
    al = (2.0 * fr(v.a) - fr(v.b) - fr(v.c)) / 3.0;
    be = (fr(v.b) - fr(v.c)) / $sqrt(3.0);
    return $sqrt(al * al + be * be);
  endfunction

  // read channel 2 in the background (host side), decoding each float
  logic [31:0] w2;
  int half2 = 0;
  always @(posedge clk) begin
    log2_rd <= log2_en && (log2_count > 2) && !log2_rd;
    if (log2_valid) begin
      if (half2 == 0) begin
        w2[31:16] <= log2_data;
        half2 <= 1;
      end else begin
        w2[15:0] <= log2_data;
        half2 <= 0;
        n_log2 <= n_log2 + 1;
      end
    end
  end
  function automatic real sgl2r(logic [31:0] w);
    real v;
    int e;
    if (w[30:0] == 0) return 0.0;
    v = 1.0 + real'(w[22:0]) / 8388608.0;
    e = int'(w[30:23]) - 127;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    if (w[31]) v = -v;
    return v;
  endfunction

  // the first variable of channel 2 is wr: its float must equal wr exactly
  int n_wr_checked = 0;
  always @(posedge clk) begin
    if (log2_valid && half2 == 1 && (n_log2 % 16) == 0) begin
      logic [31:0] w;
      real g;
      w = {w2[31:16], log2_data};
      g = sgl2r(w);
      checks++;
      if (absr(g - fr(wr)) > 1.0e-6) begin
        failures++; $display("FAIL logged wr %f", g);
      end
      n_wr_checked <= n_wr_checked + 1;
    end
  end

  initial begin
    real u0, u1, mr, phr;
    wr = to_fx(1.15);                      // 1150 rpm, 6-pole: 1.15 pu
    grid_amp = to_fx(1.0);
    precharge_set = to_fx(800.0);
    dip_level = to_fx(0.2);
    dip_steps = 400;
    enc_freq = 32'sh0200_0000;             // 1/128 line per tick
    enc_phase_a = 0; enc_phase_b = 32'hC000_0000; enc_duty = 32'h8000_0000;
    enc_z_count = 2048;
    for (int i = 0; i < 8; i++)  ao_gain[i] = to_fx(AO_GAIN);
    for (int i = 0; i < 8; i++)  log1_sel[i] = 5'(i);
    log2_sel[0] = 31;
    for (int i = 1; i < 16; i++) log2_sel[i] = 5'(i + 7);
    repeat (4) @(posedge clk);
    rst <= 0; enc_rst <= 0; clk_en <= 1; enc_en <= 1;
    log1_en <= 1; log2_en <= 1;

    // 0. main circuit breaker open, then closed
    for (int n = 0; n < 20; n++) begin
      next_step();
      check("no grid voltage with the MCB open", v_grid.a == 0 && v_grid.b == 0 && v_grid.c == 0);
      check("MCB check-back open", !mcb_closed);
    end
    mcb_cmd <= 1;
    next_step();
    check("MCB check-back closed", mcb_closed);
    if (mcb_closed && amp3(v_grid) > 500.0) n_mcb++;

    // 1. precharge
    precharge_cmd <= 1;
    for (int n = 0; n < STEPS_PRE && !precharge_done; n++) begin
      next_step();
      check("grid waveform", absr(fr(v_grid.a) - 563.0 * $cos(th_s)) < 2.0);
      check("udc range", fr(udc) >= -1.0 && fr(udc) < 1000.0);
    end
    if (precharge_done) n_pre++;
    check("precharged", fr(udc) >= 800.0);
    $display("precharged to %f V at step %0d", fr(udc), step_cnt);
    precharge_cmd <= 0;

    // 2. GSC contactor closed, gates blocked: diodes conduct
    gsc_contactor <= 1;
    for (int n = 0; n < 400; n++) begin
      next_step();
      if (absr(fr(i_gsc.a)) > 1.0) n_diode++;
    end

    // 3. GSC PWM, converter voltage slightly behind the grid
    for (int n = 0; n < 4000; n++) begin
      logic [2:0] g;
      g = pwm(0.95, th_s - 0.05);
      gsc_gate_up <= g; gsc_gate_dn <= ~g;
      next_step();
      n_gpwm++;
      if (gsc_pulses_active && gsc_cb) n_pact++;
      check("udc bounded", fr(udc) > 300.0 && fr(udc) < 1500.0);
      check("igsc bounded", absr(fr(i_gsc.a)) < 5000.0);
      check("grid current sum", absr(fr(i_grid.a) - fr(i_gsc.a) - fr(i_stator.a)) < 0.01);
    end
    $display("after GSC PWM: udc %f V", fr(udc));

    // 4. chopper
    u0 = fr(udc);
    chopper_cmd <= 1;
    for (int n = 0; n < 1000; n++) begin
      logic [2:0] g;
      g = pwm(0.95, th_s - 0.05);
      gsc_gate_up <= g; gsc_gate_dn <= ~g;
      next_step();
      if (dut.i_chop > 0) n_chop++;
    end
    chopper_cmd <= 0;
    u1 = fr(udc);
    check("chopper discharges the link", u1 < u0 - 20.0);
    $display("chopper: udc %f -> %f V", u0, u1);

    // 5. RSC PWM at slip frequency with the stator open
    mr = 0.3; phr = 0.2;
    for (int n = 0; n < 6000; n++) begin
      logic [2:0] g, r;
      g = pwm(0.95, th_s - 0.05);
      gsc_gate_up <= g; gsc_gate_dn <= ~g;
      r = pwm(mr, th_s - th_r + phr);
      rsc_gate_up <= r; rsc_gate_dn <= ~r;
      next_step();
      n_rpwm++;
      check("stator current zero while open", i_stator.a == 0 && i_stator.b == 0);
      if (n > 4000 && amp3(v_stator) > 100.0) n_emf++;
    end
    $display("open-circuit stator voltage %f V (grid %f V), udc %f V", amp3(v_stator), amp3(v_grid), fr(udc));

    // 6. stator contactor closed
    stator_contactor <= 1;
    for (int n = 0; n < 6000; n++) begin
      logic [2:0] g, r;
      g = pwm(0.95, th_s - 0.05);
      gsc_gate_up <= g; gsc_gate_dn <= ~g;
      r = pwm(mr, th_s - th_r + phr);
      rsc_gate_up <= r; rsc_gate_dn <= ~r;
      next_step();
      n_synch++;
      check("stator voltage is the grid", v_stator == v_grid);
      if (n > 2000 && absr(fr(ps_f)) > 0.001) n_lpf++;
    end
    $display("connected: |is| %f A, |ir| %f A, Ps_f %f pu, Qs_f %f pu, Te_f %f pu",
             amp3(i_stator), amp3(i_rotor), fr(ps_f), fr(qs_f), fr(te_f));
    check("stator current flows", amp3(i_stator) > 1.0);
    check("stator current within range", amp3(i_stator) < 32000.0);

    // 7. grid voltage dip
    dip_en <= 1;
    @(posedge clk) dip_start <= 1;
    @(posedge clk) dip_start <= 0;
    for (int n = 0; n < 600; n++) begin
      logic [2:0] g, r;
      g = pwm(0.95, th_s - 0.05);
      gsc_gate_up <= g; gsc_gate_dn <= ~g;
      r = pwm(mr, th_s - th_r + phr);
      rsc_gate_up <= r; rsc_gate_dn <= ~r;
      next_step();
      if (dip_active) begin
        n_dip++;
        check("dip depth", absr(amp3(v_grid) - 0.2 * 563.0) < 2.0);
      end
    end
    check("dip duration", n_dip == 400);
    check("grid back", absr(amp3(v_grid) - 563.0) < 2.0);

    // 8. shoot-through on one RSC leg for a step
    rsc_gate_up <= 3'b001; rsc_gate_dn <= 3'b001;
    @(posedge clk iff dut.step_en);
    #1;
    if (shoot_through) n_shoot++;
    rsc_gate_up <= 0; rsc_gate_dn <= 0; gsc_gate_up <= 0; gsc_gate_dn <= 0;
    next_step();

    // 9. operator panel: force the stator contactor, then trip
    stator_contactor <= 0; force_synch <= 1;
    repeat (5) next_step();
    check("forced stator contactor", stator_cb);
    if (stator_cb) n_force++;
    force_synch <= 0; trip <= 1;
    for (int n = 0; n < 250; n++) begin
      next_step();
      n_trip++;
      check("trip opens everything", !mcb_closed && !precharge_cb && !gsc_cb && !stator_cb);
      check("no grid voltage after trip", v_grid.a == 0 && v_grid.b == 0 && v_grid.c == 0);
      // the GSC choke currents are cleared by the first update with the
      // contactor open, so they are zero from the second step on
      if (n > 0) check("no stator or GSC current after trip", i_stator.a == 0 && i_gsc.a == 0);
      if (!gsc_pulses_active && !rsc_pulses_active) n_pidle++;
    end
    check("pulse indicators time out", !gsc_pulses_active && !rsc_pulses_active);

    // logging: channel 1 was never read and must have overflowed
    if (log1_ovf && log1_full) n_ovf++;
    check("channel 1 holds its depth", log1_count == 16'(65535));
    log1_en <= 0;
    repeat (40) @(posedge clk);
    log1_clr <= 1;
    @(posedge clk) log1_clr <= 0;
    @(posedge clk);
    #1 check("alarm cleared", !log1_ovf);
    check("logged wr checked", n_wr_checked > 100);
    check("no sample missed", log1_missed == 0 && log2_missed == 0);

    $display("mechanisms: precharge %0d diode %0d gsc_pwm %0d chopper %0d rsc_pwm %0d emf %0d synch %0d lpf %0d dip %0d shoot %0d fifo_ovf %0d log2_words %0d enc_lines %0d ao %0d ao_clip %0d",
             n_pre, n_diode, n_gpwm, n_chop, n_rpwm, n_emf, n_synch, n_lpf, n_dip, n_shoot, n_ovf, n_log2, n_enc, n_ao, n_clip);
    $display("breakers: mcb %0d force %0d trip %0d pulses_active %0d pulses_idle %0d", n_mcb, n_force, n_trip, n_pact, n_pidle);
    check("mech main breaker", n_mcb > 0);
    check("mech forced contactor", n_force > 0);
    check("mech trip", n_trip > 0);
    check("mech pulses active", n_pact > 0);
    check("mech pulses idle", n_pidle > 0);
    check("mech analog outputs", n_ao > 0);
    check("mech analog output at full scale", n_clip > 0);
    check("mech precharge", n_pre > 0);
    check("mech diode rectifier", n_diode > 0);
    check("mech GSC PWM", n_gpwm > 0);
    check("mech chopper", n_chop > 0);
    check("mech RSC PWM", n_rpwm > 0);
    check("mech open-circuit EMF", n_emf > 0);
    check("mech synchronised mode", n_synch > 0);
    check("mech filtered power", n_lpf > 0);
    check("mech voltage dip", n_dip > 0);
    check("mech shoot-through flag", n_shoot > 0);
    check("mech FIFO overflow", n_ovf > 0);
    check("mech channel 2 logging", n_log2 > 1000);
    check("mech encoder", n_enc > 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
