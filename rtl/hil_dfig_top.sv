// hil_dfig_top: FPGA part of a real-time hardware-in-the-loop emulator of a
// 2.5 MW doubly-fed induction generator (DFIG) wind power converter.
//
// A real DFIG converter control board drives this design's gate inputs (12
// IGBT gates of the grid- and rotor-side converters, chopper, main breaker,
// precharge and contactor commands; breaker_status resolves them with the
// host's force and trip inputs and returns the check-backs). Once every 5 us model step (200 clocks of the 40 MHz
// clock, step_timer) the design advances the electrical model:
//   grid_source  -> grid angle theta_s and amplitude (with voltage dip)
//   dc_precharge -> precharge current from the grid into the DC link
//   gsc_model    -> GSC choke currents and DC link voltage (chopper, load)
//   rsc_model    -> rotor side converter phase voltages and DC current
//   rlc_filter   -> dv/dt-filtered rotor voltages
//   dfig_model   -> machine fluxes and currents, unloaded or on the grid
//   rc_filter_dq -> filtered open-circuit stator voltage
// and returns the analog feedbacks the board's sensors would measure (grid,
// stator and DC link voltages, grid, stator, rotor and GSC currents) plus
// filtered P, Q and torque for the turbine model, which runs on the host
// CPU together with the rotor speed it computes (wr input).
// Converter models work in volts and amperes; the machine model in per
// unit with bases VS_BASE (563 V phase peak), IS_BASE (2953 A), IR_BASE
// (965.6 A) and VR_BASE (rotor voltage base, VS_BASE*IS_BASE/IR_BASE).
// Rotor quantities are converted between abc and dq with the slip angle
// theta_s - theta_r; theta_r integrates the electrical rotor speed.
// Alongside run a 100 MHz incremental encoder simulator (own clock, ABZ
// outputs for the board) and two logging channels (8 and 16 selectable
// variables, DMA FIFOs of 65535 and 262143 16-bit elements) towards the host,
// and ao_scale turns eight feedbacks into +/-10 V DAC words (AO0..AO7).
// Several outputs of the converter and filter blocks (leg and line
// voltages, switch currents, filter internals, GSC switching functions)
// are not needed here and stay unconnected; lint reports them as unused.
//
// Timing: all model state registers update on the step strobe; the model
// arithmetic between them is combinational and is given the whole step
// (200 clocks) to settle, a multicycle path. Outputs are valid from one
// clock after each step strobe until the next. The block structure, the 5 us
// step, the 40/100 MHz clocks, the logging channel sizes and the filter
// coefficients follow the document; the number formats, the per-unit
// interface and the machine and component values are this design's.
module hil_dfig_top
  import hil_pkg::*;
#(
  parameter int unsigned TICKS      = 200,     // clocks per model step
  parameter int unsigned LOG1_DEPTH = 65535,   // channel 1 FIFO elements
  parameter int unsigned LOG2_DEPTH = 262143,  // channel 2 FIFO elements
  parameter real         VS_BASE    = 563.0,   // stator/grid voltage base [V]
  parameter real         IS_BASE    = 2953.0,  // stator current base [A]
  parameter real         IR_BASE    = 965.6    // rotor current base [A]
) (
  input  logic        clk,              // 40 MHz
  input  logic        rst,
  input  logic        clk_en,           // run the model
  // control board commands (fiber optic and digital inputs)
  input  logic [2:0]  gsc_gate_up,      // GSC upper IGBTs (phase a, b, c)
  input  logic [2:0]  gsc_gate_dn,      // GSC lower IGBTs
  input  logic [2:0]  rsc_gate_up,      // RSC S1, S3, S5
  input  logic [2:0]  rsc_gate_dn,      // RSC S4, S6, S2
  input  logic        chopper_cmd,
  input  logic        mcb_cmd,          // main circuit breaker command
  input  logic        precharge_cmd,    // DC precharge contactor command
  input  logic        gsc_contactor,    // GSC contactor command
  input  logic        stator_contactor, // stator contactor command (synchronise)
  // host operator panel
  input  logic        force_precharge,  // force the precharge contactor closed
  input  logic        force_gsc,        // force the GSC contactor closed
  input  logic        force_synch,      // force the stator contactor closed
  input  logic        trip,             // open every breaker and contactor
  // host / turbine model
  input  fx_t         wr,               // rotor electrical speed [pu]
  input  fx_t         grid_amp,         // grid amplitude [pu]
  input  fx_t         precharge_set,    // precharge set-point [V]
  input  logic        dip_en,
  input  logic        dip_start,
  input  fx_t         dip_level,        // grid amplitude during a dip [pu]
  input  logic [31:0] dip_steps,        // dip duration [steps]
  // feedbacks to the control board (through the analog outputs)
  output fx_t         udc,              // DC link voltage [V]
  output abc_t        v_grid,           // grid phase voltages [V]
  output abc_t        v_stator,         // stator phase voltages [V]
  output abc_t        i_grid,           // grid currents (stator + GSC) [A]
  output abc_t        i_stator,         // stator currents [A]
  // analog output channels (AO0..AO7, see ao_scale)
  input  fx_t         ao_gain [8],      // output volts per pu, per channel
  output logic signed [15:0] ao_code [8], // DAC words, +/-10 V full scale
  output logic [7:0]  ao_clip,          // channel at full scale
  output abc_t        i_rotor,          // rotor currents [A]
  output abc_t        i_gsc,            // GSC currents [A]
  output logic        precharge_done,
  output logic        mcb_closed,       // check-backs of the breakers
  output logic        precharge_cb,
  output logic        gsc_cb,
  output logic        stator_cb,
  output logic        gsc_pulses_active,
  output logic        rsc_pulses_active,
  output logic        shoot_through,    // both gates of a leg on
  output logic        dip_active,
  // to the turbine model and displays
  output fx_t         te_f,             // torque, 30 Hz filtered [pu]
  output fx_t         ps_f,             // stator active power, filtered [pu]
  output fx_t         qs_f,             // stator reactive power, filtered [pu]
  output logic [31:0] step_cnt,         // main loop iterations
  // incremental encoder simulator (100 MHz domain)
  input  logic        clk_enc,
  input  logic        enc_rst,
  input  logic        enc_en,
  input  logic signed [31:0] enc_freq,  // periods per tick, Q0.32
  input  logic [31:0] enc_phase_a,
  input  logic [31:0] enc_phase_b,
  input  logic [31:0] enc_duty,
  input  logic [15:0] enc_z_count,
  output logic        enc_a,
  output logic        enc_b,
  output logic        enc_z,
  output logic [15:0] enc_count,        // line counter (A counter)
  // logging channel 1: 8 variables, 5 us
  input  logic        log1_en,
  input  logic [4:0]  log1_sel [8],
  input  logic        log1_rd,
  output logic [15:0] log1_data,
  output logic        log1_valid,
  output logic        log1_full,
  output logic        log1_ovf,
  input  logic        log1_clr,
  output logic [15:0] log1_count,       // elements waiting in the FIFO
  output logic [15:0] log1_missed,      // samples not logged
  // logging channel 2: 16 variables, 5 or 10 us
  input  logic        log2_en,
  input  logic        log2_decim,
  input  logic [4:0]  log2_sel [16],
  input  logic        log2_rd,
  output logic [15:0] log2_data,
  output logic        log2_valid,
  output logic        log2_full,
  output logic        log2_ovf,
  input  logic        log2_clr,
  output logic [17:0] log2_count,
  output logic [15:0] log2_missed
);

  localparam real    VR_BASE = VS_BASE * IS_BASE / IR_BASE;
  localparam real    TS      = real'(TICKS) / 40.0e6;
  localparam angle_t ANG_INC = angle_t'($rtoi(50.0 * TS * 4294967296.0 + 0.5));

  // ---------------- step and angles ----------------
  logic   step_en;
  angle_t theta_s, theta_r, theta_sl;
  fx_t    amp_eff;
  fx_t    sin_s, cos_s, sin_sl, cos_sl;
  fx_t    we;

  assign we = to_fx(1.0);

  step_timer #(.TICKS(TICKS)) u_step (
    .clk, .rst, .enable(clk_en), .step_en, .step_cnt
  );

  // breakers and contactors switch between model steps
  breaker_status u_brk (
    .clk, .rst, .step_en, .mcb_cmd, .precharge_cmd, .gsc_cmd(gsc_contactor),
    .synch_cmd(stator_contactor), .force_precharge, .force_gsc, .force_synch,
    .trip, .gsc_gates({gsc_gate_dn, gsc_gate_up}), .rsc_gates({rsc_gate_dn, rsc_gate_up}),
    .mcb_closed, .precharge_closed(precharge_cb), .gsc_closed(gsc_cb),
    .stator_closed(stator_cb), .gsc_pulses_active, .rsc_pulses_active
  );

  grid_source #(.TS(TS), .PHASE_INC(ANG_INC)) u_grid (
    .clk, .rst, .step_en, .amp(grid_amp), .dip_en, .dip_start, .dip_level,
    .dip_steps, .theta_s, .amp_eff, .dip_active
  );

  // rotor electrical angle: theta_r += wr * (angle step at base speed)
  always_ff @(posedge clk) begin
    if (rst)          theta_r <= '0;
    else if (step_en) theta_r <= theta_r + angle_t'((64'(wr) * 64'(ANG_INC)) >>> FX_FB);
  end
  assign theta_sl = theta_s - theta_r;

  sincos u_sc_s  (.theta(theta_s),  .sin_o(sin_s),  .cos_o(cos_s));
  sincos u_sc_sl (.theta(theta_sl), .sin_o(sin_sl), .cos_o(cos_sl));

  // ---------------- grid ----------------
  dq_t  vg_dq;
  abc_t e_g;
  assign vg_dq = '{d: mcb_closed ? amp_eff : '0, q: '0};

  inv_park_transform #(.GAIN(VS_BASE)) u_vg_abc (
    .x_dq(vg_dq), .sin_t(sin_s), .cos_t(cos_s), .x_abc(e_g)
  );

  // ---------------- DC link, GSC, precharge ----------------
  fx_t  i_pre, i_in, i_chop;
  logic [2:0] k_gsc, sf2_rsc;
  logic st_gsc, st_rsc;

  dc_precharge u_pre (
    .cmd(precharge_cb), .e_g, .udc, .setpoint(precharge_set),
    .i_pre, .done(precharge_done)
  );

  gsc_model #(.TS(TS)) u_gsc (
    .clk, .rst, .step_en, .gsc_en(gsc_cb), .gate_up(gsc_gate_up),
    .gate_dn(gsc_gate_dn), .e_g, .i_load(i_in), .i_pre, .chopper_cmd,
    .i_g(i_gsc), .udc, .i_chop, .k(k_gsc), .shoot_through(st_gsc)
  );

  // ---------------- RSC, dv/dt filter ----------------
  abc_t v_o, v_ll, v_n, i_sw, v_rf, i_f, u_cf;
  dq_t  v_r_dq;

  rsc_model u_rsc (
    .udc, .gate_up(rsc_gate_up), .gate_dn(rsc_gate_dn), .i_r(i_rotor),
    .v_o, .v_ll, .v_n, .i_sw, .i_in, .sf2(sf2_rsc), .shoot_through(st_rsc)
  );

  rlc_filter #(.TS(TS)) u_rlc (
    .clk, .rst, .step_en, .v_in(v_n), .v_out(v_rf), .i_f, .u_cf
  );

  park_transform #(.GAIN(1.0 / VR_BASE)) u_vr_dq (
    .x_abc(v_rf), .sin_t(sin_sl), .cos_t(cos_sl), .x_dq(v_r_dq)
  );

  assign shoot_through = st_gsc | st_rsc;

  // ---------------- machine ----------------
  dq_t i_s_dq, i_r_dq, e_s_dq, v_sf_dq, v_st_dq;
  fx_t te, p_s, q_s, p_r, q_r;

  dfig_model #(.TS(TS)) u_dfig (
    .clk, .rst, .step_en, .synch(stator_cb), .v_s(vg_dq), .v_r(v_r_dq),
    .we, .wr, .i_s(i_s_dq), .i_r(i_r_dq), .e_s(e_s_dq), .te, .p_s, .q_s,
    .p_r, .q_r
  );

  rc_filter_dq #(.TS(TS)) u_rc (
    .clk, .rst, .step_en, .v_gen(e_s_dq), .we, .v_f(v_sf_dq)
  );

  // stator terminal voltage: the grid once connected, else the filtered EMF
  assign v_st_dq = stator_cb ? vg_dq : v_sf_dq;

  inv_park_transform #(.GAIN(VS_BASE)) u_vs_abc (
    .x_dq(v_st_dq), .sin_t(sin_s), .cos_t(cos_s), .x_abc(v_stator)
  );
  inv_park_transform #(.GAIN(IS_BASE)) u_is_abc (
    .x_dq(i_s_dq), .sin_t(sin_s), .cos_t(cos_s), .x_abc(i_stator)
  );
  inv_park_transform #(.GAIN(IR_BASE)) u_ir_abc (
    .x_dq(i_r_dq), .sin_t(sin_sl), .cos_t(cos_sl), .x_abc(i_rotor)
  );

  assign v_grid = e_g;
  assign i_grid = '{a: add(i_stator.a, i_gsc.a),
                    b: add(i_stator.b, i_gsc.b),
                    c: add(i_stator.c, i_gsc.c)};

  // ---------------- 30 Hz filters towards the turbine model ----------------
  lpf_bw u_lpf_te (.clk, .rst, .step_en, .x(te),  .y(te_f));
  lpf_bw u_lpf_ps (.clk, .rst, .step_en, .x(p_s), .y(ps_f));
  lpf_bw u_lpf_qs (.clk, .rst, .step_en, .x(q_s), .y(qs_f));

  // ---------------- encoder simulator (100 MHz) ----------------
  encoder_sim u_enc (
    .clk(clk_enc), .rst(enc_rst), .enable(enc_en), .freq(enc_freq),
    .phase_a(enc_phase_a), .phase_b(enc_phase_b), .duty(enc_duty),
    .z_count(enc_z_count), .a(enc_a), .b(enc_b), .z(enc_z), .line_cnt(enc_count)
  );

  // ---------------- logging ----------------
  fx_t bank [32];
  always_comb begin
    bank[0]  = udc;
    bank[1]  = i_gsc.a;    bank[2]  = i_gsc.b;    bank[3]  = i_gsc.c;
    bank[4]  = v_grid.a;   bank[5]  = v_grid.b;   bank[6]  = v_grid.c;
    bank[7]  = v_stator.a; bank[8]  = v_stator.b; bank[9]  = v_stator.c;
    bank[10] = i_stator.a; bank[11] = i_stator.b; bank[12] = i_stator.c;
    bank[13] = i_rotor.a;  bank[14] = i_rotor.b;  bank[15] = i_rotor.c;
    bank[16] = te;         bank[17] = p_s;        bank[18] = q_s;
    bank[19] = p_r;        bank[20] = q_r;
    bank[21] = v_r_dq.d;   bank[22] = v_r_dq.q;
    bank[23] = i_r_dq.d;   bank[24] = i_r_dq.q;
    bank[25] = i_s_dq.d;   bank[26] = i_s_dq.q;
    bank[27] = e_s_dq.d;   bank[28] = e_s_dq.q;
    bank[29] = i_chop;     bank[30] = i_pre;      bank[31] = wr;
  end

  logic [$clog2(LOG1_DEPTH+1)-1:0] log1_cnt;
  logic [$clog2(LOG2_DEPTH+1)-1:0] log2_cnt;

  assign log1_count = 16'(log1_cnt);
  assign log2_count = 18'(log2_cnt);

  log_channel #(.NVAR(8), .NSRC(32), .DEPTH(LOG1_DEPTH)) u_log1 (
    .clk, .rst, .step_en, .enable(log1_en), .decim(1'b0), .src(bank),
    .sel(log1_sel), .rd_en(log1_rd), .rd_data(log1_data), .rd_valid(log1_valid),
    .full(log1_full), .overflow(log1_ovf), .alarm_clr(log1_clr),
    .count(log1_cnt), .missed(log1_missed)
  );

  log_channel #(.NVAR(16), .NSRC(32), .DEPTH(LOG2_DEPTH)) u_log2 (
    .clk, .rst, .step_en, .enable(log2_en), .decim(log2_decim), .src(bank),
    .sel(log2_sel), .rd_en(log2_rd), .rd_data(log2_data), .rd_valid(log2_valid),
    .full(log2_full), .overflow(log2_ovf), .alarm_clr(log2_clr),
    .count(log2_cnt), .missed(log2_missed)
  );

  // ---------------- analog outputs ----------------
  // AO0 grid current, AO1..AO3 rotor currents, AO4 GSC current, AO5 DC
  // link, AO6 grid voltage, AO7 stator voltage (phase a), in per unit
  localparam coef_t C_PU_IS = to_coef(64.0 / IS_BASE);
  localparam coef_t C_PU_IR = to_coef(64.0 / IR_BASE);
  localparam coef_t C_PU_VS = to_coef(64.0 / VS_BASE);
  fx_t ao_x [8];
  // the 1/base coefficients carry a factor 64 for resolution, removed here
  function automatic fx_t pu(fx_t v, coef_t c);
    return fx_t'(mulc(v, c) >>> 6);
  endfunction
  always_comb begin
    ao_x[0] = pu(i_grid.a,   C_PU_IS);
    ao_x[1] = pu(i_rotor.a,  C_PU_IR);
    ao_x[2] = pu(i_rotor.b,  C_PU_IR);
    ao_x[3] = pu(i_rotor.c,  C_PU_IR);
    ao_x[4] = pu(i_gsc.a,    C_PU_IS);
    ao_x[5] = pu(udc,        C_PU_VS);
    ao_x[6] = pu(v_grid.a,   C_PU_VS);
    ao_x[7] = pu(v_stator.a, C_PU_VS);
  end

  ao_scale #(.NCH(8)) u_ao (
    .clk, .rst, .step_en, .x(ao_x), .gain(ao_gain), .code(ao_code), .clip(ao_clip)
  );

endmodule
