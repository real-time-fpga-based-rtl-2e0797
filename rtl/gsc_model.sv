// gsc_model: grid side converter (GSC), GSC choke and DC link.
//
// Switching-function (non-averaged) model of a two-level three-phase PWM
// voltage source converter with ideal IGBTs. Each model step (step_en, every
// 5 us) the three choke currents and the DC link voltage are advanced by
// forward Euler:
//   di_gx/dt = (e_gx - Rg*i_gx - Udc/3*(2*Kx - Ky - Kz)) / Lg
//   dUdc/dt  = (Ka*i_gA + Kb*i_gB + Kc*i_gC - i_load - i_chop - i_dis + i_pre) / Cd
// The switching functions Kx come from the gate pairs (switching_function),
// i_load is the rotor side converter's DC input current, i_chop = Udc/Rchop
// while the board's chopper command is on, i_dis = Udc/Rdis is the DC
// discharge resistor and i_pre the precharge current. While the GSC
// contactor (gsc_en) is open the choke currents are held at zero.
// The equations, the chopper and the discharge resistor follow the model
// description; the per-leg coupling term is written in its symmetric form
// for each phase (printed only for phase A); all component values are this
// design's assumptions (the document gives none), except Rdis = 220 kOhm.
//
// Units: volts and amperes, Q16.16. Outputs are the registered states and
// change one clock after step_en. All arithmetic of one step is combinational
// and has the whole step period to settle (multicycle path).
module gsc_model
  import hil_pkg::*;
#(
  parameter real TS    = 5.0e-6,   // model step [s]
  parameter real LG    = 0.3e-3,   // GSC choke inductance [H]
  parameter real RG    = 3.0e-3,   // GSC choke resistance [Ohm]
  parameter real CD    = 20.0e-3,  // DC link capacitance [F]
  parameter real RCHOP = 1.0,      // chopper (ballast) resistor [Ohm]
  parameter real RDIS  = 220.0e3   // DC link discharge resistor [Ohm]
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       step_en,
  input  logic       gsc_en,        // GSC contactor closed
  input  logic [2:0] gate_up,       // Sa, Sb, Sc upper gates
  input  logic [2:0] gate_dn,       // lower gates
  input  abc_t       e_g,           // grid phase voltages [V]
  input  fx_t        i_load,        // RSC DC input current [A]
  input  fx_t        i_pre,         // precharge current into the link [A]
  input  logic       chopper_cmd,   // chopper IGBT command
  output abc_t       i_g,           // GSC choke currents [A]
  output fx_t        udc,           // DC link voltage [V]
  output fx_t        i_chop,        // chopper current [A]
  output logic [2:0] k,             // switching functions Ka, Kb, Kc
  output logic       shoot_through
);

  localparam coef_t C_TL  = to_coef(TS / LG);
  localparam coef_t C_R   = to_coef(RG);
  localparam coef_t C_TC  = to_coef(TS / CD);
  localparam coef_t C_GCH = to_coef(1.0 / RCHOP);
  localparam coef_t C_GDI = to_coef(1.0 / RDIS);
  localparam coef_t C_3RD = to_coef(1.0 / 3.0);

  st_t  ig_s [3];
  st_t  udc_s;
  fx_t  ig [3];
  fx_t  eg [3];
  logic [2:0] st;

  assign eg[0] = e_g.a;
  assign eg[1] = e_g.b;
  assign eg[2] = e_g.c;

  for (genvar x = 0; x < 3; x++) begin : g_leg
    assign ig[x] = st_fx(ig_s[x]);
    switching_function u_sf (
      .gate_up(gate_up[x]), .gate_dn(gate_dn[x]), .i_in(ig[x]),
      .k(k[x]), .shoot_through(st[x])
    );
  end

  assign shoot_through = |st;
  assign udc    = st_fx(udc_s);
  assign i_chop = chopper_cmd ? mulc(udc, C_GCH) : '0;
  assign i_g    = '{a: ig[0], b: ig[1], c: ig[2]};

  fx_t  u3;        // Udc/3
  fx_t  vconv [3]; // converter pole-to-neutral voltage
  fx_t  idc;       // net current into the DC link
  st_t  ig_n [3];

  always_comb begin
    u3 = mulc(udc, C_3RD);
    idc = '0;
    for (int x = 0; x < 3; x++) begin
      // (2Kx - Ky - Kz) in {-2..2}
      int m;
      m = 2 * int'(k[x]) - int'(k[(x + 1) % 3]) - int'(k[(x + 2) % 3]);
      vconv[x] = sat(64'(u3) * 64'(m));
      if (k[x]) idc = add(idc, ig[x]);
      ig_n[x] = gsc_en
              ? st_add(ig_s[x], inc(sub(sub(eg[x], mulc(ig[x], C_R)), vconv[x]), C_TL))
              : '0;
    end
    idc = sub(idc, i_load);
    idc = sub(idc, i_chop);
    idc = sub(idc, mulc(udc, C_GDI));
    idc = add(idc, i_pre);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int x = 0; x < 3; x++) ig_s[x] <= '0;
      udc_s <= '0;
    end else if (step_en) begin
      for (int x = 0; x < 3; x++) ig_s[x] <= ig_n[x];
      udc_s <= st_add(udc_s, inc(idc, C_TC));
    end
  end

endmodule
