// dfig_model: doubly-fed induction generator in the synchronous dq frame,
// per unit, with an unloaded (stator open) and a loaded (stator on the grid)
// mode.
//
// State: the four flux linkages psi_qs, psi_ds, psi_qr, psi_dr (per unit,
// psi = omega_b * lambda), advanced by forward Euler once per model step.
//
// Loaded mode (synch = 1, stator contactor closed), motor convention:
//   psi_mq = Xml*(psi_qs/Xls + psi_qr/Xlr),  1/Xml = 1/Xm + 1/Xls + 1/Xlr
//   dpsi_qs/dt = wb*(v_qs - we*psi_ds + Rs/Xls*(psi_mq - psi_qs))
//   dpsi_ds/dt = wb*(v_ds + we*psi_qs + Rs/Xls*(psi_md - psi_ds))
//   dpsi_qr/dt = wb*(v_qr - (we-wr)*psi_dr + Rr/Xlr*(psi_mq - psi_qr))
//   dpsi_dr/dt = wb*(v_dr + (we-wr)*psi_qr + Rr/Xlr*(psi_md - psi_dr))
//   i_qs = (psi_qs - psi_mq)/Xls, ... (same for d and for the rotor)
//   Te = psi_ds*i_qs - psi_qs*i_ds,  Ps = v_ds*i_ds + v_qs*i_qs,
//   Qs = v_qs*i_ds - v_ds*i_qs,  Pr, Qr likewise with rotor quantities.
// Unloaded mode (synch = 0): no stator current, Lr = Xlr + Xm,
//   i_qr = psi_qr/Lr, psi_qs = Xm*i_qr (d likewise),
//   dpsi_qr/dt = wb*(v_qr - (we-wr)*psi_dr - Rr*i_qr), d likewise with +,
//   and the open-circuit stator voltage follows from dpsi_s/dt:
//   E_qs = Xm/Lr*(v_qr - (we-wr)*psi_dr - Rr*i_qr) + we*psi_ds
//   E_ds = Xm/Lr*(v_dr + (we-wr)*psi_qr - Rr*i_dr) - we*psi_qs
// In unloaded mode the stator flux states track Xm/Lr times the rotor flux,
// so switching to the loaded mode starts with zero stator current.
// These are the machine equations of the model description, written with
// the usual signs of the speed-voltage and stator resistive terms, i.e. the
// signs that agree with the flux and current definitions. Machine constants are this design's
// assumptions: the document gives only the rating (2.5 MW, 690 V, 50 Hz).
//
// Inputs we and wr are per unit of the base angular frequency wb; a rotor
// speed of 1.15 pu of synchronous speed is wr = 1.15. Outputs are
// combinational functions of the registered state and the inputs; states
// update on step_en.
module dfig_model
  import hil_pkg::*;
#(
  parameter real TS  = 5.0e-6,   // model step [s]
  parameter real FB  = 50.0,     // base frequency [Hz]
  parameter real RS  = 0.023,    // stator resistance [pu]
  parameter real RR  = 0.016,    // rotor resistance [pu]
  parameter real XLS = 0.18,     // stator leakage reactance [pu]
  parameter real XLR = 0.16,     // rotor leakage reactance [pu]
  parameter real XM  = 2.9       // magnetising reactance [pu]
) (
  input  logic clk,
  input  logic rst,
  input  logic step_en,
  input  logic synch,     // 1: stator connected to the grid (loaded model)
  input  dq_t  v_s,       // grid (stator) voltage [pu], used when synch = 1
  input  dq_t  v_r,       // rotor voltage [pu]
  input  fx_t  we,        // synchronous speed [pu]
  input  fx_t  wr,        // rotor electrical speed [pu]
  output dq_t  i_s,       // stator current [pu]
  output dq_t  i_r,       // rotor current [pu]
  output dq_t  e_s,       // stator terminal voltage [pu]: open-circuit E or grid
  output fx_t  te,        // electromagnetic torque [pu]
  output fx_t  p_s,       // stator active power [pu]
  output fx_t  q_s,       // stator reactive power [pu]
  output fx_t  p_r,       // rotor active power [pu]
  output fx_t  q_r        // rotor reactive power [pu]
);

  localparam real WB  = 2.0 * 3.14159265358979 * FB;
  localparam real XML = 1.0 / (1.0 / XM + 1.0 / XLS + 1.0 / XLR);
  localparam real LRR = XLR + XM;

  localparam coef_t C_WBT  = to_coef(WB * TS);
  localparam coef_t C_XML  = to_coef(XML);
  localparam coef_t C_IXLS = to_coef(1.0 / XLS);
  localparam coef_t C_IXLR = to_coef(1.0 / XLR);
  localparam coef_t C_RSX  = to_coef(RS / XLS);
  localparam coef_t C_RRX  = to_coef(RR / XLR);
  localparam coef_t C_RR   = to_coef(RR);
  localparam coef_t C_ILR  = to_coef(1.0 / LRR);
  localparam coef_t C_XM   = to_coef(XM);
  localparam coef_t C_KM   = to_coef(XM / LRR);

  st_t psi_qs_s, psi_ds_s, psi_qr_s, psi_dr_s;
  fx_t psi_qs, psi_ds, psi_qr, psi_dr;
  fx_t psi_mq, psi_md, wsl;
  fx_t iqs, ids, iqr, idr;
  fx_t dqs, dds, dqr, ddr;   // bracketed derivative terms (per unit)
  fx_t eqs, eds;
  fx_t psi_qs_u, psi_ds_u;   // unloaded-mode stator flux (tracking)

  assign psi_qs = st_fx(psi_qs_s);
  assign psi_ds = st_fx(psi_ds_s);
  assign psi_qr = st_fx(psi_qr_s);
  assign psi_dr = st_fx(psi_dr_s);

  always_comb begin
    wsl = sub(we, wr);
    // defaults: loaded mode
    psi_mq = mulc(add(mulc(psi_qs, C_IXLS), mulc(psi_qr, C_IXLR)), C_XML);
    psi_md = mulc(add(mulc(psi_ds, C_IXLS), mulc(psi_dr, C_IXLR)), C_XML);
    iqs = mulc(sub(psi_qs, psi_mq), C_IXLS);
    ids = mulc(sub(psi_ds, psi_md), C_IXLS);
    iqr = mulc(sub(psi_qr, psi_mq), C_IXLR);
    idr = mulc(sub(psi_dr, psi_md), C_IXLR);
    dqs = add(sub(v_s.q, mulx(we, psi_ds)), mulc(sub(psi_mq, psi_qs), C_RSX));
    dds = add(add(v_s.d, mulx(we, psi_qs)), mulc(sub(psi_md, psi_ds), C_RSX));
    dqr = add(sub(v_r.q, mulx(wsl, psi_dr)), mulc(sub(psi_mq, psi_qr), C_RRX));
    ddr = add(add(v_r.d, mulx(wsl, psi_qr)), mulc(sub(psi_md, psi_dr), C_RRX));
    eqs = v_s.q;
    eds = v_s.d;
    psi_qs_u = '0;
    psi_ds_u = '0;
    if (!synch) begin
      iqs = '0;
      ids = '0;
      iqr = mulc(psi_qr, C_ILR);
      idr = mulc(psi_dr, C_ILR);
      psi_qs_u = mulc(iqr, C_XM);
      psi_ds_u = mulc(idr, C_XM);
      dqr = sub(sub(v_r.q, mulx(wsl, psi_dr)), mulc(iqr, C_RR));
      ddr = sub(add(v_r.d, mulx(wsl, psi_qr)), mulc(idr, C_RR));
      eqs = add(mulc(dqr, C_KM), mulx(we, psi_ds_u));
      eds = sub(mulc(ddr, C_KM), mulx(we, psi_qs_u));
      dqs = '0;
      dds = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      psi_qs_s <= '0;
      psi_ds_s <= '0;
      psi_qr_s <= '0;
      psi_dr_s <= '0;
    end else if (step_en) begin
      psi_qr_s <= st_add(psi_qr_s, inc(dqr, C_WBT));
      psi_dr_s <= st_add(psi_dr_s, inc(ddr, C_WBT));
      if (synch) begin
        psi_qs_s <= st_add(psi_qs_s, inc(dqs, C_WBT));
        psi_ds_s <= st_add(psi_ds_s, inc(dds, C_WBT));
      end else begin
        // stator flux follows the rotor flux (Xm/Lr * psi_r after the step)
        psi_qs_s <= fx_st(mulc(st_fx(st_add(psi_qr_s, inc(dqr, C_WBT))), C_KM));
        psi_ds_s <= fx_st(mulc(st_fx(st_add(psi_dr_s, inc(ddr, C_WBT))), C_KM));
      end
    end
  end

  always_comb begin
    i_s = '{d: ids, q: iqs};
    i_r = '{d: idr, q: iqr};
    e_s = '{d: eds, q: eqs};
    te  = sub(mulx(psi_ds, iqs), mulx(psi_qs, ids));
    p_s = add(mulx(v_s.d, ids), mulx(v_s.q, iqs));
    q_s = sub(mulx(v_s.q, ids), mulx(v_s.d, iqs));
    p_r = add(mulx(v_r.d, idr), mulx(v_r.q, iqr));
    q_r = sub(mulx(v_r.q, idr), mulx(v_r.d, iqr));
  end

endmodule
