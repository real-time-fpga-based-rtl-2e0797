// Self-checking test of dfig_model: 20 ms with the stator open (rotor voltage
// applied, rotor at 1.15 pu speed), then the stator is connected to a 1 pu
// grid for 20 ms. Every step the model is compared with a double-precision
// forward-Euler evaluation of the same machine equations; the mode switch
// must start with (almost) zero stator current.
module tb_dfig_model;
  import hil_pkg::*;
  localparam real TS = 5.0e-6, WB = 2.0 * 3.14159265358979 * 50.0;
  localparam real RS = 0.023, RR = 0.016, XLS = 0.18, XLR = 0.16, XM = 2.9;
  localparam real XML = 1.0 / (1.0 / XM + 1.0 / XLS + 1.0 / XLR), LR = XLR + XM;

  logic clk = 0, rst = 1, step_en = 0, synch = 0;
  dq_t v_s, v_r, i_s, i_r, e_s;
  fx_t we, wr, te, p_s, q_s, p_r, q_r;
  int checks = 0, failures = 0;

  dfig_model dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fr(fx_t v);
    return real'(v) / 65536.0;
  endfunction

  task automatic check(string what, real got, real exp);
    real tol;
    tol = 3.0e-3 + 0.005 * (exp < 0 ? -exp : exp);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    real qs, ds, qr, dr, vqs, vds, vqr, vdr, w_e, w_r, wsl;
    real mq, md, iqs, ids, iqr, idr, eq, ed;
    qs = 0; ds = 0; qr = 0; dr = 0;
    w_e = 1.0; w_r = 1.15; wsl = w_e - w_r;
    vqs = 0.0; vds = 1.0; vqr = -0.16; vdr = 0.02;
    we = to_fx(w_e); wr = to_fx(w_r);
    v_s = '{d: to_fx(vds), q: to_fx(vqs)};
    v_r = '{d: to_fx(vdr), q: to_fx(vqr)};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 8000; n++) begin
      synch = (n >= 4000);
      @(posedge clk);
      // reference outputs for the current state
      if (!synch) begin
        real dq, dd;
        iqs = 0; ids = 0; iqr = qr / LR; idr = dr / LR;
        dq = vqr - wsl * dr - RR * iqr;
        dd = vdr + wsl * qr - RR * idr;
        eq = XM / LR * dq + w_e * XM * idr;
        ed = XM / LR * dd - w_e * XM * iqr;
        check("Eqs", fr(e_s.q), eq);
        check("Eds", fr(e_s.d), ed);
        check("iqr", fr(i_r.q), iqr);
        check("idr", fr(i_r.d), idr);
        qr = qr + WB * TS * dq;
        dr = dr + WB * TS * dd;
        qs = XM / LR * qr;
        ds = XM / LR * dr;
      end else begin
        real nqs, nds, nqr, ndr;
        mq = XML * (qs / XLS + qr / XLR);
        md = XML * (ds / XLS + dr / XLR);
        iqs = (qs - mq) / XLS; ids = (ds - md) / XLS;
        iqr = (qr - mq) / XLR; idr = (dr - md) / XLR;
        check("iqs", fr(i_s.q), iqs);
        check("ids", fr(i_s.d), ids);
        check("iqr", fr(i_r.q), iqr);
        check("idr", fr(i_r.d), idr);
        check("Te", fr(te), ds * iqs - qs * ids);
        check("Ps", fr(p_s), vds * ids + vqs * iqs);
        check("Qs", fr(q_s), vqs * ids - vds * iqs);
        check("Pr", fr(p_r), vdr * idr + vqr * iqr);
        check("Qr", fr(q_r), vqr * idr - vdr * iqr);
        if (n == 4000) begin
          checks++;
          if (iqs > 0.01 || iqs < -0.01 || ids > 0.01 || ids < -0.01) begin
            failures++; $display("FAIL: stator current jump at connection");
          end
        end
        nqs = qs + WB * TS * (vqs - w_e * ds + RS / XLS * (mq - qs));
        nds = ds + WB * TS * (vds + w_e * qs + RS / XLS * (md - ds));
        nqr = qr + WB * TS * (vqr - wsl * dr + RR / XLR * (mq - qr));
        ndr = dr + WB * TS * (vdr + wsl * qr + RR / XLR * (md - dr));
        qs = nqs; ds = nds; qr = nqr; dr = ndr;
      end
      step_en <= 1;
      @(posedge clk); step_en <= 0;
      if (n == 3999) $display("open-circuit stator voltage |E| ~ d %f q %f", fr(e_s.d), fr(e_s.q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
