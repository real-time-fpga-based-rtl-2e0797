// switching_function: switching function of one converter leg (one arm).
//
// The control board drives the upper and lower IGBT of each leg through
// fiber-optic gate signals. The leg's switching function k says to which DC
// rail the AC terminal is tied: k = 1 when the upper switch is closed and the
// lower one open, k = 0 in the opposite state (as the converter model of the
// emulator defines it). The IGBTs are ideal switches with anti-parallel
// freewheeling diodes, so while both gates are off (dead time or blocked
// pulses) the current picks the diode: current flowing from the AC side into
// the leg (i_in >= 0) goes through the upper diode (k = 1), current flowing
// out goes through the lower diode (k = 0). That diode rule, and reporting
// both gates on as shoot_through while taking k = 1, are this design's own
// choices; only the two normal states are specified for the model.
//
// Purely combinational; the result is used within the same model step.
module switching_function
  import hil_pkg::*;
(
  input  logic gate_up,        // upper IGBT gate, 1 = on
  input  logic gate_dn,        // lower IGBT gate, 1 = on
  input  fx_t  i_in,           // current from the AC terminal into the leg
  output logic k,              // 1 = terminal on the positive rail
  output logic shoot_through   // both gates on
);

  always_comb begin
    shoot_through = gate_up & gate_dn;
    unique case ({gate_up, gate_dn})
      2'b10:   k = 1'b1;
      2'b01:   k = 1'b0;
      2'b11:   k = 1'b1;
      default: k = ~i_in[FX_W-1];   // both off: diode chosen by current sign
    endcase
  end

endmodule
