`timescale 1ps / 100fs
// sensor_pixel -- BEHAVIOURAL MODEL of the inverter-based ISFET pixel.
//
// The pixel is a (tri-state) inverter whose common gate is a floating gate
// extended to the top-metal sensing membrane, with a MIM capacitor as the
// programmable gate driven by the array-wide triangle wave. The floating gate
// sits at the capacitive mix
//     V_FG = (C_pass*V_chem + C_pg*V_pg) / C_tot + K
// and the inverter output is high while V_FG is below its switching point
// V_M. As V_pg sweeps down and back up, the output is a pulse whose width is
// linear in V_chem (the pH-to-time conversion). A transmission gate, closed
// by the row select, puts the output on the column line; the column line is
// shared by all pixels of a column, and an unselected pixel contributes 0.
//
// Voltages are signed integers in microvolts and capacitances integers in
// fF; the comparison is done on C_tot*(V_FG - V_M) in 64 bits, without
// division. C_pg = 40 fF and the 1.8 V supply (V_M = 0.9 V) are the
// pixel's; C_pass, C_par and K are assumed values. The gate-drain coupling
// (which adds hysteresis, i.e. a constant offset of the pulse width) is
// left out. No delay is modelled: the inverter is taken to switch instantly.
module sensor_pixel #(
  parameter int CPASS_FF = 10,      // passivation/chemical coupling, assumed
  parameter int CPG_FF   = 40,      // programmable-gate MIM capacitor
  parameter int CPAR_FF  = 10,      // other floating-gate capacitance, assumed
  parameter int K_UV     = 0,       // DC term (trapped charge, reference)
  parameter int VM_UV    = 900_000  // inverter switching point, VDD/2
) (
  input  int   vpg_uv,    // triangle wave on the programmable gate
  input  int   vchem_uv,  // chemical potential at the membrane
  input  logic sel,       // row select: transmission gate closed
  output logic col_out    // contribution to the column line
);

  localparam longint CTOT_FF = longint'(CPASS_FF) + longint'(CPG_FF) + longint'(CPAR_FF);

  longint excess;   // C_tot * (V_FG - V_M), fF*uV
  logic   inv_out;  // inverter output inside the pixel

  always_comb begin
    excess  = longint'(CPASS_FF) * vchem_uv + longint'(CPG_FF) * vpg_uv
            + CTOT_FF * (longint'(K_UV) - longint'(VM_UV));
    inv_out = (excess < 0);
    col_out = sel && inv_out;
  end

endmodule
