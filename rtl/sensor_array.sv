`timescale 1ps / 100fs
// sensor_array -- BEHAVIOURAL MODEL of the 32 x 32 in-pixel-digitising ISFET
// array.
//
// All pixels share the triangle wave on their programmable gates. Each row
// has one select line; the pixel outputs of a column are joined on one column
// line that feeds that column's TDC, so with one row selected each column
// line carries the PWM pulse of the selected pixel. The joined transmission
// gates are modelled as an OR of the gated pixel outputs (an unselected pixel
// contributes 0, and more than one selected row is not a legal state).
//
// Ports: vpg_uv (triangle, uV), vchem_uv[r][c] (chemical potential of each
// pixel, uV), row_sel (one-hot), col (column lines).
module sensor_array #(
  parameter int unsigned ROWS     = isfet_pkg::ROWS,
  parameter int unsigned COLS     = isfet_pkg::COLS,
  parameter int          CPASS_FF = 10,
  parameter int          CPG_FF   = 40,
  parameter int          CPAR_FF  = 10,
  parameter int          K_UV     = 0,
  parameter int          VM_UV    = 900_000
) (
  input  int              vpg_uv,
  input  int              vchem_uv [ROWS][COLS],
  input  logic [ROWS-1:0] row_sel,
  output logic [COLS-1:0] col
);

  logic [ROWS-1:0] drive [COLS];  // drive[c][r]: pixel (r,c) pulls its column high

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      sensor_pixel #(
        .CPASS_FF(CPASS_FF), .CPG_FF(CPG_FF), .CPAR_FF(CPAR_FF),
        .K_UV(K_UV), .VM_UV(VM_UV)
      ) u_pix (
        .vpg_uv, .vchem_uv(vchem_uv[r][c]), .sel(row_sel[r]),
        .col_out(drive[c][r])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_line
    assign col[c] = |drive[c];
  end

endmodule
