`timescale 1ps / 100fs
// triangle_gen: testbench model of the off-chip triangle-wave source that
// drives the programmable gates of the array. Each period starts at VMAX_UV
// when sync is seen on a rising clock edge, falls linearly to VMIN_UV at half
// the period and rises back to VMAX_UV at the end of the period, then holds
// until the next sync. The output is updated every STEP_PS; the update times
// are offset by half a picosecond so that pixel edges never coincide with
// clock edges.
module triangle_gen #(
  parameter real PERIOD_PS = 6_400_000.0,
  parameter real STEP_PS   = 100.0,
  parameter int  VMIN_UV   = 0,
  parameter int  VMAX_UV   = 1_800_000
) (
  input  logic clk,
  input  logic sync,
  output int   vpg_uv
);
  realtime t0 = -1.0e12;

  always @(posedge clk) if (sync) t0 = $realtime;

  initial begin
    realtime el;
    real     span;
    span   = real'(VMAX_UV - VMIN_UV);
    vpg_uv = VMAX_UV;
    #0.5;
    forever begin
      el = $realtime - t0;
      if (el < 0.0 || el >= PERIOD_PS)
        vpg_uv = VMAX_UV;
      else if (el < PERIOD_PS / 2.0)
        vpg_uv = VMAX_UV - int'(span * el / (PERIOD_PS / 2.0));
      else
        vpg_uv = VMIN_UV + int'(span * (el - PERIOD_PS / 2.0) / (PERIOD_PS / 2.0));
      #(STEP_PS);
    end
  end
endmodule
