`timescale 1ps / 100fs
// row_scanner: row sequencing of the array readout.
//
// One row is converted per period of the triangle wave, so the frame rate is
// rows / T_trig. The scanner holds a cycle counter that spans one row period
// (ROW_CYCLES clocks, 1024 by default, which is the 10-bit coarse range of the
// TDCs: at 160 MHz that is 6.4 us per row, 32 rows give 4.9 k frames/s) and
// a row counter.
//   row_sel   one-hot select of the current row (all zero while en is low)
//   row_start high in the first cycle of a row: starts the column TDCs and
//             is the sync reference for the triangle generator
//   row_end   high in the last cycle of a row: the TDC results are loaded
//             into the serialiser on this edge, then the next row is selected
//   frame_start high in the first cycle of row 0
// The row period, the counter structure and the sync output are this
// design's choices; the one-row-per-triangle-period scan is the array's.
module row_scanner #(
  parameter int unsigned ROWS       = isfet_pkg::ROWS,
  parameter int unsigned ROW_CYCLES = 1024,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = $clog2(ROW_CYCLES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [ROWS-1:0] row_sel,
  output logic [RW-1:0]   row,
  output logic            row_start,
  output logic            row_end,
  output logic            frame_start
);

  logic [CW-1:0] cyc;
  logic          run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      cyc <= '0;
      row <= '0;
    end else if (!run) begin
      run <= en;
      cyc <= '0;
      row <= '0;
    end else if (row_end) begin
      cyc <= '0;
      row <= (row == RW'(ROWS - 1)) ? '0 : row + 1'b1;
      run <= en;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  assign row_start   = run && (cyc == '0);
  assign row_end     = run && (cyc == CW'(ROW_CYCLES - 1));
  assign frame_start = row_start && (row == '0);

  always_comb begin
    row_sel = '0;
    if (run) row_sel[row] = 1'b1;
  end

endmodule
