`timescale 1ps / 100fs
// isfet_array_top: 32 x 32 ISFET pH sensing array with in-pixel
// digitisation, 32 column-wise coarse-fine TDCs and a serial output.
//
// Data flow. An external triangle wave drives the programmable gates of all
// pixels. In every pixel the floating-gate inverter turns the chemical
// potential into the width of a digital pulse (sensor_array). One row at a
// time is switched onto the 32 column lines (row_scanner), and each column's
// TDC (column_tdc) measures the pulse width to 15 bits with a ripple-counter
// coarse part and a delay-line fine part. At the end of the row period the
// 32 x 15 b results are loaded in parallel into a shift register
// (piso_serializer) and shifted out on sdo while the next row converts.
//
// Timing. One row per triangle period of ROW_CYCLES clocks; the triangle
// generator is expected to start each period at its maximum, aligned to
// row_sync (high during the first clock cycle of each row). With the
// default 1024 cycles at 160 MHz a frame of 32 rows takes 210 us (4.9 k
// frames/s). A row's serial data follows its row_end by one cycle and
// lasts 480 clocks.
//
// Ports: vpg_uv is the triangle-wave voltage and vchem_uv the chemical
// potential of each pixel, both in microvolts, as inputs to the behavioural
// pixel models. conv_valid, conv_busy and conv_overflow show the state
// of each column's conversion of the current row.
module isfet_array_top #(
  parameter int unsigned ROWS           = isfet_pkg::ROWS,
  parameter int unsigned COLS           = isfet_pkg::COLS,
  parameter int unsigned ROW_CYCLES     = 1024,
  parameter int unsigned STAGE_DELAY_PS = 195,
  parameter int          CPASS_FF       = 10,
  parameter int          CPG_FF         = 40,
  parameter int          CPAR_FF        = 10,
  parameter int          K_UV           = 0,
  parameter int          VM_UV          = 900_000,
  localparam int unsigned RW            = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,            // run the row scan
  input  int              vpg_uv,        // triangle wave
  input  int              vchem_uv [ROWS][COLS],
  output logic            row_sync,      // first cycle of each row
  output logic            frame_sync,    // first cycle of row 0
  output logic [RW-1:0]   cur_row,       // row being converted
  output logic [COLS-1:0] conv_valid,    // per-column conversion complete
  output logic [COLS-1:0] conv_busy,     // per-column pulse being counted
  output logic [COLS-1:0] conv_overflow, // per-column coarse counter wrapped
  output logic            sdo,           // serial data
  output logic            sdo_valid,
  output logic            sdo_word_start,
  output logic            sdo_row_first,
  output logic [RW-1:0]   sdo_row        // row of the words on sdo
);

  logic [ROWS-1:0]  row_sel;
  logic             row_end;
  logic [COLS-1:0]  col;
  logic [isfet_pkg::OUT_W-1:0] tdc_out [COLS];

  row_scanner #(.ROWS(ROWS), .ROW_CYCLES(ROW_CYCLES)) u_scan (
    .clk, .rst_n, .en, .row_sel, .row(cur_row), .row_start(row_sync),
    .row_end, .frame_start(frame_sync)
  );

  sensor_array #(
    .ROWS(ROWS), .COLS(COLS), .CPASS_FF(CPASS_FF), .CPG_FF(CPG_FF),
    .CPAR_FF(CPAR_FF), .K_UV(K_UV), .VM_UV(VM_UV)
  ) u_array (
    .vpg_uv, .vchem_uv, .row_sel, .col
  );

  for (genvar c = 0; c < COLS; c++) begin : g_tdc
    column_tdc #(.STAGE_DELAY_PS(STAGE_DELAY_PS)) u_tdc (
      .clk, .rst_n, .start(row_sync), .pwm(col[c]), .out(tdc_out[c]),
      .valid(conv_valid[c]), .overflow(conv_overflow[c]), .busy(conv_busy[c])
    );
  end

  piso_serializer #(.COLS(COLS), .W(isfet_pkg::OUT_W), .RW(RW)) u_piso (
    .clk, .rst_n, .load(row_end), .data(tdc_out), .row_in(cur_row),
    .sdo, .sdo_valid, .word_start(sdo_word_start), .row_first(sdo_row_first),
    .sdo_row
  );

  if (ROW_CYCLES < COLS * isfet_pkg::OUT_W + 1) begin : g_bad_period
    $error("ROW_CYCLES must leave time to shift out a row of results");
  end

endmodule
