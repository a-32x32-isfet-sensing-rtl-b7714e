`timescale 1ps / 100fs
// tb_isfet_array_top: end-to-end test of the sensing system on a reduced
// array (16 x 16 pixels, 512-clock rows, 160 MHz clock). A triangle source
// synchronised to row_sync drives the array. Each pixel's chemical potential
// is chosen so that its pulse covers a known fraction f of the triangle
// period; the expected TDC code is f * T_trig / (T_clk / 32), worked out from
// the pixel equation in the testbench. The serial output is decoded and every
// word is compared with that value (2.5 LSB tolerance: fine quantisation
// plus the 100 ps steps of the triangle). Two pixels are out of range, one
// never crossing the switching point and one always below it, and must read
// as the no-result code. Checked and counted: valid conversions, both
// out-of-range cases, rows, frame wraps and serial row transfers, the row
// period and the delay from a row's start to its first serial bit.
module tb_isfet_array_top;
  localparam int R = 16, C = 16, RC = 512, W = 15;
  localparam realtime TCLK = 6250;
  localparam real LSB = 6250.0 / 32.0;
  localparam real T_TRIG = RC * 6250.0;
  localparam int CPASS = 10, CPG = 40, CPAR = 10, VM = 900_000, VMAX = 1_800_000;
  localparam logic [W-1:0] NO_RESULT = '1;

  logic clk = 0, rst_n = 0, en = 0;
  int   vpg_uv;
  int   vchem_uv [R][C];
  logic row_sync, frame_sync, sdo, sdo_valid, sdo_word_start, sdo_row_first;
  logic [3:0] cur_row, sdo_row;
  logic [C-1:0] conv_valid, conv_busy, conv_overflow;
  int checks = 0, failures = 0;
  int n_rows_v = R, n_cols_v = C;  // loop bounds in variables keep the loops rolled

  isfet_array_top #(.ROWS(R), .COLS(C), .ROW_CYCLES(RC)) dut (
    .clk, .rst_n, .en, .vpg_uv, .vchem_uv, .row_sync, .frame_sync, .cur_row,
    .conv_valid, .conv_busy, .conv_overflow, .sdo, .sdo_valid, .sdo_word_start,
    .sdo_row_first, .sdo_row);

  triangle_gen #(.PERIOD_PS(T_TRIG), .STEP_PS(100.0), .VMIN_UV(0), .VMAX_UV(VMAX))
    u_tri (.clk, .sync(row_sync), .vpg_uv);

  always #3125 clk = ~clk;

  initial begin
    #(64'd100_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endfunction

  // Expected code of each pixel (-1: no result).
  real exp_code [R][C];

  function automatic void setup();
    real f, vcross;
    for (int r = 0; r < n_rows_v; r++)
      for (int c = 0; c < n_cols_v; c++) begin
        f = 0.05 + 0.9 * real'($urandom_range(0, 1000)) / 1000.0;
        vcross = f * VMAX;  // triangle voltage at which the pulse starts/ends
        vchem_uv[r][c] = int'((real'(VM) * (CPASS + CPG + CPAR) - CPG * vcross) / CPASS);
        // the pulse lasts while V_pg is below the crossing voltage
        vcross = (real'(VM) * (CPASS + CPG + CPAR) - real'(CPASS) * vchem_uv[r][c]) / CPG;
        exp_code[r][c] = T_TRIG * vcross / VMAX / LSB;
      end
    // out of range: V_FG above V_M for every V_pg (no pulse) ...
    vchem_uv[1][2] = 6_000_000;
    exp_code[1][2] = -1.0;
    // ... and V_FG below V_M for every V_pg (line always high)
    vchem_uv[2][1] = -2_500_000;
    exp_code[2][1] = -1.0;
  endfunction

  // Serial decoder and mechanism counters.
  int n_conv = 0, n_no_pulse = 0, n_always_high = 0, n_rows = 0, n_frames = 0;
  int bitcnt = 0, col_i = 0, row_bits = 0, rx_row = 0;
  logic [W-1:0] word;
  longint cyc = 0, last_sync = -1, sync_of_row [R];

  always @(posedge clk) begin
    cyc++;
    if (row_sync) begin
      if (last_sync >= 0) check(cyc - last_sync == RC, "row period of ROW_CYCLES clocks");
      last_sync = cyc;
      sync_of_row[cur_row] = cyc;
    end
    if (frame_sync) n_frames++;
    if (sdo_valid) begin
      if (sdo_row_first) begin
        rx_row = int'(sdo_row);
        col_i = 0;
        row_bits = 0;
        check(cyc - sync_of_row[rx_row] == RC, "first serial bit one row period after row start");
      end
      if (sdo_word_start) begin
        bitcnt = 0;
        word = '0;
      end
      word = {word[W-2:0], sdo};
      bitcnt++;
      row_bits++;
      if (bitcnt == W) begin
        score(rx_row, col_i, word);
        col_i++;
        if (col_i == C) begin
          n_rows++;
          check(row_bits == C * W, "row of words contiguous");
        end
      end
    end
  end

  function automatic void score(input int r, input int c, input logic [W-1:0] v);
    real err;
    if (exp_code[r][c] < 0.0) begin
      check(v == NO_RESULT, $sformatf("pixel (%0d,%0d) out of range: got %0d", r, c, v));
      if (vchem_uv[r][c] > 0) n_no_pulse++; else n_always_high++;
    end else begin
      err = real'(v) - exp_code[r][c];
      if (err < 0) err = -err;
      check(v != NO_RESULT && err <= 2.5,
            $sformatf("pixel (%0d,%0d): got %0d expected %0.2f", r, c, v, exp_code[r][c]));
      n_conv++;
    end
  endfunction

  initial begin
    setup();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;
    // two full frames and one more row, plus the serial tail
    repeat ((2 * R + 1) * RC + C * W + 10) @(posedge clk);
    check(n_rows == 2 * R + 1, $sformatf("%0d rows received", n_rows));
    check(n_conv > 0, "valid conversions happened");
    check(n_no_pulse > 0, "pixel without pulse reported as no result");
    check(n_always_high > 0, "pixel with line always high reported as no result");
    check(n_frames >= 3, "frame wrapped to row 0");
    $display("mechanisms: conversions=%0d no_pulse=%0d always_high=%0d rows=%0d frames=%0d",
             n_conv, n_no_pulse, n_always_high, n_rows, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
