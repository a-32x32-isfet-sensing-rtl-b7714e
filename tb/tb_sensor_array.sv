`timescale 1ps / 100fs
// tb_sensor_array: fills an 8 x 8 instance of the array with random chemical potentials,
// selects each row in turn (and none), applies random triangle voltages and
// checks every column line against the floating-gate equation of the
// selected pixel, evaluated in the testbench.
module tb_sensor_array;
  localparam int R = 8, C = 8;
  localparam int CPASS = 10, CPG = 40, CPAR = 10, VM = 900_000;
  int vpg_uv = 0;
  int vchem_uv [R][C];
  logic [R-1:0] row_sel = '0;
  logic [C-1:0] col;
  int checks = 0, failures = 0;

  sensor_array #(.ROWS(R), .COLS(C)) dut (.vpg_uv, .vchem_uv, .row_sel, .col);

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fill();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        vchem_uv[r][c] = int'($urandom_range(0, 6_000_000)) - 1_200_000;
  endfunction

  // Compare all column lines with the selected pixel (r < 0: none selected).
  function automatic void check_cols(input int r);
    longint lhs;
    logic exp_bit;
    for (int c = 0; c < C; c++) begin
      if (r < 0) exp_bit = 1'b0;
      else begin
        lhs = longint'(CPASS) * vchem_uv[r][c] + longint'(CPG) * vpg_uv;
        exp_bit = lhs < longint'(VM) * (CPASS + CPG + CPAR);
      end
      checks++;
      if (col[c] != exp_bit) begin
        failures++;
        $display("FAIL row %0d col %0d vpg=%0d: %0b expected %0b", r, c, vpg_uv, col[c], exp_bit);
      end
    end
  endfunction

  initial begin
    fill();
    for (int r = -1; r < R; r++) begin
      row_sel = '0;
      if (r >= 0) row_sel[r] = 1'b1;
      for (int k = 0; k < 20; k++) begin
        vpg_uv = int'($urandom_range(0, 1_800_000));
        #10;
        check_cols(r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
