`timescale 1ps / 100fs
// tb_row_scanner: runs the scanner for several frames with a short row
// period and checks, cycle by cycle, against a counter model in the
// testbench: one-hot row select, row_start in the first and row_end in the
// last cycle of each ROW_CYCLES-long row, frame_start on row 0 and the wrap
// after the last row; then checks that clearing en stops the scan at the end
// of the row.
module tb_row_scanner;
  localparam int R = 4, RC = 24;
  logic clk = 0, rst_n = 0, en = 0;
  logic [R-1:0] row_sel;
  logic [1:0] row;
  logic row_start, row_end, frame_start;
  int checks = 0, failures = 0;

  row_scanner #(.ROWS(R), .ROW_CYCLES(RC)) dut (.clk, .rst_n, .en, .row_sel, .row,
                                                .row_start, .row_end, .frame_start);

  always #3125 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin
    int exp_row, exp_cyc, frames;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(row_sel == '0 && !row_start, "idle before en");
    en = 1;
    @(negedge clk);
    exp_row = 0;
    exp_cyc = 0;
    frames = 0;
    for (int n = 0; n < 3 * R * RC; n++) begin
      check(row_sel == R'(1 << exp_row) && int'(row) == exp_row, "one-hot row select");
      check(row_start == (exp_cyc == 0), "row_start in the first cycle");
      check(row_end == (exp_cyc == RC - 1), "row_end in the last cycle");
      check(frame_start == (exp_cyc == 0 && exp_row == 0), "frame_start on row 0");
      if (frame_start) frames++;
      @(negedge clk);
      exp_cyc++;
      if (exp_cyc == RC) begin
        exp_cyc = 0;
        exp_row = (exp_row + 1) % R;
      end
    end
    check(frames == 3, "three frames started");
    // stop: en low is honoured at the end of the current row
    en = 0;
    while (!row_end) @(negedge clk);
    @(negedge clk);
    check(row_sel == '0, "scan stopped after the row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
