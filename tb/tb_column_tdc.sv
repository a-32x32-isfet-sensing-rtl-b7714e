`timescale 1ps / 100fs
// tb_column_tdc: measures random PWM pulses, 2 to 1000 clock periods long
// with random sub-clock phases, and compares the 15-bit result with the pulse
// width divided by the nominal LSB (clock period / 32), allowing 1.3 LSB for
// the quantisation of the two fine snapshots and the stage-delay mismatch.
// Also checks: valid rises on the first clock edge after the falling edge; a
// pulse longer than the 1024-period coarse range sets overflow and reports no
// result; a line that never falls reports no result.
module tb_column_tdc;
  import isfet_pkg::*;
  localparam realtime TCLK = 6250;
  localparam real     LSB  = 6250.0 / 32.0;
  logic clk = 0, rst_n = 0, start = 0, pwm = 0;
  logic [14:0] out;
  logic valid, overflow, busy;
  int checks = 0, failures = 0;

  column_tdc #(.STAGE_DELAY_PS(195)) dut (.clk, .rst_n, .start, .pwm, .out,
                                          .valid, .overflow, .busy);

  always #3125 clk = ~clk;

  initial begin
    #2_000_000_000;
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

  task automatic do_start();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
  endtask

  initial begin
    realtime ta, tc, width;
    real err;
    int n_clk, worst;
    repeat (2) @(posedge clk);
    rst_n = 1;
    worst = 0;
    for (int trial = 0; trial < 300; trial++) begin
      do_start();
      repeat ($urandom_range(1, 3)) @(negedge clk);
      #($urandom_range(0, 6240) + 0.5);
      ta = $realtime;
      pwm = 1;
      n_clk = (trial < 20) ? 2 + trial : $urandom_range(2, 1000);
      #(n_clk * TCLK + $urandom_range(0, 6240) - 3000);
      tc = $realtime;
      pwm = 0;
      width = tc - ta;
      // latency: not valid before the next clock edge, valid right after it
      check(!valid, "no result before edge d");
      @(posedge clk);
      #1;
      check(valid && !overflow, "result valid one edge after the falling edge");
      err = real'(out) - width / LSB;
      if (err < 0) err = -err;
      if (int'(err * 100) > worst) worst = int'(err * 100);
      check(err <= 1.3, $sformatf("width %0.1f ps read as %0d (%0.2f LSB expected)",
                                   width, out, width / LSB));
    end
    $display("largest error %0d.%02d LSB", worst / 100, worst % 100);

    // pulse longer than the coarse range
    do_start();
    repeat (2) @(negedge clk);
    #1000.5 pwm = 1;
    #(1030 * TCLK);
    pwm = 0;
    repeat (2) @(posedge clk);
    #1;
    check(overflow && !valid && out == TDC_NO_RESULT, "overflow reported as no result");

    // line high before start and never low: no conversion
    pwm = 1;
    do_start();
    repeat (50) @(posedge clk);
    #1;
    check(!valid && !busy && out == TDC_NO_RESULT, "no result for a line that stays high");
    pwm = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
