`timescale 1ps / 100fs
// tb_tdc_controller: drives PWM pulses with random, clock-unaligned edges
// and checks the controller's sequence against the edge times:
//   - after start the converter waits for a low line (a line already high is
//     not taken as a rising edge), and the counter clear pulses once;
//   - trig follows the rising edge a at once, and the first snapshot is added
//     at b, the first clock edge after a;
//   - between b and c trig is low; the counter is enabled on every edge after
//     b up to and including d, i.e. (d - b) / T_clk edges;
//   - trig follows the inverted falling edge c, the second snapshot is
//     subtracted at d and done rises at d;
//   - start during a conversion restarts it.
module tb_tdc_controller;
  import isfet_pkg::*;
  localparam realtime TCLK = 6250;
  logic clk = 0, rst_n = 0, start = 0, pwm = 0;
  logic trig, acc_clr, acc_add, acc_sub, cnt_clr_n, cnt_en, done;
  tdc_state_e state;
  int checks = 0, failures = 0;

  tdc_controller dut (.clk, .rst_n, .start, .pwm, .trig, .acc_clr, .acc_add,
                      .acc_sub, .cnt_clr_n, .cnt_en, .state, .done);

  always #3125 clk = ~clk;

  // Log of what the controller does on each rising clock edge.
  int      n_en, n_add, n_sub, n_clr;
  realtime t_add, t_sub, t_done;
  always @(posedge clk) begin
    if (cnt_en) n_en++;
    if (acc_add && !acc_sub) begin n_add++; t_add = $realtime; end
    if (acc_add && acc_sub)  begin n_sub++; t_sub = $realtime; end
    if (!cnt_clr_n) n_clr++;
  end
  always @(posedge done) t_done = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic realtime next_edge(input realtime t);
    // rising clock edges are at TCLK/2 + k*TCLK
    return (real'($floor((t - TCLK / 2) / TCLK)) + 1.0) * TCLK + TCLK / 2;
  endfunction

  task automatic do_start();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n_en = 0; n_add = 0; n_sub = 0; n_clr = 0;
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime ta, tc, tb_e, td_e;
    int n_clk;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // line already high at start: no conversion until it has been low
    pwm = 1;
    do_start();
    @(negedge clk);
    check(n_clr == 1, "counter clear pulsed once after start");
    repeat (5) @(negedge clk);
    check(state == TDC_WAIT_LOW && !trig && n_add == 0, "high line ignored after start");
    pwm = 0;
    @(negedge clk);
    check(state == TDC_ARMED, "armed once the line is low");

    for (int trial = 0; trial < 100; trial++) begin
      do_start();
      repeat ($urandom_range(1, 4)) @(negedge clk);
      #($urandom_range(0, 6240) + 0.5);
      ta = $realtime;
      pwm = 1;
      #1;
      check(trig == 1, "trig follows the rising edge");
      n_clk = $urandom_range(2, 60);
      #(n_clk * TCLK + $urandom_range(0, 6240) - 1);
      tc = $realtime;
      check(trig == 0 && state == TDC_COUNT, "trig low while counting");
      pwm = 0;
      #1;
      check(trig == 1, "trig follows the inverted falling edge");
      repeat (2) @(negedge clk);
      tb_e = next_edge(ta);
      td_e = next_edge(tc);
      check(n_add == 1 && t_add == tb_e, "first snapshot at b");
      check(n_sub == 1 && t_sub == td_e, "second snapshot at d");
      check(done && t_done == td_e, "done at d");
      check(n_en == int'((td_e - tb_e) / TCLK), "counter enabled on the edges after b up to d");
      check(!trig, "trig low after the conversion");
    end

    // restart in the middle of a pulse
    do_start();
    #1000.5 pwm = 1;
    repeat (3) @(negedge clk);
    do_start();
    check(state == TDC_WAIT_LOW, "start restarts a running conversion");
    pwm = 0;
    repeat (2) @(negedge clk);
    check(state == TDC_ARMED, "re-armed after restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
