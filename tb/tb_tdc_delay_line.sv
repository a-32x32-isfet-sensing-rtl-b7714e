`timescale 1ps / 100fs
// tb_tdc_delay_line: sends an edge into the delay-line model and checks the
// number of taps that have switched at random times afterwards against
// floor(elapsed / stage delay), capped at 31; then the same for the falling
// edge that empties the line.
module tb_tdc_delay_line;
  localparam int D = 195;
  logic trig = 0;
  logic [30:0] tap;
  int checks = 0, failures = 0;

  tdc_delay_line #(.STAGES(31), .STAGE_DELAY_PS(D)) dut (.trig, .tap);

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(input logic [30:0] v);
    int n = 0;
    for (int i = 0; i < 31; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    int wait_ps, exp_n;
    #1000;
    for (int trial = 0; trial < 200; trial++) begin
      wait_ps = $urandom_range(0, 7000);
      #0.5 trig = 1;
      #(wait_ps + 0.25);
      exp_n = (wait_ps / D > 31) ? 31 : wait_ps / D;
      checks++;
      if (ones(tap) != exp_n || tap != 31'((64'd1 << exp_n) - 1)) begin
        failures++;
        $display("FAIL rising: after %0d ps taps=%b expected %0d ones", wait_ps, tap, exp_n);
      end
      #(7000 - wait_ps - 0.25);
      wait_ps = $urandom_range(0, 7000);
      #0.5 trig = 0;
      #(wait_ps + 0.25);
      exp_n = 31 - ((wait_ps / D > 31) ? 31 : wait_ps / D);
      checks++;
      if (ones(tap) != exp_n) begin
        failures++;
        $display("FAIL falling: after %0d ps taps=%b expected %0d ones", wait_ps, tap, exp_n);
      end
      #(7000 - wait_ps - 0.25);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
