`timescale 1ps / 100fs
// tb_tdc_msb_counter: counts random numbers of enabled clock edges (with
// disabled edges mixed in) and compares the ripple counter with the number
// of enabled edges; then runs it past 1023 to check the wrap and the sticky
// overflow flag, and checks the asynchronous clear.
module tb_tdc_msb_counter;
  logic clk = 0, clr_n = 0, en = 0;
  logic [9:0] count;
  logic ovf;
  int checks = 0, failures = 0;

  tdc_msb_counter #(.WIDTH(10)) dut (.clk, .clr_n, .en, .count, .ovf);

  always #3125 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp_count, input logic exp_ovf);
    checks++;
    if (int'(count) != exp_count || ovf != exp_ovf) begin
      failures++;
      $display("FAIL count=%0d ovf=%0b expected %0d/%0b", count, ovf, exp_count, exp_ovf);
    end
  endtask

  initial begin
    int n, total;
    #1000 clr_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      @(negedge clk) clr_n = 0;
      #100 clr_n = 1;
      check(0, 0);
      n = $urandom_range(1, 1023);
      total = 0;
      while (total < n) begin
        @(negedge clk);
        en = ($urandom_range(0, 3) != 0);
        if (en) total++;
      end
      @(negedge clk) en = 0;
      check(n, 0);
    end
    // wrap: 1024 enabled edges from zero
    @(negedge clk) clr_n = 0;
    #100 clr_n = 1;
    en = 1;
    repeat (1023) @(negedge clk);
    check(1023, 0);
    repeat (3) @(negedge clk);
    en = 0;
    check(2, 1);
    @(negedge clk) clr_n = 0;
    #100 check(0, 0);
    clr_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
