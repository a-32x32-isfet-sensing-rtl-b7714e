`timescale 1ps / 100fs
// tb_tdc_lsb_accum: drives random add/subtract/clear sequences into the LSB
// register and compares it after every clock with a reference sum kept in
// the testbench, including full conversions (+T_ab then -T_cd) that must
// end in the range -31..31.
module tb_tdc_lsb_accum;
  logic clk = 0, rst_n = 0, clr = 0, add = 0, sub = 0;
  logic [4:0] code = '0;
  logic signed [5:0] acc;
  int model = 0;
  int checks = 0, failures = 0;

  tdc_lsb_accum #(.CODE_W(5)) dut (.clk, .rst_n, .clr, .add, .sub, .code, .acc);

  always #3125 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic a, input logic s, input int v);
    @(negedge clk);
    clr = c; add = a; sub = s; code = 5'(v);
    @(posedge clk);
    if (c) model = 0;
    else if (a) model = s ? model - v : model + v;
    #1;
    checks++;
    if (int'(acc) != model) begin
      failures++;
      $display("FAIL clr=%0b add=%0b sub=%0b code=%0d acc=%0d expected=%0d", c, a, s, v, acc, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full conversions: clear, add first snapshot, idle, subtract second
    for (int n = 0; n < 200; n++) begin
      step(1, 0, 0, 0);
      step(0, 1, 0, $urandom_range(0, 31));
      repeat ($urandom_range(0, 3)) step(0, 0, $urandom_range(0, 1), $urandom_range(0, 31));
      step(0, 1, 1, $urandom_range(0, 31));
      checks++;
      if (acc < -31 || acc > 31) begin
        failures++;
        $display("FAIL conversion result %0d out of range", acc);
      end
    end
    // clear must win over add
    step(0, 1, 0, 17);
    step(1, 1, 0, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
