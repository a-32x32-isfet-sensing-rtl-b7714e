`timescale 1ps / 100fs
// tb_piso_serializer: loads rows of 32 random 15-bit words, collects the
// serial stream and checks that it returns every word, column 0 first and
// MSB first, with word_start on the first bit of each word, row_first on the
// first bit of the row and the row tag on sdo_row, and that a row takes
// exactly 32 x 15 = 480 clocks.
module tb_piso_serializer;
  localparam int C = 32, W = 15;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] data [C];
  logic [4:0] row_in = '0;
  logic sdo, sdo_valid, word_start, row_first;
  logic [4:0] sdo_row;
  int checks = 0, failures = 0;

  piso_serializer #(.COLS(C), .W(W), .RW(5)) dut (.clk, .rst_n, .load, .data, .row_in,
    .sdo, .sdo_valid, .word_start, .row_first, .sdo_row);

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
    logic [W-1:0] sent [C];
    logic [W-1:0] word;
    int nbits;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!sdo_valid, "idle after reset");
    for (int r = 0; r < 6; r++) begin
      for (int c = 0; c < C; c++) begin
        sent[c] = W'($urandom);
        data[c] = sent[c];
      end
      row_in = 5'(r * 7);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int c = 0; c < C; c++) data[c] = '0;  // inputs may change after load
      nbits = 0;
      for (int c = 0; c < C; c++) begin
        word = '0;
        for (int b = 0; b < W; b++) begin
          check(sdo_valid, "bit valid");
          check(word_start == (b == 0), "word_start on the first bit");
          check(row_first == (c == 0 && b == 0), "row_first on the first bit");
          check(sdo_row == 5'(r * 7), "row tag");
          word = {word[W-2:0], sdo};
          nbits++;
          @(negedge clk);
        end
        check(word == sent[c], $sformatf("row %0d column %0d: %h expected %h", r, c, word, sent[c]));
      end
      check(nbits == C * W && !sdo_valid, "row shifted out in 480 clocks");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
