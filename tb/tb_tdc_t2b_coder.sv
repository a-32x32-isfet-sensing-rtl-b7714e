`timescale 1ps / 100fs
// tb_tdc_t2b_coder: checks the thermometer-to-binary coder on every clean
// thermometer code (0..31 stages passed) and on codes with one bubble, where
// a single tap inside or above the edge position is flipped.
module tb_tdc_t2b_coder;
  localparam int STAGES = 31;
  logic [STAGES-1:0] therm;
  logic [4:0]        code;
  int checks = 0, failures = 0;

  tdc_t2b_coder #(.STAGES(STAGES), .CODE_W(5)) dut (.therm, .code);

  task automatic expect_code(input logic [STAGES-1:0] t, input int exp_val);
    therm = t;
    #10;
    checks++;
    if (int'(code) != exp_val) begin
      failures++;
      $display("FAIL therm=%b code=%0d expected=%0d", t, code, exp_val);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [STAGES-1:0] t;
    for (int k = 0; k <= STAGES; k++) begin
      t = '0;
      for (int i = 0; i < k; i++) t[i] = 1'b1;
      expect_code(t, k);
      // a zero bubble below the edge and a one bubble above it
      if (k >= 3) begin
        t[k-2] = 1'b0;
        expect_code(t, k - 1);
        t[k-2] = 1'b1;
      end
      if (k <= STAGES - 3) begin
        t[k+1] = 1'b1;
        expect_code(t, k + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
