`timescale 1ps / 100fs
// tb_sensor_pixel: applies random triangle and chemical voltages and checks
// the pixel output against the floating-gate equation evaluated in real
// arithmetic in the testbench: the output is high while
//   V_FG = (C_pass*V_chem + C_pg*V_pg) / C_tot + K  <  V_M
// and only while the row is selected. Points within 1 uV of the switching
// point are skipped. Also sweeps V_pg over one triangle period and checks
// the pulse width against the crossing voltage worked out by hand.
module tb_sensor_pixel;
  localparam int CPASS = 10, CPG = 40, CPAR = 10, K = 0, VM = 900_000;
  int   vpg_uv = 0, vchem_uv = 0;
  logic sel = 0;
  logic col_out;
  int checks = 0, failures = 0;

  sensor_pixel #(.CPASS_FF(CPASS), .CPG_FF(CPG), .CPAR_FF(CPAR), .K_UV(K), .VM_UV(VM))
    dut (.vpg_uv, .vchem_uv, .sel, .col_out);

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vfg, vcross;
    int n_high;
    for (int i = 0; i < 2000; i++) begin
      vpg_uv   = int'($urandom_range(0, 1_800_000));
      vchem_uv = int'($urandom_range(0, 9_000_000)) - 3_000_000;
      sel      = ($urandom_range(0, 3) != 0);
      #10;
      vfg = (real'(CPASS) * vchem_uv + real'(CPG) * vpg_uv) / real'(CPASS + CPG + CPAR) + K;
      if (vfg > VM - 1.0 && vfg < VM + 1.0) continue;
      checks++;
      if (col_out != (sel && vfg < VM)) begin
        failures++;
        $display("FAIL vpg=%0d vchem=%0d sel=%0b: out=%0b, V_FG=%0.1f", vpg_uv, vchem_uv, sel, col_out, vfg);
      end
    end
    // one triangle period in 1800 steps of 1 mV: pulse length in steps
    sel = 1;
    vchem_uv = 1_000_000;
    // crossing: V_pg = (V_M*C_tot - C_pass*V_chem) / C_pg = 1.1 V
    vcross = (real'(VM) * (CPASS + CPG + CPAR) - real'(CPASS) * vchem_uv) / CPG;
    n_high = 0;
    for (int s = 0; s < 3600; s++) begin
      vpg_uv = (s < 1800) ? 1_800_000 - s * 1000 : (s - 1800) * 1000;
      #10;
      if (col_out) n_high++;
    end
    checks++;
    if (n_high < int'(2 * vcross / 1000) - 2 || n_high > int'(2 * vcross / 1000) + 2) begin
      failures++;
      $display("FAIL pulse %0d steps, expected %0d", n_high, int'(2 * vcross / 1000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
