`timescale 1ps / 100fs
// tdc_lsb_accum: sign stage ("1/-1"), adder and LSB register of the fine
// converter.
//
// A conversion captures the delay line twice: at the first clock edge after
// the PWM rising edge (T_ab, added) and at the first clock edge after the
// PWM falling edge (T_cd, subtracted). The register therefore ends holding
// T_ab - T_cd in delay-line LSBs, a signed value in -31..+31. That range needs
// 6 bits, so the register is FINE_W+1 bits wide (the 5-bit coder output plus a
// sign bit), in line with the "6 bits signed" fine field of the converter.
//
// Interface: clr clears the register (synchronous, wins over add); add with
// sub=0 adds code, add with sub=1 subtracts it. Updates on the rising clock
// edge; rst_n clears asynchronously.
module tdc_lsb_accum #(
  parameter int unsigned CODE_W = isfet_pkg::FINE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     add,   // capture this cycle
  input  logic                     sub,   // 1: subtract (second capture)
  input  logic [CODE_W-1:0]        code,  // coder output
  output logic signed [CODE_W:0]   acc    // T_ab - T_cd in LSBs
);

  logic signed [CODE_W:0] term;

  // "1/-1" stage: the coder output with the sign chosen by the controller.
  always_comb begin
    term = signed'({1'b0, code});
    if (sub) term = -term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clr)   acc <= '0;
    else if (add)   acc <= acc + term;
  end

endmodule
