`timescale 1ps / 100fs
// tdc_delay_line -- BEHAVIOURAL MODEL of the analog fine-conversion delay line.
//
// The real part is a chain of current-starved inverters whose stage delay is
// set by a global bias voltage derived from an external current source; the
// stage delay (the TDC LSB) can be tuned from about 190 ps to 9.5 ns. Here each
// stage is an ideal transport delay of STAGE_DELAY_PS. tap[i] is the trigger
// delayed by (i+1) stages, so an edge entering at time t has reached
// floor((now - t) / STAGE_DELAY_PS) stages, and the taps form a thermometer
// code that the TDC captures on a clock edge. Taps are shown non-inverted
// (the polarity of alternate inverter outputs is taken as already corrected).
//
// Ports: trig (edge to propagate), tap[STAGES-1:0] (stage outputs).
// The stage count (31) follows the description of the converter; the 195 ps
// default delay is chosen so that 32 stage delays equal one period of a
// 160 MHz clock.
module tdc_delay_line #(
  parameter int unsigned STAGES         = isfet_pkg::FINE_STAGES,
  parameter int unsigned STAGE_DELAY_PS = 195
) (
  input  logic              trig,
  output logic [STAGES-1:0] tap
);

  logic [STAGES:0] node;

  assign node[0] = trig;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    initial node[i+1] = 1'b0;
    always @(node[i]) node[i+1] <= #(STAGE_DELAY_PS) node[i];
  end

  assign tap = node[STAGES:1];

endmodule
