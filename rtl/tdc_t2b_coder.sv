`timescale 1ps / 100fs
// tdc_t2b_coder: thermometer-to-binary coder of the fine converter.
//
// The 31 delay-line taps captured on a clock edge form a thermometer code:
// taps 0..k-1 are high when the edge has passed k stages. The coder reports k
// (0..31) on 5 bits. It counts the ones rather than locating the top one, so
// an isolated bubble (a single tap out of order, e.g. from stage mismatch)
// shifts the code by at most one LSB instead of corrupting it. The 31-bit
// input and 5-bit output widths are the converter's; the ones-counting
// structure is this design's choice. Purely combinational.
module tdc_t2b_coder #(
  parameter int unsigned STAGES = isfet_pkg::FINE_STAGES,
  parameter int unsigned CODE_W = $clog2(STAGES + 1)
) (
  input  logic [STAGES-1:0] therm,  // captured delay-line taps
  output logic [CODE_W-1:0] code    // number of stages the edge has passed
);

  always_comb begin
    code = '0;
    for (int i = 0; i < STAGES; i++) begin
      code = code + CODE_W'(therm[i]);
    end
  end

endmodule
