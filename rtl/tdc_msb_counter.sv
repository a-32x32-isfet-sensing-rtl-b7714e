`timescale 1ps / 100fs
// tdc_msb_counter: 10-bit asynchronous (ripple) coarse counter.
//
// The coarse converter counts clock periods while the PWM pulse is high. To
// keep the gate count low it is a ripple counter: bit 0 toggles on each rising
// clock edge while en is high, and every higher bit is a toggle flip-flop
// clocked by the falling edge of the bit below it, so a carry ripples through
// the chain instead of going through an adder. clr_n clears all bits
// asynchronously (the counter has no synchronous logic to clear it with).
// ovf is a sticky flag set when the count wraps from all ones to zero; it is
// part of this design, used to mark pulses too long for the counter.
//
// Timing: count settles a few flip-flop delays after the clock edge (zero
// in simulation); readers sample it on a later clock edge.
module tdc_msb_counter #(
  parameter int unsigned WIDTH = isfet_pkg::COARSE_W
) (
  input  logic             clk,
  input  logic             clr_n,  // asynchronous clear, active low
  input  logic             en,     // count this clock edge
  output logic [WIDTH-1:0] count,
  output logic             ovf     // sticky wrap flag
);

  logic [WIDTH-1:0] q;  // bit values, gathered from the per-bit flip-flops

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic b;  // this bit's flip-flop
    if (i == 0) begin : g_lsb
      always_ff @(posedge clk or negedge clr_n) begin
        if (!clr_n)  b <= 1'b0;
        else if (en) b <= ~b;
      end
    end else begin : g_carry
      always_ff @(negedge q[i-1] or negedge clr_n) begin
        if (!clr_n) b <= 1'b0;
        else        b <= ~b;
      end
    end
    assign q[i] = b;
  end

  // The top bit falling means the counter wrapped to zero.
  always_ff @(negedge q[WIDTH-1] or negedge clr_n) begin
    if (!clr_n) ovf <= 1'b0;
    else        ovf <= 1'b1;
  end

  assign count = q;

endmodule
