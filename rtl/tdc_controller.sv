`timescale 1ps / 100fs
// tdc_controller: asynchronous-edge control logic of one column TDC.
//
// The PWM pulse from the selected pixel is not aligned to the clock. The
// controller splits it into three parts:
//   a -> b : from the PWM rising edge a to the next rising clock edge b. The
//            rising edge itself is passed to the delay line (trig = pwm), and
//            at b the delay-line snapshot is added to the LSB register.
//   b -> d : the coarse counter is enabled and counts every rising clock edge
//            after b, up to and including d.
//   c -> d : the PWM falling edge c is inverted and fed to the delay line again
//            (trig = ~pwm); at d, the first rising clock edge after c, the
//            snapshot is subtracted from the LSB register.
// Between b and c the trigger is held low so the line empties before c.
// The pulse width is then 32*N + (T_ab - T_cd) LSBs with N the coarse count
// (when 32 stage delays equal one clock period).
//
// start (one cycle) clears the counter and register and arms the converter;
// the controller first waits for the column line to be low, so a line that
// is already high at row selection is not taken for a rising edge. States:
// IDLE, WAIT_LOW, ARMED, COUNT, DONE (isfet_pkg::tdc_state_e). The counter is
// cleared through cnt_clr_n during the cycle after start. pwm is sampled
// directly on the clock edge; a synchroniser is left out because the fine
// snapshot and the state must see the same edge. The state names, the
// WAIT_LOW guard and the clear sequencing are this design's choices; the
// a/b/c/d sequence is the converter's.
module tdc_controller
  import isfet_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,      // begin a new conversion (one cycle)
  input  logic       pwm,        // column line (asynchronous)
  output logic       trig,       // delay-line input
  output logic       acc_clr,    // clear the LSB register
  output logic       acc_add,    // capture the snapshot this edge
  output logic       acc_sub,    // 1: subtract (second snapshot)
  output logic       cnt_clr_n,  // asynchronous clear of the ripple counter
  output logic       cnt_en,     // coarse counter counts this edge
  output tdc_state_e state,
  output logic       done        // conversion complete
);

  tdc_state_e state_d;
  logic       clr_q;

  always_comb begin
    state_d = state;
    case (state)
      TDC_WAIT_LOW: if (!pwm) state_d = TDC_ARMED;
      TDC_ARMED:    if (pwm)  state_d = TDC_COUNT;   // edge b
      TDC_COUNT:    if (!pwm) state_d = TDC_DONE;    // edge d
      default:      state_d = state;
    endcase
    if (start) state_d = TDC_WAIT_LOW;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TDC_IDLE;
      clr_q <= 1'b1;
    end else begin
      state <= state_d;
      clr_q <= start;
    end
  end

  assign trig      = (state == TDC_ARMED && pwm) || (state == TDC_COUNT && !pwm);
  assign acc_clr   = start;
  assign acc_add   = !start && trig;
  assign acc_sub   = (state == TDC_COUNT);
  assign cnt_en    = !start && (state == TDC_COUNT);
  assign cnt_clr_n = !clr_q;
  assign done      = (state == TDC_DONE);

endmodule
