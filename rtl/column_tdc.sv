`timescale 1ps / 100fs
// column_tdc: 15-bit asynchronous coarse-fine time-to-digital converter of
// one array column.
//
// It measures the width of the PWM pulse on the column line. The fine part is
// a 31-stage delay line (tdc_delay_line) whose taps are coded to 5 bits
// (tdc_t2b_coder) and accumulated with sign +1/-1 into the LSB register
// (tdc_lsb_accum); the coarse part is a 10-bit ripple counter
// (tdc_msb_counter); tdc_controller sequences them. When a conversion
// completes, the result is
//     out = 32 * coarse + (T_ab - T_cd)
// in delay-line LSBs, which assumes the clock period is tuned to 32 stage
// delays (the 31 stages cover one period; the mismatch is trimmed externally
// through the bias current or the clock). The 10-bit coarse count and the
// signed fine difference (-31..31) combine into a 15-bit unsigned value
// 1..32767; folding them into one word this way is this design's reading of
// how the 10-bit and 5-bit fields make up the 15-bit output.
//
// Interface: start (one cycle) begins a conversion; valid is high once a
// complete pulse has been measured and the counter did not wrap. out holds
// isfet_pkg::TDC_NO_RESULT (all ones) while valid is low. Latency: valid
// rises on the first clock edge after the PWM falling edge (edge d).
module column_tdc
  import isfet_pkg::*;
#(
  parameter int unsigned STAGE_DELAY_PS = 195
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             pwm,
  output logic [OUT_W-1:0] out,
  output logic             valid,
  output logic             overflow, // pulse longer than the coarse range
  output logic             busy      // between the rising and falling edge
);

  logic                       trig;
  logic [FINE_STAGES-1:0]     taps;
  logic [FINE_W-1:0]          code;
  logic                       acc_clr, acc_add, acc_sub;
  logic signed [FINE_W:0]     acc;
  logic                       cnt_clr_n, cnt_en;
  logic [COARSE_W-1:0]        count;
  logic                       done;
  tdc_state_e                 state;
  logic signed [OUT_W+1:0]    sum;

  tdc_controller u_ctrl (
    .clk, .rst_n, .start, .pwm, .trig, .acc_clr, .acc_add, .acc_sub,
    .cnt_clr_n, .cnt_en, .state, .done
  );

  tdc_delay_line #(.STAGES(FINE_STAGES), .STAGE_DELAY_PS(STAGE_DELAY_PS)) u_line (
    .trig, .tap(taps)
  );

  tdc_t2b_coder #(.STAGES(FINE_STAGES), .CODE_W(FINE_W)) u_t2b (
    .therm(taps), .code
  );

  tdc_lsb_accum #(.CODE_W(FINE_W)) u_lsb (
    .clk, .rst_n, .clr(acc_clr), .add(acc_add), .sub(acc_sub), .code, .acc
  );

  tdc_msb_counter #(.WIDTH(COARSE_W)) u_msb (
    .clk, .clr_n(cnt_clr_n && rst_n), .en(cnt_en), .count, .ovf(overflow)
  );

  assign sum   = signed'({2'b00, count, {FINE_W{1'b0}}}) + (OUT_W+2)'(acc);
  assign busy  = (state == TDC_COUNT);
  assign valid = done && !overflow && (sum >= 0) && (sum < 2**OUT_W);
  assign out   = valid ? sum[OUT_W-1:0] : TDC_NO_RESULT;

endmodule
