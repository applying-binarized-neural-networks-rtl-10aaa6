// pwm_gen: pulse-width modulator for one L298N motor-enable pin (ENA or ENB).
//
// A prescaler divides the fabric clock into PWM steps of TICK_DIV cycles; a
// BITS-wide step counter then runs through 2**BITS steps per period. With the
// defaults (100 MHz clock, TICK_DIV = 100, BITS = 10) a step is 1 us and a
// period 1024 us = 1.024 ms, i.e. 976.6 Hz, with a 10-bit duty resolution,
// as the motor controller is specified. The output is high during the first
// `duty` steps of each period, so duty 0 is 0 % and a duty of 2**BITS-1
// (1023) is held high for the whole period, matching the specified scale
// "0 (0 %) ... 1023 (100 %)". Every other duty value d gives d/1024 of the
// period.
//
// The duty input is sampled once per period, in the cycle the period starts,
// so a change written by software never produces a runt pulse; this
// sampling, the 100 MHz clock and the handling of 1023 are this design's
// choices. period_start_o pulses for one cycle at the start of each period.
// pwm_o is registered, so its waveform trails period_start_o by one clock
// and is high for exactly duty*TICK_DIV clocks of every 2**BITS*TICK_DIV.
//
// Interface: clk, rst_n (synchronous, active low), duty_i, pwm_o,
// period_start_o. After reset the output is low and the first period starts
// on the first cycle out of reset.
module pwm_gen #(
  parameter int unsigned BITS     = 10,
  parameter int unsigned TICK_DIV = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [BITS-1:0] duty_i,
  output logic            pwm_o,
  output logic            period_start_o
);
  localparam int unsigned PRE_W = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  localparam logic [BITS-1:0]  FULL     = '1;
  localparam logic [PRE_W-1:0] PRE_LAST = PRE_W'(TICK_DIV - 1);

  logic [PRE_W-1:0] pre_cnt;   // cycles within the current step
  logic [BITS-1:0]  step_cnt;  // step within the current period
  logic [BITS-1:0]  duty_q;    // duty in force for the current period
  logic [BITS-1:0]  duty_cur;
  logic             tick;
  logic             start;

  assign tick  = (pre_cnt == PRE_LAST);
  assign start = (step_cnt == '0) && (pre_cnt == '0);

  // Prescaler and step counter; the step counter wraps after 2**BITS steps.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre_cnt  <= '0;
      step_cnt <= '0;
    end else if (tick) begin
      pre_cnt  <= '0;
      step_cnt <= step_cnt + 1'b1;
    end else begin
      pre_cnt  <= pre_cnt + 1'b1;
    end
  end

  // The duty input is taken in the first cycle of a period and held for the
  // rest of it.
  assign duty_cur = start ? duty_i : duty_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      duty_q <= '0;
      pwm_o  <= 1'b0;
    end else begin
      duty_q <= duty_cur;
      pwm_o  <= (duty_cur == FULL) || (step_cnt < duty_cur);
    end
  end

  assign period_start_o = start && rst_n;

endmodule
