// pwm_monitor: testbench checker for one PWM output.
//
// Samples on the falling clock edge. A period begins in the cycle where
// start is high; the PWM output is registered, so the high time of a period
// is counted from the sample one cycle after the start to the sample in the
// cycle of the next start. At each period boundary it checks the measured
// period length against PERIOD clocks and the measured high time against
// duty*TICK clocks (PERIOD clocks for the full-scale duty 2**BITS-1), where
// duty is the expected value presented on exp_duty in the start cycle. The
// first period after reset is skipped. Counters are outputs so that the
// instantiating testbench can add them to its own totals.
module pwm_monitor #(
  parameter int unsigned BITS = 10,
  parameter int unsigned TICK = 100,
  parameter string       NAME = "pwm"
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            pwm,
  input  logic [BITS-1:0] exp_duty,
  output int              checks,
  output int              failures,
  output int              periods,
  output int              full_periods,   // periods checked at 100 % duty
  output int              zero_periods    // periods checked at 0 % duty
);
  localparam int unsigned PERIOD = (1 << BITS) * TICK;
  localparam logic [BITS-1:0] FULL = '1;

  int unsigned hi_cnt, len_cnt, exp_hi;
  logic        start_d, seen;
  logic [BITS-1:0] duty_cur, duty_new;

  initial begin
    checks = 0; failures = 0; periods = 0; full_periods = 0; zero_periods = 0;
    hi_cnt = 0; len_cnt = 0; start_d = 0; seen = 0; duty_cur = '0; duty_new = '0; exp_hi = 0;
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      start_d = 1'b0;
      seen    = 1'b0;
    end else begin
      if (start_d) begin
        if (seen) begin
          checks += 2;
          periods++;
          if (len_cnt != PERIOD) begin
            failures++;
            $display("%s: period %0d clocks, expected %0d", NAME, len_cnt, PERIOD);
          end
          if (hi_cnt != exp_hi) begin
            failures++;
            $display("%s: high %0d clocks for duty %0d, expected %0d", NAME, hi_cnt, duty_cur, exp_hi);
          end
          if (duty_cur == FULL) full_periods++;
          if (duty_cur == '0)   zero_periods++;
        end
        seen     = 1'b1;
        duty_cur = duty_new;
        exp_hi   = (duty_new == FULL) ? PERIOD : int'(duty_new) * TICK;
        hi_cnt   = pwm ? 1 : 0;
        len_cnt = 1;
      end else begin
        hi_cnt  += pwm ? 1 : 0;
        len_cnt += 1;
      end
      if (start) duty_new = exp_duty;
      start_d = start;
    end
  end
endmodule
