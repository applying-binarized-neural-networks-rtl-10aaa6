// tb_pwm_gen: self-checking testbench of pwm_gen.
//
// Two instances run side by side: one at the default 100 clocks per step
// (1.024 ms period at 100 MHz) and a fast one with 4 clocks per step. Both
// get a sequence of duties including 0, 1, 1022 and 1023, changed at random
// points inside periods. pwm_monitor checks every period's length and high
// time against the duty present when the period started, so a duty change
// must only take effect at the next period.
module tb_pwm_gen;
  logic clk = 1'b0;
  logic rst_n;
  logic [9:0] duty_f, duty_d;
  logic pwm_f, pwm_d, start_f, start_d;
  int checks = 0, failures = 0;
  int c_f, f_f, p_f, full_f, zero_f;
  int c_d, f_d, p_d, full_d, zero_d;
  int mid_changes = 0;

  always #5 clk = ~clk;

  pwm_gen #(.BITS(10), .TICK_DIV(4)) dut_fast (
    .clk(clk), .rst_n(rst_n), .duty_i(duty_f), .pwm_o(pwm_f), .period_start_o(start_f));
  pwm_gen dut_def (
    .clk(clk), .rst_n(rst_n), .duty_i(duty_d), .pwm_o(pwm_d), .period_start_o(start_d));

  pwm_monitor #(.BITS(10), .TICK(4), .NAME("fast")) mon_f (
    .clk(clk), .rst_n(rst_n), .start(start_f), .pwm(pwm_f), .exp_duty(duty_f),
    .checks(c_f), .failures(f_f), .periods(p_f), .full_periods(full_f), .zero_periods(zero_f));
  pwm_monitor #(.BITS(10), .TICK(100), .NAME("default")) mon_d (
    .clk(clk), .rst_n(rst_n), .start(start_d), .pwm(pwm_d), .exp_duty(duty_d),
    .checks(c_d), .failures(f_d), .periods(p_d), .full_periods(full_d), .zero_periods(zero_d));

  localparam int N_FAST = 14;
  logic [9:0] fast_seq [N_FAST] = '{10'd0, 10'd1, 10'd2, 10'd513, 10'd1022, 10'd1023,
                                    10'd300, 10'd1023, 10'd0, 10'd77, 10'd900, 10'd409,
                                    10'd1, 10'd640};

  // Watchdog.
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fast instance: change the duty at a random point inside each period.
  initial begin
    duty_f = fast_seq[0];
    duty_d = 10'd0;
    rst_n  = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 1; i < N_FAST; i++) begin
      @(negedge clk iff start_f);
      repeat (1 + ($urandom % 4000)) @(negedge clk);
      duty_f = fast_seq[i];
      mid_changes++;
    end
    @(negedge clk iff start_f);
    @(negedge clk iff start_f);
  end

  // Default instance: 0 %, 50 %, a value near full, then full scale.
  initial begin
    @(posedge rst_n);
    foreach (fast_seq[i]) if (i < 4) begin
      @(negedge clk iff start_d);
      repeat (20_000) @(negedge clk);
      duty_d = (i == 0) ? 10'd512 : (i == 1) ? 10'd1000 : (i == 2) ? 10'd1023 : 10'd5;
    end
    @(negedge clk iff start_d);
    @(negedge clk iff start_d);
    @(negedge clk);
    @(negedge clk);
    checks   += c_f + c_d;
    failures += f_f + f_d;
    // Expected period counts: every sequence value held for one whole period.
    checks++;
    if (p_f < N_FAST) begin failures++; $display("fast: only %0d periods", p_f); end
    checks++;
    if (p_d < 4) begin failures++; $display("default: only %0d periods", p_d); end
    checks++;
    if (full_f == 0 || zero_f == 0 || full_d == 0 || zero_d == 0) begin
      failures++; $display("full-scale or zero duty never checked");
    end
    $display("periods fast=%0d default=%0d, mid-period changes %0d", p_f, p_d, mid_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
