// tb_motor_ctrl: self-checking testbench of the L298N motor controller.
//
// Runs the controller with 4 clocks per PWM step (period 4096 clocks) and
// issues a series of motor commands over AXI4-Lite, each written just after
// a PWM period starts: stop, the documented direction codes, the pin
// patterns of the vehicle's search and approach modes, full and zero speed
// and random commands. After each command the IN pins must show the written
// code; pwm_monitor checks every ENA period against the left speed and every
// ENB period against the right speed in force when the period began, which
// also checks that a new speed waits for the next period.
module tb_motor_ctrl;
  import motor_pkg::*;

  localparam int unsigned TICK = 4;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axil_if bus (.aclk(clk), .aresetn(rst_n));
  axil_bfm bfm (.m(bus));

  logic       ena, enb, start;
  logic [3:0] in_pins;

  motor_ctrl #(.PWM_TICK_DIV(TICK)) dut (
    .s_axi(bus), .motor_ena_o(ena), .motor_enb_o(enb), .motor_input_o(in_pins),
    .ena_start_o(start));

  logic [3:0] ref_dir;
  logic [9:0] ref_left, ref_right;
  int ca, fa, pa, fulla, zeroa, cb, fb, pb, fullb, zerob;

  pwm_monitor #(.BITS(10), .TICK(TICK), .NAME("ENA")) mon_a (
    .clk(clk), .rst_n(rst_n), .start(start), .pwm(ena), .exp_duty(ref_left),
    .checks(ca), .failures(fa), .periods(pa), .full_periods(fulla), .zero_periods(zeroa));
  pwm_monitor #(.BITS(10), .TICK(TICK), .NAME("ENB")) mon_b (
    .clk(clk), .rst_n(rst_n), .start(start), .pwm(enb), .exp_duty(ref_right),
    .checks(cb), .failures(fb), .periods(pb), .full_periods(fullb), .zero_periods(zerob));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic command(input logic [3:0] dir, input logic [9:0] l, input logic [9:0] r);
    logic [1:0] resp;
    int cyc;
    @(negedge clk iff start);
    bfm.write(32'h0000_0004, {22'h0, l}, 4'hF, resp, cyc);
    ref_left = l;
    check(resp == 2'b00, "BRESP left");
    bfm.write(32'h0000_0008, {22'h0, r}, 4'hF, resp, cyc);
    ref_right = r;
    check(resp == 2'b00, "BRESP right");
    bfm.write(32'h0000_0000, {28'h0, dir}, 4'hF, resp, cyc);
    ref_dir = dir;
    check(resp == 2'b00, "BRESP dir");
    check(in_pins == ref_dir, $sformatf("IN4..IN1 = %b, expected %b", in_pins, ref_dir));
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_dir = '0; ref_left = '0; ref_right = '0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(in_pins == 4'b0000 && !ena && !enb, "outputs idle after reset");

    command(DIR_FORWARD,   10'd1023, 10'd1023);
    command(DIR_BACKWARD,  10'd512,  10'd511);
    command(DIR_ROT_LEFT,  10'd0,    10'd1023);
    command(DIR_ROT_RIGHT, 10'd1,    10'd1022);
    // Search mode, turn_dir = 0 and 1: IN1 = ~t, IN2 = t, IN3 = t, IN4 = ~t, both sides at d_search.
    command(4'b1001, 10'd332, 10'd332);
    command(4'b0110, 10'd332, 10'd332);
    // Approach mode: IN1 = 0, IN2 = 1, IN3 = 0, IN4 = 1, left and right speeds differ while steering.
    command(4'b1010, 10'd300, 10'd200);
    repeat (6) command(4'($urandom), 10'($urandom), 10'($urandom));
    command(DIR_STOP, 10'd0, 10'd0);
    @(negedge clk iff start);
    @(negedge clk iff start);
    @(negedge clk);
    @(negedge clk);

    checks   += ca + cb;
    failures += fa + fb;
    check(pa >= 14 && pb >= 14, $sformatf("PWM periods checked: %0d / %0d", pa, pb));
    check(fulla > 0 && fullb > 0 && zeroa > 0 && zerob > 0, "0 % and 100 % duty seen on both pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
