// motor_ctrl: the L298N motor controller of the programmable logic (the
// "l298n" peripheral).
//
// Software writes a direction code and a speed for each side of the vehicle
// over AXI4-Lite (see motor_axil_regs for the register map). The four
// direction bits drive the H-bridge inputs IN1..IN4 directly, and each speed
// (0..1023) sets the duty cycle of a 976.6 Hz, 10-bit PWM on the bridge's
// enable pin: ENA for the left motors, ENB for the right motors. The
// documented direction codes (IN4..IN1) are 0000 stop, 0110 forward,
// 1001 backward, 1010 rotate left, 0101 rotate right; the controller passes
// any code through unchanged, as the register layout implies. The split of
// left to ENA and right to ENB follows the vehicle's control description.
//
// Pins (Pynq-Z1 header J3): motor_ena_o IO39, motor_input_o[0..3] =
// IN1..IN4 on IO38..IO35, motor_enb_o IO34. motor_input_o changes in the
// cycle after a write; ENA/ENB pick up a new speed at the next PWM period
// start (at most 1.024 ms later). The two PWM channels run from separate but
// identical counters and therefore stay in phase.
//
// Interface: s_axi (axil_if slave modport; its aclk/aresetn clock and reset
// the whole block), the three pin outputs, and ena_start_o, a one-cycle pulse
// at the start of each PWM period.
module motor_ctrl
  import motor_pkg::*;
#(
  parameter int unsigned PWM_TICK_DIV = 100  // clocks per 1 us PWM step at 100 MHz
) (
  axil_if.slave      s_axi,
  output logic       motor_ena_o,
  output logic       motor_enb_o,
  output logic [3:0] motor_input_o,
  output logic       ena_start_o
);
  motor_cmd_t cmd;
  logic       enb_start_unused;

  motor_axil_regs u_regs (
    .s     (s_axi),
    .cmd_o (cmd)
  );

  pwm_gen #(.BITS(SPEED_BITS), .TICK_DIV(PWM_TICK_DIV)) u_pwm_a (
    .clk            (s_axi.aclk),
    .rst_n          (s_axi.aresetn),
    .duty_i         (cmd.speed_left),
    .pwm_o          (motor_ena_o),
    .period_start_o (ena_start_o)
  );

  pwm_gen #(.BITS(SPEED_BITS), .TICK_DIV(PWM_TICK_DIV)) u_pwm_b (
    .clk            (s_axi.aclk),
    .rst_n          (s_axi.aresetn),
    .duty_i         (cmd.speed_right),
    .pwm_o          (motor_enb_o),
    .period_start_o (enb_start_unused)
  );

  assign motor_input_o = cmd.in_pins;

endmodule
