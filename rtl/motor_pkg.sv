// motor_pkg: constants and types shared by the L298N motor controller.
//
// The register map is the motor controller's four 32-bit AXI4-Lite words:
// offset 00h carries the H-bridge inputs IN1..IN4 in bits 3..0, offset 04h the
// left-side speed and offset 08h the right-side speed, both 10 bits wide in
// bits 9..0, and offset 0Ch is reserved. Speeds run from 0 (0 % duty) to 1023
// (100 % duty). The PWM period is 1024 steps of 1 us, i.e. 1.024 ms or
// 976.6 Hz. All of this follows the motor controller's published register
// layout; the enum of direction codes repeats the documented IN4..IN1
// combinations so that software-side models and testbenches can name them.
package motor_pkg;

  // Register word offsets (byte addresses within the 16-byte window).
  localparam logic [3:0] REG_DIR_OFS   = 4'h0;
  localparam logic [3:0] REG_LEFT_OFS  = 4'h4;
  localparam logic [3:0] REG_RIGHT_OFS = 4'h8;
  localparam logic [3:0] REG_RSVD_OFS  = 4'hC;

  // Speed / PWM resolution.
  localparam int unsigned SPEED_BITS = 10;

  typedef logic [SPEED_BITS-1:0] speed_t;

  // H-bridge direction inputs, bit 0 = IN1 ... bit 3 = IN4.
  typedef enum logic [3:0] {
    DIR_STOP       = 4'b0000,
    DIR_FORWARD    = 4'b0110,  // IN3=1, IN2=1
    DIR_BACKWARD   = 4'b1001,  // IN4=1, IN1=1
    DIR_ROT_LEFT   = 4'b1010,  // IN4=1, IN2=1
    DIR_ROT_RIGHT  = 4'b0101   // IN3=1, IN1=1
  } dir_code_e;

  // Everything the register block hands to the pin stage.
  typedef struct packed {
    logic [3:0] in_pins;  // IN4..IN1
    speed_t     speed_left;
    speed_t     speed_right;
  } motor_cmd_t;

endpackage
