// pl_top: programmable-logic subsystem of the autonomous vehicle.
//
// The vehicle's FPGA fabric hosts two peripherals of the ARM processing
// system: a binarized neural network accelerator that classifies 32x32 RGB
// image tiles, and a motor controller that turns speed and direction
// commands into the six control pins of an L298N H-bridge. The processor
// reaches both over one AXI4-Lite path through a peripheral interconnect:
// the accelerator's control registers at 0x43C0_0000 and the motor
// controller's at 0x43C2_0000. A reset block synchronises the processor's
// fabric reset to the 100 MHz fabric clock and resets the interconnect and
// both peripherals.
//
// The accelerator itself (an existing HLS core with its own AXI4 master to
// DDR memory) and the processing system are not part of this RTL: the
// processor's general-purpose AXI master enters as the s_axi_* ports and
// the accelerator's control slave leaves as the bnn_* ports, together with
// its reset bnn_ap_rst_n. The accelerator's memory path (its AXI4 master,
// the memory interconnect and the processor's HP0 port) lies entirely
// outside this module. The block structure, the address map and the motor
// pins follow the published block design; the sequential interconnect and
// the reset timing are this design's own.
//
// Ports: fclk_clk0 (100 MHz), fclk_reset0_n (asynchronous, active low),
// s_axi_* (AXI4-Lite slave, 32-bit address and data), bnn_* (AXI4-Lite
// master), motor_ena_o / motor_enb_o (PWM enables, left / right),
// motor_input_o[3:0] (IN4..IN1). See motor_ctrl and axil_interconnect for
// timing.
module pl_top (
  input  logic        fclk_clk0,
  input  logic        fclk_reset0_n,
  // Processing system general-purpose master (M_AXI_GP0), AXI4-Lite
  input  logic [31:0] s_axi_awaddr,
  input  logic [2:0]  s_axi_awprot,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [31:0] s_axi_araddr,
  input  logic [2:0]  s_axi_arprot,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // Neural network accelerator control slave (s_axi_control), AXI4-Lite
  output logic        bnn_ap_rst_n,
  output logic [31:0] bnn_awaddr,
  output logic [2:0]  bnn_awprot,
  output logic        bnn_awvalid,
  input  logic        bnn_awready,
  output logic [31:0] bnn_wdata,
  output logic [3:0]  bnn_wstrb,
  output logic        bnn_wvalid,
  input  logic        bnn_wready,
  input  logic [1:0]  bnn_bresp,
  input  logic        bnn_bvalid,
  output logic        bnn_bready,
  output logic [31:0] bnn_araddr,
  output logic [2:0]  bnn_arprot,
  output logic        bnn_arvalid,
  input  logic        bnn_arready,
  input  logic [31:0] bnn_rdata,
  input  logic [1:0]  bnn_rresp,
  input  logic        bnn_rvalid,
  output logic        bnn_rready,
  // L298N motor driver pins
  output logic        motor_ena_o,
  output logic        motor_enb_o,
  output logic [3:0]  motor_input_o
);
  logic ic_rst_n;
  logic periph_rst_n;
  logic pwm_start_unused;

  reset_sync u_rst (
    .slowest_sync_clk     (fclk_clk0),
    .ext_reset_in_n       (fclk_reset0_n),
    .interconnect_aresetn (ic_rst_n),
    .peripheral_aresetn   (periph_rst_n)
  );

  axil_if gp0      (.aclk(fclk_clk0), .aresetn(ic_rst_n));
  axil_if bnn_ctrl (.aclk(fclk_clk0), .aresetn(ic_rst_n));
  axil_if motor    (.aclk(fclk_clk0), .aresetn(periph_rst_n));

  // Processor port onto the interconnect's slave side.
  assign gp0.awaddr    = s_axi_awaddr;
  assign gp0.awprot    = s_axi_awprot;
  assign gp0.awvalid   = s_axi_awvalid;
  assign s_axi_awready = gp0.awready;
  assign gp0.wdata     = s_axi_wdata;
  assign gp0.wstrb     = s_axi_wstrb;
  assign gp0.wvalid    = s_axi_wvalid;
  assign s_axi_wready  = gp0.wready;
  assign s_axi_bresp   = gp0.bresp;
  assign s_axi_bvalid  = gp0.bvalid;
  assign gp0.bready    = s_axi_bready;
  assign gp0.araddr    = s_axi_araddr;
  assign gp0.arprot    = s_axi_arprot;
  assign gp0.arvalid   = s_axi_arvalid;
  assign s_axi_arready = gp0.arready;
  assign s_axi_rdata   = gp0.rdata;
  assign s_axi_rresp   = gp0.rresp;
  assign s_axi_rvalid  = gp0.rvalid;
  assign gp0.rready    = s_axi_rready;

  axil_interconnect u_periph_ic (
    .s   (gp0),
    .m00 (bnn_ctrl),
    .m01 (motor)
  );

  // Accelerator control link out to the pins of this module.
  assign bnn_awaddr       = bnn_ctrl.awaddr;
  assign bnn_awprot       = bnn_ctrl.awprot;
  assign bnn_awvalid      = bnn_ctrl.awvalid;
  assign bnn_ctrl.awready = bnn_awready;
  assign bnn_wdata        = bnn_ctrl.wdata;
  assign bnn_wstrb        = bnn_ctrl.wstrb;
  assign bnn_wvalid       = bnn_ctrl.wvalid;
  assign bnn_ctrl.wready  = bnn_wready;
  assign bnn_ctrl.bresp   = bnn_bresp;
  assign bnn_ctrl.bvalid  = bnn_bvalid;
  assign bnn_bready       = bnn_ctrl.bready;
  assign bnn_araddr       = bnn_ctrl.araddr;
  assign bnn_arprot       = bnn_ctrl.arprot;
  assign bnn_arvalid      = bnn_ctrl.arvalid;
  assign bnn_ctrl.arready = bnn_arready;
  assign bnn_ctrl.rdata   = bnn_rdata;
  assign bnn_ctrl.rresp   = bnn_rresp;
  assign bnn_ctrl.rvalid  = bnn_rvalid;
  assign bnn_rready       = bnn_ctrl.rready;
  assign bnn_ap_rst_n     = periph_rst_n;

  motor_ctrl u_l298n (
    .s_axi         (motor),
    .motor_ena_o   (motor_ena_o),
    .motor_enb_o   (motor_enb_o),
    .motor_input_o (motor_input_o),
    .ena_start_o   (pwm_start_unused)
  );

endmodule
