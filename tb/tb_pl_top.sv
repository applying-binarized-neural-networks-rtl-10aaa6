// tb_pl_top: end-to-end testbench of the programmable-logic subsystem at its
// default (full) size: 100 MHz clock, 1.024 ms PWM period.
//
// An AXI4-Lite master plays the processor and a register model plays the
// neural-network accelerator's control port. The test runs what the
// processor does in one pass of the vehicle's loop:
//   1. reset release through the reset block;
//   2. the inference job for one camera frame: program the input and output
//      buffer addresses and the tile count (1107 tiles for a 640x480 frame),
//      start the accelerator, poll its control register until done, and
//      read the addresses back;
//   3. motor commands in both control modes, with duties worked out here from
//      the vehicle constants (wheel distance 0.065 m, wheel radius 0.0325 m,
//      maximum motor speed 4 1/s, PWM maximum 1023): search mode turning
//      both ways at 1.3 1/s, approach mode at 0.2 m/s straight and steering;
//   4. a full-speed command, a stop, and an access to an unmapped address
//      (DECERR).
// Every PWM period on ENA and ENB is checked by pwm_monitor against the
// speed written, and every command's IN4..IN1 pattern against the code
// written. Each mechanism (reset release, accelerator run, status
// poll, DECERR, both modes, 0 % and 100 % duty, a speed change deferred to
// the next period) is counted and must occur at least once.
module tb_pl_top;
  localparam int unsigned TICK = 100;  // clocks per PWM step at 100 MHz

  logic clk = 1'b0;
  logic rst_in_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;  // 100 MHz

  axil_if ps (.aclk(clk), .aresetn(rst_in_n));
  axil_bfm cpu (.m(ps));

  logic        bnn_rst_n;
  logic [31:0] bnn_awaddr, bnn_wdata, bnn_araddr, bnn_rdata;
  logic [2:0]  bnn_awprot, bnn_arprot;
  logic [3:0]  bnn_wstrb;
  logic        bnn_awvalid, bnn_awready, bnn_wvalid, bnn_wready, bnn_bvalid, bnn_bready;
  logic        bnn_arvalid, bnn_arready, bnn_rvalid, bnn_rready;
  logic [1:0]  bnn_bresp, bnn_rresp;
  logic        ena, enb;
  logic [3:0]  in_pins;

  pl_top dut (
    .fclk_clk0(clk), .fclk_reset0_n(rst_in_n),
    .s_axi_awaddr(ps.awaddr), .s_axi_awprot(ps.awprot), .s_axi_awvalid(ps.awvalid),
    .s_axi_awready(ps.awready), .s_axi_wdata(ps.wdata), .s_axi_wstrb(ps.wstrb),
    .s_axi_wvalid(ps.wvalid), .s_axi_wready(ps.wready), .s_axi_bresp(ps.bresp),
    .s_axi_bvalid(ps.bvalid), .s_axi_bready(ps.bready), .s_axi_araddr(ps.araddr),
    .s_axi_arprot(ps.arprot), .s_axi_arvalid(ps.arvalid), .s_axi_arready(ps.arready),
    .s_axi_rdata(ps.rdata), .s_axi_rresp(ps.rresp), .s_axi_rvalid(ps.rvalid),
    .s_axi_rready(ps.rready),
    .bnn_ap_rst_n(bnn_rst_n),
    .bnn_awaddr(bnn_awaddr), .bnn_awprot(bnn_awprot), .bnn_awvalid(bnn_awvalid),
    .bnn_awready(bnn_awready), .bnn_wdata(bnn_wdata), .bnn_wstrb(bnn_wstrb),
    .bnn_wvalid(bnn_wvalid), .bnn_wready(bnn_wready), .bnn_bresp(bnn_bresp),
    .bnn_bvalid(bnn_bvalid), .bnn_bready(bnn_bready), .bnn_araddr(bnn_araddr),
    .bnn_arprot(bnn_arprot), .bnn_arvalid(bnn_arvalid), .bnn_arready(bnn_arready),
    .bnn_rdata(bnn_rdata), .bnn_rresp(bnn_rresp), .bnn_rvalid(bnn_rvalid),
    .bnn_rready(bnn_rready),
    .motor_ena_o(ena), .motor_enb_o(enb), .motor_input_o(in_pins)
  );

  bnn_ctrl_model #(.CYCLES_PER_IMAGE(10)) bnn (
    .clk(clk), .rst_n(bnn_rst_n),
    .awaddr(bnn_awaddr), .awvalid(bnn_awvalid), .awready(bnn_awready),
    .wdata(bnn_wdata), .wvalid(bnn_wvalid), .wready(bnn_wready),
    .bresp(bnn_bresp), .bvalid(bnn_bvalid), .bready(bnn_bready),
    .araddr(bnn_araddr), .arvalid(bnn_arvalid), .arready(bnn_arready),
    .rdata(bnn_rdata), .rresp(bnn_rresp), .rvalid(bnn_rvalid), .rready(bnn_rready)
  );

  // PWM checking. The period start is taken from the controller itself; the
  // expected duties are this testbench's record of what it wrote.
  logic [9:0] ref_left, ref_right;
  logic [3:0] ref_dir;
  logic       pwm_start;
  int ca, fa, pa, fulla, zeroa, cb, fb, pb, fullb, zerob;
  assign pwm_start = dut.u_l298n.ena_start_o;

  pwm_monitor #(.BITS(10), .TICK(TICK), .NAME("ENA")) mon_a (
    .clk(clk), .rst_n(bnn_rst_n), .start(pwm_start), .pwm(ena), .exp_duty(ref_left),
    .checks(ca), .failures(fa), .periods(pa), .full_periods(fulla), .zero_periods(zeroa));
  pwm_monitor #(.BITS(10), .TICK(TICK), .NAME("ENB")) mon_b (
    .clk(clk), .rst_n(bnn_rst_n), .start(pwm_start), .pwm(enb), .exp_duty(ref_right),
    .checks(cb), .failures(fb), .periods(pb), .full_periods(fullb), .zero_periods(zerob));

  // Mechanism counters.
  int n_reset_release = 0, n_bnn_runs = 0, n_polls = 0, n_decerr = 0;
  int n_search = 0, n_approach = 0, n_deferred = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [1:0] exp);
    logic [1:0] resp;
    int cyc;
    cpu.write(a, d, 4'hF, resp, cyc);
    check(resp == exp, $sformatf("write %h: BRESP %0d, expected %0d", a, resp, exp));
    if (resp == 2'b11) n_decerr++;
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d, input logic [1:0] exp);
    logic [1:0] resp;
    int cyc;
    cpu.read(a, d, resp, cyc);
    check(resp == exp, $sformatf("read %h: RRESP %0d, expected %0d", a, resp, exp));
    if (resp == 2'b11) n_decerr++;
  endtask

  localparam logic [31:0] MOTOR = 32'h43C2_0000;
  localparam logic [31:0] BNN   = 32'h43C0_0000;

  // One motor command, written just after a PWM period starts. With
  // `deferred` set, the speed registers are rewritten in the middle of the
  // following period; the monitor then checks that the new speed only shows
  // in the period after.
  task automatic motor(input logic [3:0] dir, input int l, input int r, input bit deferred);
    @(negedge clk iff pwm_start);
    wr(MOTOR + 32'h4, 32'(l), 2'b00);  ref_left  = 10'(l);
    wr(MOTOR + 32'h8, 32'(r), 2'b00);  ref_right = 10'(r);
    wr(MOTOR + 32'h0, 32'(dir), 2'b00); ref_dir  = dir;
    check(in_pins == ref_dir, $sformatf("IN4..IN1 %b, expected %b", in_pins, ref_dir));
    if (deferred) begin
      @(negedge clk iff pwm_start);
      repeat (40_000) @(negedge clk);
      wr(MOTOR + 32'h4, 32'(1023 - l), 2'b00);
      ref_left = 10'(1023 - l);
      n_deferred++;
    end
  endtask

  // Duties from the vehicle model (search mode eq.: d = dmax/nmax * a/(2r) * nV;
  // approach: d = dmax/nmax / (2 pi r) * (v0 -/+ a/2 * phidot)).
  localparam real A = 0.065, R = 0.0325, NMAX = 4.0, DMAX = 1023.0, PI = 3.14159265358979;
  function automatic int d_search(input real n_v);
    return int'($floor(DMAX / NMAX * A / (2.0 * R) * n_v));
  endfunction
  function automatic int d_side(input real v0, input real phidot, input bit left);
    real v = left ? v0 + A / 2.0 * phidot : v0 - A / 2.0 * phidot;
    if (v < 0.0) v = -v;
    return int'($floor(DMAX / NMAX / (2.0 * PI * R) * v));
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] d;
    automatic int polls;
    automatic int ds;
    ref_left = '0; ref_right = '0; ref_dir = '0;

    // 1. Reset.
    rst_in_n = 1'b0;
    repeat (5) @(posedge clk);
    #2 rst_in_n = 1'b1;
    check(!bnn_rst_n, "peripherals held in reset right after the input rises");
    repeat (40) @(posedge clk);
    check(bnn_rst_n, "peripherals out of reset");
    if (bnn_rst_n) n_reset_release++;
    #1;
    check(in_pins == 4'b0000 && !ena && !enb, "motor pins idle after reset");

    // 2. Inference job for one frame: 1107 tiles of 3072 bytes, 128-byte results.
    wr(BNN + 32'h10, 32'h1000_0000, 2'b00);
    wr(BNN + 32'h1C, 32'h1000_0000 + 1107 * 3072, 2'b00);
    wr(BNN + 32'h5C, 32'd1107, 2'b00);
    rd(BNN + 32'h00, d, 2'b00);
    check(d[2] == 1'b1 && d[0] == 1'b0, $sformatf("accelerator idle before start: %h", d));
    wr(BNN + 32'h00, 32'h1, 2'b00);
    polls = 0;
    do begin
      repeat (500) @(posedge clk);
      rd(BNN + 32'h00, d, 2'b00);
      polls++;
      n_polls++;
    end while (!d[1] && polls < 100);
    check(d[1] && d[2], $sformatf("accelerator done and idle after %0d polls: %h", polls, d));
    check(polls > 1, "accelerator was busy for a while");
    if (d[1]) n_bnn_runs++;
    rd(BNN + 32'h10, d, 2'b00);
    check(d == 32'h1000_0000, "input address read back");
    rd(BNN + 32'h1C, d, 2'b00);
    check(d == 32'h1000_0000 + 1107 * 3072, "output address read back");
    rd(BNN + 32'h5C, d, 2'b00);
    check(d == 32'd1107, "image count read back");
    check(bnn.runs_done == 1, "model saw exactly one run");

    // 3. Search mode, turn_dir 0 then 1 (IN1 = ~t, IN2 = t, IN3 = t, IN4 = ~t).
    ds = d_search(1.3);
    check(ds == 332, $sformatf("search duty %0d, expected 332", ds));
    motor(4'b1001, ds, ds, 1'b0); n_search++;
    motor(4'b0110, ds, ds, 1'b0); n_search++;
    // Approach mode (IN1 = 0, IN2 = 1, IN3 = 0, IN4 = 1) straight and steering.
    motor(4'b1010, d_side(0.2, 0.0, 1), d_side(0.2, 0.0, 0), 1'b0); n_approach++;
    check(d_side(0.2, 0.0, 1) == 250, "approach duty 250 at 0.2 m/s");
    motor(4'b1010, d_side(0.2, 1.0, 1), d_side(0.2, 1.0, 0), 1'b1); n_approach++;
    motor(4'b1010, d_side(0.2, -2.0, 1), d_side(0.2, -2.0, 0), 1'b0); n_approach++;

    // 4. Full speed forward, then stop; unmapped accesses.
    motor(4'b0110, 1023, 1023, 1'b0);
    motor(4'b0000, 0, 0, 1'b0);
    wr(32'h43C1_0000, 32'h1, 2'b11);
    rd(32'h4000_0000, d, 2'b11);
    check(d == 32'h0, "DECERR read data zero");
    @(negedge clk iff pwm_start);
    @(negedge clk iff pwm_start);
    @(negedge clk);
    @(negedge clk);

    checks   += ca + cb;
    failures += fa + fb;
    check(pa >= 8 && pb >= 8, $sformatf("PWM periods checked %0d / %0d", pa, pb));
    check(n_reset_release > 0, "reset release happened");
    check(n_bnn_runs > 0, "accelerator run happened");
    check(n_polls > 0, "status poll happened");
    check(n_decerr >= 2, "DECERR happened");
    check(n_search > 0, "search mode happened");
    check(n_approach > 0, "approach mode happened");
    check(n_deferred > 0, "deferred speed change happened");
    check(fulla > 0 && fullb > 0, "100 % duty happened");
    check(zeroa > 0 && zerob > 0, "0 % duty happened");
    $display("mechanisms: reset %0d, accelerator runs %0d, polls %0d, decerr %0d, search %0d, approach %0d, deferred %0d, full %0d/%0d, zero %0d/%0d, periods %0d/%0d",
             n_reset_release, n_bnn_runs, n_polls, n_decerr, n_search, n_approach, n_deferred,
             fulla, fullb, zeroa, zerob, pa, pb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
