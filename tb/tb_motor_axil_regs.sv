// tb_motor_axil_regs: self-checking testbench of the motor controller's
// AXI4-Lite register block.
//
// A reference copy of the three registers is kept in the testbench and
// updated by byte strobe; after every write the block's motor_cmd_t output
// must equal it. Covered: reset values, each register, the five documented
// direction codes, speeds 0 and 1023, partial strobes, bits above a field,
// the reserved word at 0Ch, reads (write-only registers read as zero with
// OKAY) and the response timing: BVALID one clock after the AW/W handshake
// when BREADY is already high, RVALID one clock after AR.
module tb_motor_axil_regs;
  import motor_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axil_if bus (.aclk(clk), .aresetn(rst_n));
  axil_bfm bfm (.m(bus));
  motor_cmd_t cmd;
  motor_axil_regs dut (.s(bus), .cmd_o(cmd));

  logic [3:0] ref_dir;
  logic [9:0] ref_left, ref_right;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_cmd(input string what);
    check(cmd.in_pins == ref_dir && cmd.speed_left == ref_left && cmd.speed_right == ref_right,
          $sformatf("%s: dir %b/%b left %0d/%0d right %0d/%0d", what, cmd.in_pins, ref_dir,
                    cmd.speed_left, ref_left, cmd.speed_right, ref_right));
  endtask

  // Reference register update.
  task automatic ref_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] st);
    case (a[3:2])
      2'd0: if (st[0]) ref_dir = d[3:0];
      2'd1: begin if (st[0]) ref_left[7:0] = d[7:0]; if (st[1]) ref_left[9:8] = d[9:8]; end
      2'd2: begin if (st[0]) ref_right[7:0] = d[7:0]; if (st[1]) ref_right[9:8] = d[9:8]; end
      default: ;
    endcase
  endtask

  task automatic do_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] st);
    logic [1:0] resp;
    int cyc;
    bfm.write(a, d, st, resp, cyc);
    ref_write(a, d, st);
    check(resp == 2'b00, $sformatf("BRESP %0d at %h", resp, a));
    check_cmd($sformatf("after write %h <= %h (strb %b)", a, d, st));
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] rd;
    automatic logic [1:0]  resp;
    automatic int cyc;
    automatic dir_code_e codes[5] = '{DIR_STOP, DIR_FORWARD, DIR_BACKWARD, DIR_ROT_LEFT, DIR_ROT_RIGHT};
    ref_dir = '0; ref_left = '0; ref_right = '0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check_cmd("reset values");

    // Direction codes.
    foreach (codes[i]) do_write(32'h43C2_0000, {28'h0, codes[i]}, 4'hF);
    // Speeds: 0, full scale, mid, with bits above the field set.
    do_write(32'h43C2_0004, 32'd1023, 4'hF);
    do_write(32'h43C2_0008, 32'd0, 4'hF);
    do_write(32'h43C2_0008, 32'hFFFF_FC00 | 32'd517, 4'hF);
    do_write(32'h43C2_0004, 32'hDEAD_B000 | 32'd1, 4'hF);
    // Partial strobes: low byte only, then high byte only.
    do_write(32'h43C2_0004, 32'h0000_03AA, 4'b0001);
    do_write(32'h43C2_0008, 32'h0000_0255, 4'b0010);
    do_write(32'h43C2_0000, 32'h0000_000F, 4'b1110);  // no byte 0: ignored
    // Reserved word.
    do_write(32'h43C2_000C, 32'hFFFF_FFFF, 4'hF);

    // Random writes.
    repeat (200) begin
      automatic logic [31:0] a, d;
      automatic logic [3:0]  st;
      a  = 32'h43C2_0000 | (32'($urandom % 4) << 2);
      d  = $urandom;
      st = 4'($urandom);
      do_write(a, d, st);
    end

    // Reads: all four words read zero with OKAY.
    for (int w = 0; w < 4; w++) begin
      bfm.read(32'h43C2_0000 | (w << 2), rd, resp, cyc);
      check(rd == 32'h0 && resp == 2'b00, $sformatf("read word %0d: %h resp %0d", w, rd, resp));
    end

    // Timing with no added delays: a write completes (B handshake) one clock
    // after the AW/W handshake, a read one clock after AR.
    bfm.randomize_delays = 1'b0;
    bfm.write(32'h43C2_0004, 32'd700, 4'hF, resp, cyc);
    ref_write(32'h43C2_0004, 32'd700, 4'hF);
    check(cyc == 1, $sformatf("write latency %0d clocks, expected 1", cyc));
    check_cmd("after zero-delay write");
    bfm.read(32'h43C2_0008, rd, resp, cyc);
    check(cyc == 1, $sformatf("read latency %0d clocks, expected 1", cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
