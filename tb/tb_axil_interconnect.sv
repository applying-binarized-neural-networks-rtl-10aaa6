// tb_axil_interconnect: self-checking testbench of the AXI4-Lite peripheral
// interconnect.
//
// Two register-file slave models sit on M00 (window 0x43C0_xxxx) and M01
// (window 0x43C2_xxxx). Random writes and reads across both windows and
// unmapped addresses are compared with a reference memory per slave: data
// must land in, and be read back from, the slave whose window holds the
// address and only there; unmapped addresses must answer DECERR without
// reaching a slave; a slave's SLVERR must be passed back. Window edges are
// probed explicitly. Finally, with all random delays off, a write and a read
// must each complete 3 clocks after the request handshake.
module tb_axil_interconnect;
  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;
  int n_decerr = 0, n_slverr = 0, n_m00 = 0, n_m01 = 0;

  always #5 clk = ~clk;

  axil_if s_bus (.aclk(clk), .aresetn(rst_n));
  axil_if m0_bus (.aclk(clk), .aresetn(rst_n));
  axil_if m1_bus (.aclk(clk), .aresetn(rst_n));

  axil_bfm bfm (.m(s_bus));
  axil_interconnect dut (.s(s_bus), .m00(m0_bus), .m01(m1_bus));
  axil_slave_model #(.ERR_WORD(15)) sl0 (.s(m0_bus));
  axil_slave_model #(.ERR_WORD(14)) sl1 (.s(m1_bus));

  logic [31:0] ref0 [16];
  logic [31:0] ref1 [16];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Which slave should see an address: 0, 1 or -1 (unmapped).
  function automatic int target(input logic [31:0] a);
    if (a[31:16] == 16'h43C0) return 0;
    if (a[31:16] == 16'h43C2) return 1;
    return -1;
  endfunction

  function automatic logic [1:0] exp_resp(input logic [31:0] a);
    int t = target(a);
    if (t < 0) return 2'b11;
    if (t == 0 && a[5:2] == 4'd15) return 2'b10;
    if (t == 1 && a[5:2] == 4'd14) return 2'b10;
    return 2'b00;
  endfunction

  task automatic do_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] st);
    logic [1:0] resp;
    int cyc, w0, w1, t;
    w0 = sl0.n_writes; w1 = sl1.n_writes;
    bfm.write(a, d, st, resp, cyc);
    t = target(a);
    for (int b = 0; b < 4; b++) if (st[b]) begin
      if (t == 0) ref0[a[5:2]][8*b +: 8] = d[8*b +: 8];
      if (t == 1) ref1[a[5:2]][8*b +: 8] = d[8*b +: 8];
    end
    check(resp == exp_resp(a), $sformatf("write %h: BRESP %0d, expected %0d", a, resp, exp_resp(a)));
    check((sl0.n_writes - w0) == (t == 0 ? 1 : 0) && (sl1.n_writes - w1) == (t == 1 ? 1 : 0),
          $sformatf("write %h reached the wrong slave", a));
    if (t == 0) check(sl0.last_waddr == a, "M00 address");
    if (t == 1) check(sl1.last_waddr == a, "M01 address");
    if (resp == 2'b11) n_decerr++;
    if (resp == 2'b10) n_slverr++;
    if (t == 0) n_m00++;
    if (t == 1) n_m01++;
  endtask

  task automatic do_read(input logic [31:0] a);
    logic [31:0] d, e;
    logic [1:0] resp;
    int cyc, r0, r1, t;
    r0 = sl0.n_reads; r1 = sl1.n_reads;
    bfm.read(a, d, resp, cyc);
    t = target(a);
    e = (t == 0) ? ref0[a[5:2]] : (t == 1) ? ref1[a[5:2]] : 32'h0;
    check(resp == exp_resp(a), $sformatf("read %h: RRESP %0d, expected %0d", a, resp, exp_resp(a)));
    check(d == e, $sformatf("read %h: %h, expected %h", a, d, e));
    check((sl0.n_reads - r0) == (t == 0 ? 1 : 0) && (sl1.n_reads - r1) == (t == 1 ? 1 : 0),
          $sformatf("read %h reached the wrong slave", a));
    if (resp == 2'b11) n_decerr++;
    if (resp == 2'b10) n_slverr++;
  endtask

  function automatic logic [31:0] rand_addr();
    logic [31:0] bases[5] = '{32'h43C0_0000, 32'h43C2_0000, 32'h43C1_0000, 32'h43C3_0000, 32'h0000_0000};
    int k = $urandom % 8;
    logic [31:0] base = bases[k < 3 ? 0 : k < 6 ? 1 : 2 + (k - 6) + int'($urandom % 2)];
    return base | (32'($urandom % 16) << 2);
  endfunction

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [1:0] resp;
    automatic logic [31:0] d;
    automatic int cyc;
    foreach (ref0[i]) begin ref0[i] = '0; ref1[i] = '0; end
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;

    // Window edges.
    do_write(32'h43C0_FFFC, 32'h1111_1111, 4'hF);
    do_write(32'h43C1_0000, 32'h2222_2222, 4'hF);
    do_write(32'h43C2_0000, 32'h3333_3333, 4'hF);
    do_write(32'h43C2_FFFC, 32'h4444_4444, 4'hF);
    do_write(32'h43C3_0000, 32'h5555_5555, 4'hF);
    do_write(32'h43BF_FFFC, 32'h6666_6666, 4'hF);
    do_read(32'h43C0_003C);
    do_read(32'h43C2_0000);
    do_read(32'h43C1_FFFC);

    repeat (400) begin
      if (($urandom % 2) != 0) do_write(rand_addr(), $urandom, 4'($urandom));
      else              do_read(rand_addr());
    end
    for (int w = 0; w < 16; w++) begin
      do_read(32'h43C0_0000 | (w << 2));
      do_read(32'h43C2_0000 | (w << 2));
    end

    check(n_decerr > 0 && n_slverr > 0 && n_m00 > 0 && n_m01 > 0,
          $sformatf("coverage: decerr %0d slverr %0d m00 %0d m01 %0d", n_decerr, n_slverr, n_m00, n_m01));

    // Latency with no delays anywhere (slave ready is combinational).
    bfm.randomize_delays = 1'b0;
    sl1.aw_dly = 0; sl1.w_dly = 0; sl1.ar_dly = 0;
    @(posedge clk); #1;
    bfm.write(32'h43C2_0010, 32'hABCD_0123, 4'hF, resp, cyc);
    check(cyc == 3, $sformatf("write latency %0d, expected 3", cyc));
    bfm.read(32'h43C2_0010, d, resp, cyc);
    check(cyc == 3 && d == 32'hABCD_0123, $sformatf("read latency %0d, expected 3", cyc));
    bfm.write(32'h4000_0000, 32'h0, 4'hF, resp, cyc);
    check(cyc == 1 && resp == 2'b11, $sformatf("DECERR write latency %0d, expected 1", cyc));

    $display("decerr %0d slverr %0d m00 writes %0d m01 writes %0d", n_decerr, n_slverr, n_m00, n_m01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
