// tb_reset_sync: self-checking testbench of the reset block.
//
// Drops and raises the asynchronous reset input at random points relative to
// the clock, several times, and checks that both outputs fall without
// waiting for a clock edge, stay low while the input is low, and rise
// together on exactly the (HOLD_CYCLES + 3)th rising edge after the input
// rises. A short input pulse in the middle of a release must restart the
// count. Run with the default HOLD_CYCLES = 16 and with 3.
module tb_reset_sync;
  logic clk = 1'b0;
  logic rst_in_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic ic_a, pe_a, ic_b, pe_b;
  reset_sync dut_a (.slowest_sync_clk(clk), .ext_reset_in_n(rst_in_n),
                    .interconnect_aresetn(ic_a), .peripheral_aresetn(pe_a));
  reset_sync #(.HOLD_CYCLES(3)) dut_b (.slowest_sync_clk(clk), .ext_reset_in_n(rst_in_n),
                    .interconnect_aresetn(ic_b), .peripheral_aresetn(pe_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Edges from the input's release until each output is high.
  int edges_a, edges_b;
  bit counting;
  always @(posedge clk) if (counting) begin
    #1;
    if (!ic_a) edges_a++;
    if (!ic_b) edges_b++;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    counting = 0;
    rst_in_n = 1'b1;
    #3 rst_in_n = 1'b0;
    #1;
    check(!ic_a && !pe_a && !ic_b && !pe_b, "outputs low at once on reset");
    for (int k = 0; k < 6; k++) begin
      repeat (5) @(posedge clk);
      #(1 + $urandom % 8);
      edges_a = 0; edges_b = 0;
      counting = 1;
      rst_in_n = 1'b1;
      if (k == 3) begin
        // Glitch low for a moment after 5 edges: the count restarts.
        repeat (5) @(posedge clk);
        #2 rst_in_n = 1'b0;
        #1 check(!ic_a && !ic_b, "outputs low during glitch");
        #1 rst_in_n = 1'b1;
        edges_a = 0; edges_b = 0;
      end
      repeat (30) begin
        @(posedge clk); #2;
        check(ic_a == pe_a && ic_b == pe_b, "outputs move together");
      end
      counting = 0;
      check(ic_a && ic_b, "released");
      // With the counter starting after the input release, the output is
      // first seen high after HOLD+3 edges, so HOLD+2 edges counted it low.
      check(edges_a == 16 + 2, $sformatf("release %0d: %0d edges low, expected 18", k, edges_a));
      check(edges_b == 3 + 2, $sformatf("release %0d: %0d edges low, expected 5", k, edges_b));
      #(1 + $urandom % 8);
      rst_in_n = 1'b0;
      #1 check(!ic_a && !pe_a && !ic_b && !pe_b, "asynchronous assertion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
