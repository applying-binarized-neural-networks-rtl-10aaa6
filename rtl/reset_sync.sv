// reset_sync: processor-system reset block of the programmable logic
// ("rst_ps7_0_100M" in the block design).
//
// The processing system's fabric reset FCLK_RESET0_N is asynchronous to the
// 100 MHz fabric clock. This block asserts its outputs at once when the
// reset input goes low, and releases them synchronously: the input is passed
// through a two-flop synchroniser, then held for HOLD_CYCLES further clocks,
// after which interconnect_aresetn and peripheral_aresetn go high together
// on a rising clock edge. The block design only names this part; the
// synchroniser depth, the hold time and releasing both outputs together are
// this design's choices (the simplest form of the function its name gives).
//
// Interface: slowest_sync_clk, ext_reset_in_n (active low, asynchronous),
// interconnect_aresetn and peripheral_aresetn (active low, synchronous
// release). Outputs go high on the (HOLD_CYCLES + 3)th rising edge after the
// input does.
module reset_sync #(
  parameter int unsigned HOLD_CYCLES = 16
) (
  input  logic slowest_sync_clk,
  input  logic ext_reset_in_n,
  output logic interconnect_aresetn,
  output logic peripheral_aresetn
);
  localparam int unsigned CNT_W = $clog2(HOLD_CYCLES + 1);

  logic [1:0]       sync_q;
  logic [CNT_W-1:0] hold_q;
  logic             rst_n_q;

  always_ff @(posedge slowest_sync_clk or negedge ext_reset_in_n) begin
    if (!ext_reset_in_n) begin
      sync_q  <= 2'b00;
      hold_q  <= '0;
      rst_n_q <= 1'b0;
    end else begin
      sync_q <= {sync_q[0], 1'b1};
      if (sync_q[1] && !rst_n_q) begin
        if (hold_q == CNT_W'(HOLD_CYCLES)) rst_n_q <= 1'b1;
        else                               hold_q  <= hold_q + 1'b1;
      end
    end
  end

  assign interconnect_aresetn = rst_n_q;
  assign peripheral_aresetn   = rst_n_q;

endmodule
