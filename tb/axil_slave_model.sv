// axil_slave_model: AXI4-Lite register-file slave used by the testbenches.
//
// Sixteen 32-bit words addressed by bits 5..2, written by byte strobe and
// read back. AWREADY, WREADY and ARREADY are raised after a random 0..2
// clock delay (0 when RANDOM_DELAY is 0, so that READY follows VALID in the
// same cycle); B and R come one clock after the request. Accesses to word
// ERR_WORD answer SLVERR. It counts the writes and reads it served and
// keeps the last address of each, so a testbench can tell which slave a
// transaction reached.
module axil_slave_model #(
  parameter int unsigned ERR_WORD     = 15,
  parameter bit          RANDOM_DELAY = 1'b1
) (
  axil_if.slave s
);
  logic [31:0] mem [16];
  int          n_writes = 0, n_reads = 0;
  logic [31:0] last_waddr = '0, last_raddr = '0;

  logic aw_got, w_got;
  logic [31:0] aw_a, w_d;
  logic [3:0]  w_s;
  int aw_dly, w_dly, ar_dly;

  initial begin
    foreach (mem[i]) mem[i] = '0;
    s.bvalid = 1'b0; s.bresp = 2'b00;
    s.rvalid = 1'b0; s.rresp = 2'b00; s.rdata = '0;
    aw_got = 1'b0; w_got = 1'b0; aw_a = '0; w_d = '0; w_s = '0;
    aw_dly = 0; w_dly = 0; ar_dly = 0;
  end

  function automatic int new_dly();
    return RANDOM_DELAY ? int'($urandom % 3) : 0;
  endfunction

  assign s.awready = s.awvalid && !aw_got && !s.bvalid && (aw_dly == 0);
  assign s.wready  = s.wvalid  && !w_got  && !s.bvalid && (w_dly == 0);
  assign s.arready = s.arvalid && !s.rvalid && (ar_dly == 0);

  always @(posedge s.aclk) begin
    if (!s.aresetn) begin
      s.bvalid <= 1'b0;
      s.rvalid <= 1'b0;
      aw_got   <= 1'b0;
      w_got    <= 1'b0;
    end else begin
      // Write address and data, in either order.
      if (s.awvalid && !s.awready && aw_dly > 0) aw_dly <= aw_dly - 1;
      if (s.wvalid  && !s.wready  && w_dly > 0)  w_dly  <= w_dly - 1;
      if (s.awready) begin aw_got <= 1'b1; aw_a <= s.awaddr; end
      if (s.wready)  begin w_got  <= 1'b1; w_d <= s.wdata; w_s <= s.wstrb; end
      if ((aw_got || s.awready) && (w_got || s.wready)) begin
        automatic logic [31:0] a = aw_got ? aw_a : s.awaddr;
        automatic logic [31:0] d = w_got ? w_d : s.wdata;
        automatic logic [3:0]  st = w_got ? w_s : s.wstrb;
        for (int b = 0; b < 4; b++) if (st[b]) mem[a[5:2]][8*b +: 8] <= d[8*b +: 8];
        s.bresp    <= (a[5:2] == 4'(ERR_WORD)) ? 2'b10 : 2'b00;
        s.bvalid   <= 1'b1;
        aw_got     <= 1'b0;
        w_got      <= 1'b0;
        n_writes   <= n_writes + 1;
        last_waddr <= a;
        aw_dly     <= new_dly();
        w_dly      <= new_dly();
      end
      if (s.bvalid && s.bready) s.bvalid <= 1'b0;
      // Reads.
      if (s.arvalid && !s.arready && ar_dly > 0) ar_dly <= ar_dly - 1;
      if (s.arready) begin
        s.rdata    <= mem[s.araddr[5:2]];
        s.rresp    <= (s.araddr[5:2] == 4'(ERR_WORD)) ? 2'b10 : 2'b00;
        s.rvalid   <= 1'b1;
        n_reads    <= n_reads + 1;
        last_raddr <= s.araddr;
        ar_dly     <= new_dly();
      end
      if (s.rvalid && s.rready) s.rvalid <= 1'b0;
    end
  end
endmodule
