// axil_bfm: AXI4-Lite master used by the testbenches.
//
// write() presents AW and W, each after its own random delay of 0..3 clocks
// so that either may arrive first, holds each until its handshake, then
// waits for B with BREADY raised after a random delay. read() does the same
// for AR and R. Both return the response code and the number of rising
// edges from the request handshake to the response handshake (1 = the
// response was taken on the very next edge). Each transfer begins at the
// next rising edge. Signals are driven 1 time unit after a rising edge; handshakes and response data are sampled on the
// falling edge before the rising edge that completes them, when everything
// is stable.
module axil_bfm (
  axil_if.master m
);
  initial begin
    m.awaddr = '0; m.awprot = '0; m.awvalid = 1'b0;
    m.wdata = '0; m.wstrb = '0; m.wvalid = 1'b0; m.bready = 1'b0;
    m.araddr = '0; m.arprot = '0; m.arvalid = 1'b0; m.rready = 1'b0;
  end

  bit randomize_delays = 1'b1;

  function automatic int dly();
    return randomize_delays ? int'($urandom % 4) : 0;
  endfunction

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output logic [1:0] resp,
                       output int cycles);
    int d_aw = dly(), d_w = dly(), d_b = dly();
    int n = 0;
    bit aw_done = 0, w_done = 0, aw_hs, w_hs, b_hs;
    @(posedge m.aclk);
    #1;
    while (!(aw_done && w_done)) begin
      m.awaddr  = addr; m.awprot = 3'b000;
      m.wdata   = data; m.wstrb  = strb;
      m.awvalid = !aw_done && (n >= d_aw);
      m.wvalid  = !w_done  && (n >= d_w);
      @(negedge m.aclk);
      aw_hs = m.awvalid && m.awready;
      w_hs  = m.wvalid && m.wready;
      @(posedge m.aclk);
      #1;
      if (aw_hs) aw_done = 1;
      if (w_hs)  w_done  = 1;
      n++;
    end
    m.awvalid = 1'b0; m.wvalid = 1'b0;
    cycles = 0;
    forever begin
      m.bready = (d_b == 0);
      @(negedge m.aclk);
      b_hs = m.bvalid && m.bready;
      resp = m.bresp;
      @(posedge m.aclk);
      #1;
      cycles++;
      if (b_hs) break;
      if (d_b > 0) d_b--;
    end
    m.bready = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output logic [1:0] resp, output int cycles);
    int d_ar = dly(), d_r = dly();
    int n = 0;
    bit ar_hs, r_hs;
    @(posedge m.aclk);
    #1;
    forever begin
      m.araddr  = addr; m.arprot = 3'b000;
      m.arvalid = (n >= d_ar);
      @(negedge m.aclk);
      ar_hs = m.arvalid && m.arready;
      @(posedge m.aclk);
      #1;
      n++;
      if (ar_hs) break;
    end
    m.arvalid = 1'b0;
    cycles = 0;
    forever begin
      m.rready = (d_r == 0);
      @(negedge m.aclk);
      r_hs = m.rvalid && m.rready;
      data = m.rdata;
      resp = m.rresp;
      @(posedge m.aclk);
      #1;
      cycles++;
      if (r_hs) break;
      if (d_r > 0) d_r--;
    end
    m.rready = 1'b0;
  endtask
endmodule
