// axil_interconnect: AXI4-Lite interconnect from the processing system's
// general-purpose master to the two register peripherals of the design
// ("ps7_0_axi_periph" in the block design).
//
// Address map (32-bit byte addresses, 64 KiB window each):
//   M00  BNN accelerator control registers  base 0x43C0_0000
//   M01  L298N motor controller registers   base 0x43C2_0000
// Both base addresses are the design's published register addresses; the
// window size is this design's choice. An address in neither window is
// answered by the interconnect itself with DECERR (read data zero).
//
// Operation: the write and read paths are independent and each carries one
// transaction at a time. A write is accepted from the slave port when AW and
// W are both valid, decoded, presented on the selected master port (AW and W
// may complete in either order), and its B response is passed back. A read
// is accepted, decoded, presented as AR, and the R beat is passed back. With
// slaves that answer without wait states, the response reaches the slave
// port 3 clocks after the request handshake (1 clock for a DECERR). This
// simple sequential scheme is this design's choice: the interconnect of the
// block design is a vendor part of which only the function is known.
//
// Interface: s (slave modport, from the processing system), m00 and m01
// (master modports); all share s.aclk and s.aresetn (synchronous, active
// low).
module axil_interconnect #(
  parameter logic [31:0] M00_BASE = 32'h43C0_0000,
  parameter logic [31:0] M01_BASE = 32'h43C2_0000,
  parameter int unsigned WIN_BITS = 16  // log2 of each window, 64 KiB
) (
  axil_if.slave  s,
  axil_if.master m00,
  axil_if.master m01
);
  typedef enum logic [1:0] {SEL_M00, SEL_M01, SEL_NONE} sel_e;
  typedef enum logic [1:0] {ST_IDLE, ST_REQ, ST_RESP, ST_BACK} st_e;

  localparam logic [1:0] RESP_DECERR = 2'b11;

  function automatic sel_e decode(input logic [31:WIN_BITS] a);
    if      (a[31:WIN_BITS] == M00_BASE[31:WIN_BITS]) return SEL_M00;
    else if (a[31:WIN_BITS] == M01_BASE[31:WIN_BITS]) return SEL_M01;
    else                                              return SEL_NONE;
  endfunction

  // ------------------------------------------------------------------ write
  st_e         wst;
  sel_e        wsel;
  logic [31:0] waddr_q, wdata_q;
  logic [3:0]  wstrb_q;
  logic [2:0]  wprot_q;
  logic        aw_done, w_done;
  logic [1:0]  bresp_q;
  logic        w_acc;
  logic        m_awready, m_wready, m_bvalid;
  logic [1:0]  m_bresp;

  assign w_acc     = (wst == ST_IDLE) && s.awvalid && s.wvalid;
  assign s.awready = w_acc;
  assign s.wready  = w_acc;

  always_comb begin
    unique case (wsel)
      SEL_M00: begin m_awready = m00.awready; m_wready = m00.wready;
                     m_bvalid = m00.bvalid; m_bresp = m00.bresp; end
      SEL_M01: begin m_awready = m01.awready; m_wready = m01.wready;
                     m_bvalid = m01.bvalid; m_bresp = m01.bresp; end
      default: begin m_awready = 1'b0; m_wready = 1'b0;
                     m_bvalid = 1'b0; m_bresp = 2'b00; end
    endcase
  end

  always_ff @(posedge s.aclk) begin
    if (!s.aresetn) begin
      wst     <= ST_IDLE;
      wsel    <= SEL_NONE;
      waddr_q <= '0;
      wdata_q <= '0;
      wstrb_q <= '0;
      wprot_q <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      bresp_q <= 2'b00;
    end else begin
      unique case (wst)
        ST_IDLE: if (w_acc) begin
          waddr_q <= s.awaddr;
          wdata_q <= s.wdata;
          wstrb_q <= s.wstrb;
          wprot_q <= s.awprot;
          wsel    <= decode(s.awaddr[31:WIN_BITS]);
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (decode(s.awaddr[31:WIN_BITS]) == SEL_NONE) begin
            bresp_q <= RESP_DECERR;
            wst     <= ST_BACK;
          end else begin
            wst     <= ST_REQ;
          end
        end
        ST_REQ: begin
          if (m_awready) aw_done <= 1'b1;
          if (m_wready)  w_done  <= 1'b1;
          if ((aw_done || m_awready) && (w_done || m_wready)) wst <= ST_RESP;
        end
        ST_RESP: if (m_bvalid) begin
          bresp_q <= m_bresp;
          wst     <= ST_BACK;
        end
        ST_BACK: if (s.bready) wst <= ST_IDLE;
        default: wst <= ST_IDLE;
      endcase
    end
  end

  assign s.bvalid = (wst == ST_BACK);
  assign s.bresp  = bresp_q;

  assign m00.awaddr  = waddr_q;
  assign m00.awprot  = wprot_q;
  assign m00.awvalid = (wst == ST_REQ) && (wsel == SEL_M00) && !aw_done;
  assign m00.wdata   = wdata_q;
  assign m00.wstrb   = wstrb_q;
  assign m00.wvalid  = (wst == ST_REQ) && (wsel == SEL_M00) && !w_done;
  assign m00.bready  = (wst == ST_RESP) && (wsel == SEL_M00);

  assign m01.awaddr  = waddr_q;
  assign m01.awprot  = wprot_q;
  assign m01.awvalid = (wst == ST_REQ) && (wsel == SEL_M01) && !aw_done;
  assign m01.wdata   = wdata_q;
  assign m01.wstrb   = wstrb_q;
  assign m01.wvalid  = (wst == ST_REQ) && (wsel == SEL_M01) && !w_done;
  assign m01.bready  = (wst == ST_RESP) && (wsel == SEL_M01);

  // ------------------------------------------------------------------- read
  st_e         rst_q;
  sel_e        rsel;
  logic [31:0] raddr_q;
  logic [2:0]  rprot_q;
  logic [31:0] rdata_q;
  logic [1:0]  rresp_q;
  logic        r_acc;
  logic        m_arready, m_rvalid;
  logic [31:0] m_rdata;
  logic [1:0]  m_rresp;

  assign r_acc     = (rst_q == ST_IDLE) && s.arvalid;
  assign s.arready = (rst_q == ST_IDLE);

  always_comb begin
    unique case (rsel)
      SEL_M00: begin m_arready = m00.arready; m_rvalid = m00.rvalid;
                     m_rdata = m00.rdata; m_rresp = m00.rresp; end
      SEL_M01: begin m_arready = m01.arready; m_rvalid = m01.rvalid;
                     m_rdata = m01.rdata; m_rresp = m01.rresp; end
      default: begin m_arready = 1'b0; m_rvalid = 1'b0;
                     m_rdata = '0; m_rresp = 2'b00; end
    endcase
  end

  always_ff @(posedge s.aclk) begin
    if (!s.aresetn) begin
      rst_q   <= ST_IDLE;
      rsel    <= SEL_NONE;
      raddr_q <= '0;
      rprot_q <= '0;
      rdata_q <= '0;
      rresp_q <= 2'b00;
    end else begin
      unique case (rst_q)
        ST_IDLE: if (r_acc) begin
          raddr_q <= s.araddr;
          rprot_q <= s.arprot;
          rsel    <= decode(s.araddr[31:WIN_BITS]);
          if (decode(s.araddr[31:WIN_BITS]) == SEL_NONE) begin
            rdata_q <= '0;
            rresp_q <= RESP_DECERR;
            rst_q   <= ST_BACK;
          end else begin
            rst_q   <= ST_REQ;
          end
        end
        ST_REQ:  if (m_arready) rst_q <= ST_RESP;
        ST_RESP: if (m_rvalid) begin
          rdata_q <= m_rdata;
          rresp_q <= m_rresp;
          rst_q   <= ST_BACK;
        end
        ST_BACK: if (s.rready) rst_q <= ST_IDLE;
        default: rst_q <= ST_IDLE;
      endcase
    end
  end

  assign s.rvalid = (rst_q == ST_BACK);
  assign s.rdata  = rdata_q;
  assign s.rresp  = rresp_q;

  assign m00.araddr  = raddr_q;
  assign m00.arprot  = rprot_q;
  assign m00.arvalid = (rst_q == ST_REQ) && (rsel == SEL_M00);
  assign m00.rready  = (rst_q == ST_RESP) && (rsel == SEL_M00);

  assign m01.araddr  = raddr_q;
  assign m01.arprot  = rprot_q;
  assign m01.arvalid = (rst_q == ST_REQ) && (rsel == SEL_M01);
  assign m01.rready  = (rst_q == ST_RESP) && (rsel == SEL_M01);

endmodule
