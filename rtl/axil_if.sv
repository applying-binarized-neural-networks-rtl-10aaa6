// axil_if: one AXI4-Lite link (32-bit address, 32-bit data), the bundle that
// recurs between the processing-system port, the peripheral interconnect and
// each peripheral of the programmable-logic design.
//
// The five channels follow the AXI4-Lite protocol: AW and W carry a write,
// B returns its response, AR carries a read and R returns data and response.
// The assertions check the one handshake rule every channel shares: once a
// source raises VALID it keeps VALID high and its payload stable until the
// cycle in which READY is also high. They are checked on the rising edge of
// aclk while aresetn is high.
interface axil_if #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input logic aclk,
  input logic aresetn
);
  logic [ADDR_W-1:0]   awaddr;
  logic [2:0]          awprot;
  logic                awvalid;
  logic                awready;
  logic [DATA_W-1:0]   wdata;
  logic [DATA_W/8-1:0] wstrb;
  logic                wvalid;
  logic                wready;
  logic [1:0]          bresp;
  logic                bvalid;
  logic                bready;
  logic [ADDR_W-1:0]   araddr;
  logic [2:0]          arprot;
  logic                arvalid;
  logic                arready;
  logic [DATA_W-1:0]   rdata;
  logic [1:0]          rresp;
  logic                rvalid;
  logic                rready;

  modport master (
    input  aclk, aresetn,
    output awaddr, awprot, awvalid, input awready,
    output wdata, wstrb, wvalid, input wready,
    input  bresp, bvalid, output bready,
    output araddr, arprot, arvalid, input arready,
    input  rdata, rresp, rvalid, output rready
  );

  modport slave (
    input  aclk, aresetn,
    input  awaddr, awprot, awvalid, output awready,
    input  wdata, wstrb, wvalid, output wready,
    output bresp, bvalid, input bready,
    input  araddr, arprot, arvalid, output arready,
    output rdata, rresp, rvalid, input rready
  );

  // Handshake rules: VALID may not drop, nor its payload change, before READY.
  a_aw_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    awvalid && !awready |=> awvalid && $stable(awaddr));
  a_w_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    wvalid && !wready |=> wvalid && $stable(wdata) && $stable(wstrb));
  a_b_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    bvalid && !bready |=> bvalid && $stable(bresp));
  a_ar_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    arvalid && !arready |=> arvalid && $stable(araddr));
  a_r_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    rvalid && !rready |=> rvalid && $stable(rdata) && $stable(rresp));

endinterface
