// bnn_ctrl_model: behavioural model of the control port of the binarized
// neural network accelerator, for the top-level testbench only.
//
// It answers AXI4-Lite accesses to the accelerator's documented registers:
//   00h  control: bit 0 start (R/W), bit 1 done (R, cleared when read),
//        bit 2 idle (R), bit 3 ready (R), bit 7 auto restart (R/W)
//   10h  input data address (R/W)
//   1Ch  output data address (R/W)
//   5Ch  number of images (R/W)
// Writing start = 1 while idle begins a run that lasts CYCLES_PER_IMAGE
// clocks per image; then done and idle are set and start clears (unless
// auto restart is set, which begins the next run). No image data is read or
// written: the model stands in only for the register behaviour. Other
// offsets read zero. One transaction at a time; responses come one clock
// after the request.
module bnn_ctrl_model #(
  parameter int unsigned CYCLES_PER_IMAGE = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready
);
  logic        start, done, idle, auto_restart;
  logic [31:0] in_addr, out_addr, n_images;
  longint      busy_left;
  int          runs_started = 0, runs_done = 0, status_polls = 0;

  assign awready = awvalid && wvalid && !bvalid;
  assign wready  = awready;
  assign arready = arvalid && !rvalid;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;

  always @(posedge clk) begin
    if (!rst_n) begin
      start <= 0; done <= 0; idle <= 1; auto_restart <= 0;
      in_addr <= 0; out_addr <= 0; n_images <= 0; busy_left <= 0;
      bvalid <= 0; rvalid <= 0; rdata <= 0;
    end else begin
      if (bvalid && bready) bvalid <= 1'b0;
      if (rvalid && rready) rvalid <= 1'b0;
      // Run.
      if (!idle) begin
        if (busy_left <= 1) begin
          done <= 1'b1;
          runs_done <= runs_done + 1;
          if (auto_restart) begin
            busy_left <= longint'(n_images) * CYCLES_PER_IMAGE;
            runs_started <= runs_started + 1;
          end else begin
            idle  <= 1'b1;
            start <= 1'b0;
          end
        end else begin
          busy_left <= busy_left - 1;
        end
      end
      if (awready) begin
        bvalid <= 1'b1;
        case (awaddr[7:0])
          8'h00: begin
            auto_restart <= wdata[7];
            if (wdata[0] && idle) begin
              start <= 1'b1; idle <= 1'b0; done <= 1'b0;
              busy_left <= longint'(n_images) * CYCLES_PER_IMAGE;
              runs_started <= runs_started + 1;
            end
          end
          8'h10: in_addr  <= wdata;
          8'h1C: out_addr <= wdata;
          8'h5C: n_images <= wdata;
          default: ;
        endcase
      end
      if (arready) begin
        rvalid <= 1'b1;
        case (araddr[7:0])
          8'h00: begin
            rdata <= {24'h0, auto_restart, 3'b000, idle, idle, done, start};
            if (done) done <= 1'b0;
            status_polls <= status_polls + 1;
          end
          8'h10: rdata <= in_addr;
          8'h1C: rdata <= out_addr;
          8'h5C: rdata <= n_images;
          default: rdata <= 32'h0;
        endcase
      end
    end
  end
endmodule
