// motor_axil_regs: AXI4-Lite register slave of the L298N motor controller.
//
// Four 32-bit registers, addressed by bits 3..2 of the byte address:
//   00h  bits 3..0  IN4..IN1 (H-bridge direction inputs)   write
//   04h  bits 9..0  speed of the left motor pair, 0..1023  write
//   08h  bits 9..0  speed of the right motor pair, 0..1023 write
//   0Ch  reserved, writes are ignored
// Three registers carry the 24 useful bits and the fourth exists because an
// AXI4-Lite register window is at least four words; this layout and the
// write-only access are the controller's published register map. Bits
// above the fields are ignored on write.
//
// This design's own choices: a write is accepted in the cycle both AW and W
// are valid (AWREADY and WREADY rise together) and no response is pending,
// the write takes effect in that cycle and BRESP = OKAY follows one cycle
// later; WSTRB is honoured per byte. The registers are write-only, so a read
// completes normally (RRESP = OKAY) and returns zero, one cycle after the AR
// handshake. Only the low four address bits are decoded; the interconnect in
// front selects the 64 KiB window. Reset (synchronous, active-low aresetn)
// clears all registers: motors stopped, both speeds zero.
//
// Interface: s (axil_if slave modport, clocked by s.aclk) and cmd_o, the
// register contents as a motor_cmd_t, valid from the cycle after a write.
module motor_axil_regs
  import motor_pkg::*;
(
  axil_if.slave        s,
  output motor_cmd_t   cmd_o
);
  logic [3:0] dir_q;
  speed_t     left_q;
  speed_t     right_q;
  logic       bvalid_q;
  logic       rvalid_q;
  logic       wr_fire;
  logic [1:0] wr_word;

  // Write address and data are taken together, one write at a time.
  assign wr_fire   = s.awvalid && s.wvalid && !bvalid_q;
  assign s.awready = wr_fire;
  assign s.wready  = wr_fire;
  assign wr_word   = s.awaddr[3:2];

  always_ff @(posedge s.aclk) begin
    if (!s.aresetn) begin
      dir_q    <= '0;
      left_q   <= '0;
      right_q  <= '0;
      bvalid_q <= 1'b0;
    end else begin
      if (wr_fire) begin
        bvalid_q <= 1'b1;
        unique case (wr_word)
          REG_DIR_OFS[3:2]: begin
            if (s.wstrb[0]) dir_q <= s.wdata[3:0];
          end
          REG_LEFT_OFS[3:2]: begin
            if (s.wstrb[0]) left_q[7:0] <= s.wdata[7:0];
            if (s.wstrb[1]) left_q[9:8] <= s.wdata[9:8];
          end
          REG_RIGHT_OFS[3:2]: begin
            if (s.wstrb[0]) right_q[7:0] <= s.wdata[7:0];
            if (s.wstrb[1]) right_q[9:8] <= s.wdata[9:8];
          end
          REG_RSVD_OFS[3:2]: ;  // reserved, write ignored
          default: ;
        endcase
      end else if (s.bready) begin
        bvalid_q <= 1'b0;
      end
    end
  end

  assign s.bvalid = bvalid_q;
  assign s.bresp  = 2'b00;

  // Reads: write-only registers read as zero.
  assign s.arready = !rvalid_q;
  always_ff @(posedge s.aclk) begin
    if (!s.aresetn)                   rvalid_q <= 1'b0;
    else if (s.arvalid && !rvalid_q)  rvalid_q <= 1'b1;
    else if (s.rready)                rvalid_q <= 1'b0;
  end
  assign s.rvalid = rvalid_q;
  assign s.rdata  = '0;
  assign s.rresp  = 2'b00;

  assign cmd_o = '{in_pins: dir_q, speed_left: left_q, speed_right: right_q};

endmodule
