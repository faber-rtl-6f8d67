// axi_lite_ctrl: AXI4-Lite control registers of one accelerator core.
//
// Register map (32-bit registers, byte offsets):
//   0x00 CTRL   bit0 START (write 1; reads back while the run is pending),
//               bit1 DONE (set at the end of a run, cleared by START),
//               bit2 IDLE, bit3 FILL (with START: reload the reference cache),
//               bit4 WARP_OUT (with START: write the warped floating image
//               to the output address instead of computing the metric)
//   0x08 INTERP bit0: 0 nearest neighbour, 1 bilinear
//   0x10/0x14 reference image address, low/high word
//   0x18/0x1C floating image address, low/high word
//   0x20/0x24 result address, low/high word
//   0x28..0x3C affine matrix m00 m01 m02 m10 m11 m12 (Q16.16, output to input)
//   0x40/0x44 last metric value, low/high word (read only)
//   0x48/0x4C warped-image output address, low/high word
// start pulses for one cycle when START is written while the core is idle;
// fill_req and warp_out carry FILL and WARP_OUT with it. A write and a read
// may be handled in the same cycle. Writes need AW and W together; all
// responses are OKAY.
// The source says the template uses AXI-Lite for control; the register map
// is this design's.
module axi_lite_ctrl
  import faber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [7:0]  awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [7:0]  araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  // core side
  output logic        start,
  output logic        fill_req,
  output logic        warp_out,
  input  logic        core_idle,
  input  logic        core_done,
  input  metric_t     result,
  output logic [63:0] ref_addr,
  output logic [63:0] flt_addr,
  output logic [63:0] res_addr,
  output logic [63:0] out_addr,
  output affine_t     matrix,
  output interp_e     interp
);
  logic        done_q, fill_q;
  logic [31:0] regs [6];
  logic        wr, rd;

  assign wr      = awvalid && wvalid && !bvalid;
  assign awready = wr;
  assign wready  = wr;
  assign bresp   = 2'b00;
  assign rd      = arvalid && !rvalid;
  assign arready = rd;
  assign rresp   = 2'b00;

  assign matrix = '{m00: coef_t'(regs[0]), m01: coef_t'(regs[1]), m02: coef_t'(regs[2]),
                    m10: coef_t'(regs[3]), m11: coef_t'(regs[4]), m12: coef_t'(regs[5])};

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] be);
    logic [31:0] r = old;
    for (int i = 0; i < 4; i++) if (be[i]) r[i*8 +: 8] = nw[i*8 +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid <= 1'b0; rvalid <= 1'b0; rdata <= '0;
      start <= 1'b0; fill_req <= 1'b0; warp_out <= 1'b0; out_addr <= '0; done_q <= 1'b0; fill_q <= 1'b0;
      ref_addr <= '0; flt_addr <= '0; res_addr <= '0; interp <= INTERP_NEAREST;
      for (int i = 0; i < 6; i++) regs[i] <= '0;
    end else begin
      start <= 1'b0;
      if (core_done) done_q <= 1'b1;
      if (bvalid && bready) bvalid <= 1'b0;
      if (rvalid && rready) rvalid <= 1'b0;
      if (wr) begin
        bvalid <= 1'b1;
        unique case (awaddr[7:2])
          6'h00: if (wstrb[0] && wdata[0] && core_idle) begin
            start    <= 1'b1;
            fill_req <= wdata[3];
            warp_out <= wdata[4];
            fill_q   <= wdata[3];
            done_q   <= 1'b0;
          end
          6'h02: if (wstrb[0]) interp <= interp_e'(wdata[0]);
          6'h04: ref_addr[31:0]  <= merge(ref_addr[31:0],  wdata, wstrb);
          6'h05: ref_addr[63:32] <= merge(ref_addr[63:32], wdata, wstrb);
          6'h06: flt_addr[31:0]  <= merge(flt_addr[31:0],  wdata, wstrb);
          6'h07: flt_addr[63:32] <= merge(flt_addr[63:32], wdata, wstrb);
          6'h08: res_addr[31:0]  <= merge(res_addr[31:0],  wdata, wstrb);
          6'h09: res_addr[63:32] <= merge(res_addr[63:32], wdata, wstrb);
          6'h12: out_addr[31:0]  <= merge(out_addr[31:0],  wdata, wstrb);
          6'h13: out_addr[63:32] <= merge(out_addr[63:32], wdata, wstrb);
          6'h0a, 6'h0b, 6'h0c, 6'h0d, 6'h0e, 6'h0f:
            regs[awaddr[7:2] - 6'h0a] <= merge(regs[awaddr[7:2] - 6'h0a], wdata, wstrb);
          default: ;
        endcase
      end
      if (rd) begin
        rvalid <= 1'b1;
        unique case (araddr[7:2])
          6'h00: rdata <= {27'd0, warp_out, fill_q, core_idle, done_q, !core_idle};
          6'h02: rdata <= {31'd0, interp};
          6'h04: rdata <= ref_addr[31:0];
          6'h05: rdata <= ref_addr[63:32];
          6'h06: rdata <= flt_addr[31:0];
          6'h07: rdata <= flt_addr[63:32];
          6'h08: rdata <= res_addr[31:0];
          6'h09: rdata <= res_addr[63:32];
          6'h0a, 6'h0b, 6'h0c, 6'h0d, 6'h0e, 6'h0f: rdata <= regs[araddr[7:2] - 6'h0a];
          6'h10: rdata <= result[31:0];
          6'h11: rdata <= result[63:32];
          6'h12: rdata <= out_addr[31:0];
          6'h13: rdata <= out_addr[63:32];
          default: rdata <= '0;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid);
  assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata));

  logic unused;
  assign unused = ^{awaddr[1:0], araddr[1:0]};

endmodule
