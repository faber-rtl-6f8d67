// axi_wr_result: AXI4 write master that stores one 64-bit metric value.
//
// A pulse on start with addr and data issues one single-beat write
// (awlen = 0, 8 bytes, all strobes set). The address and data channels are
// offered together and may be accepted in either order; done pulses when the
// write response arrives. The response code is not checked.
// The source says the template writes the similarity metric to memory through
// an AXI master; the single-beat protocol is this design's.
module axi_wr_result (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] addr,
  input  logic [63:0] data,
  output logic        busy,
  output logic        done,
  output logic [63:0] awaddr,
  output logic [7:0]  awlen,
  output logic [2:0]  awsize,
  output logic [1:0]  awburst,
  output logic        awvalid,
  input  logic        awready,
  output logic [63:0] wdata,
  output logic [7:0]  wstrb,
  output logic        wlast,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready
);
  assign awlen   = 8'd0;
  assign awsize  = 3'd3;
  assign awburst = 2'b01;
  assign wstrb   = 8'hff;
  assign wlast   = 1'b1;
  assign bready  = busy && !awvalid && !wvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; awaddr <= '0; wdata <= '0;
      awvalid <= 1'b0; wvalid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          awaddr  <= addr;
          wdata   <= data;
          awvalid <= 1'b1;
          wvalid  <= 1'b1;
        end
      end else begin
        if (awvalid && awready) awvalid <= 1'b0;
        if (wvalid && wready)   wvalid  <= 1'b0;
        if (bvalid && bready) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   wvalid && !wready |=> wvalid && $stable(wdata));

  logic unused;
  assign unused = ^bresp;

endmodule
