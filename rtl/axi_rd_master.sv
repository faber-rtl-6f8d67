// axi_rd_master: AXI4 read master that streams an image out of off-chip
// memory.
//
// A pulse on start with base (byte address) and beats (number of DW-bit data
// beats) reads the region as incrementing bursts of up to MAX_BURST beats,
// with up to MAX_OUT bursts outstanding. Read data leave unchanged, in order,
// on out_valid/out_data/out_ready; rready is out_ready, so back-pressure goes
// straight to the memory. done pulses when the last beat has been accepted
// downstream. base must be aligned to MAX_BURST*DW/8 bytes so that no burst
// crosses a 4 KiB boundary (with the defaults: DW = 128, 16-beat bursts,
// 256-byte alignment). Read responses are not checked.
// The source names AXI masters for the image reads; burst length and the
// number of outstanding bursts are this design's.
module axi_rd_master #(
  parameter int unsigned DW        = 128,
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned MAX_OUT   = 4,
  parameter int unsigned CNT_W     = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [63:0]      base,
  input  logic [CNT_W-1:0] beats,
  output logic             busy,
  output logic             done,
  // AXI4 read address channel
  output logic [63:0]      araddr,
  output logic [7:0]       arlen,
  output logic [2:0]       arsize,
  output logic [1:0]       arburst,
  output logic             arvalid,
  input  logic             arready,
  // AXI4 read data channel
  input  logic [DW-1:0]    rdata,
  input  logic [1:0]       rresp,
  input  logic             rlast,
  input  logic             rvalid,
  output logic             rready,
  // data stream
  output logic             out_valid,
  output logic [DW-1:0]    out_data,
  input  logic             out_ready
);
  localparam int unsigned BYTES = DW / 8;
  localparam int unsigned OW    = $clog2(MAX_OUT + 1);

  logic [CNT_W-1:0] to_req, to_recv;   // beats still to request / receive
  logic [OW-1:0]    outstanding;
  logic             ar_hs, r_hs;
  logic [CNT_W-1:0] len_now;

  assign len_now = (to_req > CNT_W'(MAX_BURST)) ? CNT_W'(MAX_BURST) : to_req;
  assign arlen   = 8'(len_now - 1'b1);
  assign arsize  = 3'($clog2(BYTES));
  assign arburst = 2'b01;
  assign ar_hs   = arvalid && arready;

  assign out_valid = rvalid && busy;
  assign out_data  = rdata;
  assign rready    = out_ready && busy;
  assign r_hs      = rvalid && rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; araddr <= '0; arvalid <= 1'b0;
      to_req <= '0; to_recv <= '0; outstanding <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && beats != '0) begin
          busy    <= 1'b1;
          araddr  <= base;
          to_req  <= beats;
          to_recv <= beats;
        end
      end else begin
        // address channel
        if (ar_hs) begin
          araddr  <= araddr + 64'(len_now) * BYTES;
          to_req  <= to_req - len_now;
          arvalid <= 1'b0;
        end else if (!arvalid && to_req != '0 && outstanding < OW'(MAX_OUT)) begin
          arvalid <= 1'b1;
        end
        // outstanding bursts
        outstanding <= outstanding + OW'(ar_hs) - OW'(r_hs && rlast);
        // data channel
        if (r_hs) begin
          to_recv <= to_recv - 1'b1;
          if (to_recv == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // AXI: an address, once offered, stays until accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   arvalid && !arready |=> arvalid && $stable(araddr) && $stable(arlen));

  logic unused;
  assign unused = ^rresp;

endmodule
