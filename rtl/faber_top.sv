// faber_top: the architectural template, NUM_CORES independent registration
// cores side by side.
//
// Each core (faber_core) has its own AXI4-Lite control port, two AXI4 image
// read ports (port 1 idle when the reference cache is enabled), one AXI4
// write port for the metric value and one for the warped image (idle without
// the transformation), all brought out as arrays indexed by
// core, so the host can register NUM_CORES image pairs in parallel, each core
// with its own link (physical or shared) to off-chip memory.
// Parameters common to all cores: image size DIM x DIM of B-bit pixels, PE
// processing elements per metric (PE pixels per memory beat), whether the
// transformation runs in hardware (USE_TRANSFORM) and whether the reference
// image is cached (USE_CACHE). CORE_METRIC chooses the similarity metric of
// each core. The default build has four cores, one per metric (MI, NMI, CC,
// MSE), each with the hardware transformation, the cache and 16 PEs; a
// one-core MI build without transformation (NUM_CORES = 1,
// CORE_METRIC = '{METRIC_MI}, USE_TRANSFORM = 0) is the single-metric,
// high-parallelism configuration, and NUM_CORES = 2 with CC, PE = 1 and the
// transformation the small-device one.
// The replication of cores, each with cache, transformation and metric, is
// from the source; the default mix of metrics is this design's choice so that
// one build holds every accelerator.
module faber_top
  import faber_pkg::*;
#(
  parameter int unsigned NUM_CORES     = 4,
  parameter metric_e     CORE_METRIC [NUM_CORES] = '{METRIC_MI, METRIC_NMI, METRIC_CC, METRIC_MSE},
  parameter int unsigned DIM           = 512,
  parameter int unsigned PE            = 16,
  parameter int unsigned B             = 8,
  parameter bit          USE_TRANSFORM = 1'b1,
  parameter bit          USE_CACHE     = 1'b1,
  parameter int unsigned STORE_ROWS    = 100,
  parameter int unsigned START_ROWS    = 50,
  localparam int unsigned DW           = PE * B
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [7:0]      s_awaddr    [NUM_CORES],
  input  logic            s_awvalid   [NUM_CORES],
  output logic            s_awready   [NUM_CORES],
  input  logic [31:0]     s_wdata     [NUM_CORES],
  input  logic [3:0]      s_wstrb     [NUM_CORES],
  input  logic            s_wvalid    [NUM_CORES],
  output logic            s_wready    [NUM_CORES],
  output logic [1:0]      s_bresp     [NUM_CORES],
  output logic            s_bvalid    [NUM_CORES],
  input  logic            s_bready    [NUM_CORES],
  input  logic [7:0]      s_araddr    [NUM_CORES],
  input  logic            s_arvalid   [NUM_CORES],
  output logic            s_arready   [NUM_CORES],
  output logic [31:0]     s_rdata     [NUM_CORES],
  output logic [1:0]      s_rresp     [NUM_CORES],
  output logic            s_rvalid    [NUM_CORES],
  input  logic            s_rready    [NUM_CORES],
  output logic [63:0]     m0_araddr   [NUM_CORES],
  output logic [7:0]      m0_arlen    [NUM_CORES],
  output logic [2:0]      m0_arsize   [NUM_CORES],
  output logic [1:0]      m0_arburst  [NUM_CORES],
  output logic            m0_arvalid  [NUM_CORES],
  input  logic            m0_arready  [NUM_CORES],
  input  logic [DW-1:0]   m0_rdata    [NUM_CORES],
  input  logic [1:0]      m0_rresp    [NUM_CORES],
  input  logic            m0_rlast    [NUM_CORES],
  input  logic            m0_rvalid   [NUM_CORES],
  output logic            m0_rready   [NUM_CORES],
  output logic [63:0]     m1_araddr   [NUM_CORES],
  output logic [7:0]      m1_arlen    [NUM_CORES],
  output logic [2:0]      m1_arsize   [NUM_CORES],
  output logic [1:0]      m1_arburst  [NUM_CORES],
  output logic            m1_arvalid  [NUM_CORES],
  input  logic            m1_arready  [NUM_CORES],
  input  logic [DW-1:0]   m1_rdata    [NUM_CORES],
  input  logic [1:0]      m1_rresp    [NUM_CORES],
  input  logic            m1_rlast    [NUM_CORES],
  input  logic            m1_rvalid   [NUM_CORES],
  output logic            m1_rready   [NUM_CORES],
  output logic [63:0]     mw_awaddr   [NUM_CORES],
  output logic [7:0]      mw_awlen    [NUM_CORES],
  output logic [2:0]      mw_awsize   [NUM_CORES],
  output logic [1:0]      mw_awburst  [NUM_CORES],
  output logic            mw_awvalid  [NUM_CORES],
  input  logic            mw_awready  [NUM_CORES],
  output logic [63:0]     mw_wdata    [NUM_CORES],
  output logic [7:0]      mw_wstrb    [NUM_CORES],
  output logic            mw_wlast    [NUM_CORES],
  output logic            mw_wvalid   [NUM_CORES],
  input  logic            mw_wready   [NUM_CORES],
  input  logic [1:0]      mw_bresp    [NUM_CORES],
  input  logic            mw_bvalid   [NUM_CORES],
  output logic            mw_bready   [NUM_CORES],
  output logic [63:0]     mo_awaddr   [NUM_CORES],
  output logic [7:0]      mo_awlen    [NUM_CORES],
  output logic [2:0]      mo_awsize   [NUM_CORES],
  output logic [1:0]      mo_awburst  [NUM_CORES],
  output logic            mo_awvalid  [NUM_CORES],
  input  logic            mo_awready  [NUM_CORES],
  output logic [DW-1:0]   mo_wdata    [NUM_CORES],
  output logic [DW/8-1:0] mo_wstrb    [NUM_CORES],
  output logic            mo_wlast    [NUM_CORES],
  output logic            mo_wvalid   [NUM_CORES],
  input  logic            mo_wready   [NUM_CORES],
  input  logic [1:0]      mo_bresp    [NUM_CORES],
  input  logic            mo_bvalid   [NUM_CORES],
  output logic            mo_bready   [NUM_CORES]
);
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    faber_core #(
      .DIM(DIM), .PE(PE), .B(B), .METRIC(CORE_METRIC[c]),
      .USE_TRANSFORM(USE_TRANSFORM), .USE_CACHE(USE_CACHE),
      .STORE_ROWS(STORE_ROWS), .START_ROWS(START_ROWS)
    ) u_core (
      .clk, .rst_n,
      .s_awaddr(s_awaddr[c]), .s_awvalid(s_awvalid[c]), .s_awready(s_awready[c]),
      .s_wdata(s_wdata[c]), .s_wstrb(s_wstrb[c]), .s_wvalid(s_wvalid[c]),
      .s_wready(s_wready[c]), .s_bresp(s_bresp[c]), .s_bvalid(s_bvalid[c]),
      .s_bready(s_bready[c]), .s_araddr(s_araddr[c]), .s_arvalid(s_arvalid[c]),
      .s_arready(s_arready[c]), .s_rdata(s_rdata[c]), .s_rresp(s_rresp[c]),
      .s_rvalid(s_rvalid[c]), .s_rready(s_rready[c]), .m0_araddr(m0_araddr[c]),
      .m0_arlen(m0_arlen[c]), .m0_arsize(m0_arsize[c]), .m0_arburst(m0_arburst[c]),
      .m0_arvalid(m0_arvalid[c]), .m0_arready(m0_arready[c]), .m0_rdata(m0_rdata[c]),
      .m0_rresp(m0_rresp[c]), .m0_rlast(m0_rlast[c]), .m0_rvalid(m0_rvalid[c]),
      .m0_rready(m0_rready[c]), .m1_araddr(m1_araddr[c]), .m1_arlen(m1_arlen[c]),
      .m1_arsize(m1_arsize[c]), .m1_arburst(m1_arburst[c]), .m1_arvalid(m1_arvalid[c]),
      .m1_arready(m1_arready[c]), .m1_rdata(m1_rdata[c]), .m1_rresp(m1_rresp[c]),
      .m1_rlast(m1_rlast[c]), .m1_rvalid(m1_rvalid[c]), .m1_rready(m1_rready[c]),
      .mw_awaddr(mw_awaddr[c]), .mw_awlen(mw_awlen[c]), .mw_awsize(mw_awsize[c]),
      .mw_awburst(mw_awburst[c]), .mw_awvalid(mw_awvalid[c]), .mw_awready(mw_awready[c]),
      .mw_wdata(mw_wdata[c]), .mw_wstrb(mw_wstrb[c]), .mw_wlast(mw_wlast[c]),
      .mw_wvalid(mw_wvalid[c]), .mw_wready(mw_wready[c]), .mw_bresp(mw_bresp[c]),
      .mw_bvalid(mw_bvalid[c]), .mw_bready(mw_bready[c]),
      .mo_awaddr(mo_awaddr[c]), .mo_awlen(mo_awlen[c]), .mo_awsize(mo_awsize[c]),
      .mo_awburst(mo_awburst[c]), .mo_awvalid(mo_awvalid[c]), .mo_awready(mo_awready[c]),
      .mo_wdata(mo_wdata[c]), .mo_wstrb(mo_wstrb[c]), .mo_wlast(mo_wlast[c]),
      .mo_wvalid(mo_wvalid[c]), .mo_wready(mo_wready[c]), .mo_bresp(mo_bresp[c]),
      .mo_bvalid(mo_bvalid[c]), .mo_bready(mo_bready[c])
    );
  end
endmodule
