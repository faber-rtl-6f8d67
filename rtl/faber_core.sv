// faber_core: one image-registration core of the architectural template.
//
// A core evaluates the similarity of a reference image and a (transformed)
// floating image and writes the metric value to memory; the host-side
// optimiser calls it once per candidate transformation. Inside:
//   axi_lite_ctrl   registers: addresses, affine matrix, interpolation, start
//   axi_rd_master 0 reads the floating image (and fills the cache)
//   axi_rd_master 1 reads the reference image when there is no cache
//   ref_cache       (USE_CACHE) holds the reference image on chip
//   affine_transform(USE_TRANSFORM) warps the floating image, one pixel per
//                   cycle, between pkt_unpack and pkt_pack
//   metric          mse_metric, cc_metric, mi_metric or nmi_metric (METRIC)
//   axi_wr_result   writes the 64-bit metric value
//   axi_wr_stream   (USE_TRANSFORM) writes the warped image back to memory
// Sequence after START: if the cache is enabled and empty, or FILL is set,
// the reference image is first read into the cache. Then the floating image
// is read (and warped) while the reference comes from the cache or from the
// second read port, both in PE-pixel packets; the metric reduces, the result
// is written and DONE is set. With WARP_OUT set in the same write as START,
// the run instead reads and warps the floating image and writes the warped
// image, packet by packet, to the output address; no reference is read, no
// metric is computed, and DONE is set when the last write is answered.
// All memory data beats are PE*B bits wide (one packet per beat). Images are
// DIM x DIM, B-bit pixels, row-major; with MAX_BURST = 16 the image addresses
// must be 16*PE*B/8-byte aligned.
// From the source: the template wraps cache, transformation and metric behind
// AXI-Lite control and AXI masters, one read master with caching, two without,
// and the transformation can write its output image back to memory instead
// of streaming it to the metric.
// The sequencing and the packet/beat format are this design's choices.
module faber_core
  import faber_pkg::*;
#(
  parameter int unsigned DIM           = 512,
  parameter int unsigned PE            = 16,
  parameter int unsigned B             = 8,
  parameter metric_e     METRIC        = METRIC_MI,
  parameter bit          USE_TRANSFORM = 1'b1,
  parameter bit          USE_CACHE     = 1'b1,
  parameter int unsigned STORE_ROWS    = 100,
  parameter int unsigned START_ROWS    = 50,
  parameter int unsigned MAX_BURST     = 16,
  localparam int unsigned DW           = PE * B
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite control
  input  logic [7:0]    s_awaddr,
  input  logic          s_awvalid,
  output logic          s_awready,
  input  logic [31:0]   s_wdata,
  input  logic [3:0]    s_wstrb,
  input  logic          s_wvalid,
  output logic          s_wready,
  output logic [1:0]    s_bresp,
  output logic          s_bvalid,
  input  logic          s_bready,
  input  logic [7:0]    s_araddr,
  input  logic          s_arvalid,
  output logic          s_arready,
  output logic [31:0]   s_rdata,
  output logic [1:0]    s_rresp,
  output logic          s_rvalid,
  input  logic          s_rready,
  // AXI4 read port 0 (floating image, cache fill)
  output logic [63:0]   m0_araddr,
  output logic [7:0]    m0_arlen,
  output logic [2:0]    m0_arsize,
  output logic [1:0]    m0_arburst,
  output logic          m0_arvalid,
  input  logic          m0_arready,
  input  logic [DW-1:0] m0_rdata,
  input  logic [1:0]    m0_rresp,
  input  logic          m0_rlast,
  input  logic          m0_rvalid,
  output logic          m0_rready,
  // AXI4 read port 1 (reference image; idle when USE_CACHE)
  output logic [63:0]   m1_araddr,
  output logic [7:0]    m1_arlen,
  output logic [2:0]    m1_arsize,
  output logic [1:0]    m1_arburst,
  output logic          m1_arvalid,
  input  logic          m1_arready,
  input  logic [DW-1:0] m1_rdata,
  input  logic [1:0]    m1_rresp,
  input  logic          m1_rlast,
  input  logic          m1_rvalid,
  output logic          m1_rready,
  // AXI4 write port (metric value)
  output logic [63:0]   mw_awaddr,
  output logic [7:0]    mw_awlen,
  output logic [2:0]    mw_awsize,
  output logic [1:0]    mw_awburst,
  output logic          mw_awvalid,
  input  logic          mw_awready,
  output logic [63:0]   mw_wdata,
  output logic [7:0]    mw_wstrb,
  output logic          mw_wlast,
  output logic          mw_wvalid,
  input  logic          mw_wready,
  input  logic [1:0]    mw_bresp,
  input  logic          mw_bvalid,
  output logic          mw_bready,
  // AXI4 write port (warped floating image; idle without USE_TRANSFORM)
  output logic [63:0]   mo_awaddr,
  output logic [7:0]    mo_awlen,
  output logic [2:0]    mo_awsize,
  output logic [1:0]    mo_awburst,
  output logic          mo_awvalid,
  input  logic          mo_awready,
  output logic [DW-1:0] mo_wdata,
  output logic [DW/8-1:0] mo_wstrb,
  output logic          mo_wlast,
  output logic          mo_wvalid,
  input  logic          mo_wready,
  input  logic [1:0]    mo_bresp,
  input  logic          mo_bvalid,
  output logic          mo_bready
);
  localparam int unsigned NPKT  = (DIM * DIM) / PE;
  localparam int unsigned CNT_W = $clog2(NPKT + 1);

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_RUN, S_WAIT, S_WRITE, S_WARP} state_e;
  state_e state;

  // control
  logic        start, fill_req, warp_req, core_done;
  logic [63:0] ref_addr, flt_addr, res_addr, out_addr;
  logic        warp_mode;  // this run writes the warped image instead of a metric
  affine_t     matrix;
  interp_e     interp;
  metric_t     result;

  axi_lite_ctrl u_ctrl (
    .clk, .rst_n,
    .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready),
    .start, .fill_req, .warp_out(warp_req), .core_idle(state == S_IDLE), .core_done,
    .result, .ref_addr, .flt_addr, .res_addr, .out_addr, .matrix, .interp);

  // read port 0
  logic          rd0_start, rd0_busy, rd0_done;
  logic [63:0]   rd0_base;
  logic          s0_valid, s0_ready;
  logic [DW-1:0] s0_data;

  axi_rd_master #(.DW(DW), .MAX_BURST(MAX_BURST), .CNT_W(CNT_W)) u_rd0 (
    .clk, .rst_n, .start(rd0_start), .base(rd0_base), .beats(CNT_W'(NPKT)),
    .busy(rd0_busy), .done(rd0_done),
    .araddr(m0_araddr), .arlen(m0_arlen), .arsize(m0_arsize), .arburst(m0_arburst),
    .arvalid(m0_arvalid), .arready(m0_arready),
    .rdata(m0_rdata), .rresp(m0_rresp), .rlast(m0_rlast), .rvalid(m0_rvalid),
    .rready(m0_rready),
    .out_valid(s0_valid), .out_data(s0_data), .out_ready(s0_ready));

  // metric inputs
  logic          ref_valid, ref_ready, flt_valid, flt_ready, m_in_ready;
  logic [DW-1:0] ref_data, flt_data;
  logic          res_valid, res_ready;
  metric_t       res_value;
  logic          fill_phase;

  assign fill_phase = (state == S_FILL);

  // ---------------- reference path ----------------
  logic cache_fill, cache_replay, cache_busy, cache_filled;
  logic c_in_ready;

  if (USE_CACHE) begin : g_cache
    ref_cache #(.DIM(DIM), .PE(PE), .B(B)) u_cache (
      .clk, .rst_n, .fill(cache_fill), .replay(cache_replay),
      .busy(cache_busy), .filled(cache_filled),
      .in_valid(s0_valid && fill_phase), .in_data(s0_data), .in_ready(c_in_ready),
      .out_valid(ref_valid), .out_data(ref_data), .out_ready(ref_ready));
    assign m1_araddr = '0; assign m1_arlen = '0; assign m1_arsize = '0;
    assign m1_arburst = '0; assign m1_arvalid = 1'b0; assign m1_rready = 1'b0;
  end else begin : g_nocache
    logic rd1_busy, rd1_done;
    axi_rd_master #(.DW(DW), .MAX_BURST(MAX_BURST), .CNT_W(CNT_W)) u_rd1 (
      .clk, .rst_n, .start(cache_replay), .base(ref_addr), .beats(CNT_W'(NPKT)),
      .busy(rd1_busy), .done(rd1_done),
      .araddr(m1_araddr), .arlen(m1_arlen), .arsize(m1_arsize), .arburst(m1_arburst),
      .arvalid(m1_arvalid), .arready(m1_arready),
      .rdata(m1_rdata), .rresp(m1_rresp), .rlast(m1_rlast), .rvalid(m1_rvalid),
      .rready(m1_rready),
      .out_valid(ref_valid), .out_data(ref_data), .out_ready(ref_ready));
    assign cache_busy = rd1_busy;
    assign cache_filled = 1'b1;
    assign c_in_ready = 1'b0;
  end

  // ---------------- floating path ----------------
  logic f_in_valid, f_in_ready;
  assign f_in_valid = s0_valid && !fill_phase;
  assign s0_ready   = fill_phase ? c_in_ready : f_in_ready;

  if (USE_TRANSFORM) begin : g_warp
    logic         u_valid, u_ready, w_valid, w_ready;
    logic [B-1:0] u_data, w_data;
    pkt_unpack #(.PE(PE), .B(B)) u_unpack (
      .clk, .rst_n, .in_valid(f_in_valid), .in_data(s0_data), .in_ready(f_in_ready),
      .out_valid(u_valid), .out_data(u_data), .out_ready(u_ready));
    affine_transform #(.DIM(DIM), .B(B), .STORE_ROWS(STORE_ROWS), .START_ROWS(START_ROWS)) u_warp (
      .clk, .rst_n, .matrix, .interp,
      .in_valid(u_valid), .in_data(u_data), .in_ready(u_ready),
      .out_valid(w_valid), .out_data(w_data), .out_ready(w_ready));
    pkt_pack #(.PE(PE), .B(B)) u_pack (
      .clk, .rst_n, .in_valid(w_valid), .in_data(w_data), .in_ready(w_ready),
      .out_valid(flt_valid), .out_data(flt_data), .out_ready(flt_ready));
  end else begin : g_nowarp
    assign flt_valid  = f_in_valid;
    assign flt_data   = s0_data;
    assign f_in_ready = flt_ready;
  end

  // A pair is taken only when both packets are there. In warp-out mode the
  // floating packets go to the image writer instead and no reference is read.
  logic wo_in_ready, wo_busy, wo_done;
  logic m_flt_valid;
  assign m_flt_valid = flt_valid && !warp_mode;
  assign ref_ready   = m_in_ready && m_flt_valid;
  assign flt_ready   = warp_mode ? wo_in_ready : (m_in_ready && ref_valid);

  if (USE_TRANSFORM) begin : g_wout
    axi_wr_stream #(.DW(DW), .MAX_BURST(MAX_BURST), .CNT_W(CNT_W)) u_wout (
      .clk, .rst_n, .start(rd0_start && warp_mode), .base(out_addr), .beats(CNT_W'(NPKT)),
      .busy(wo_busy), .done(wo_done),
      .in_valid(flt_valid && warp_mode), .in_data(flt_data), .in_ready(wo_in_ready),
      .awaddr(mo_awaddr), .awlen(mo_awlen), .awsize(mo_awsize), .awburst(mo_awburst),
      .awvalid(mo_awvalid), .awready(mo_awready),
      .wdata(mo_wdata), .wstrb(mo_wstrb), .wlast(mo_wlast), .wvalid(mo_wvalid),
      .wready(mo_wready), .bresp(mo_bresp), .bvalid(mo_bvalid), .bready(mo_bready));
  end else begin : g_nowout
    assign wo_in_ready = 1'b0; assign wo_busy = 1'b0; assign wo_done = 1'b0;
    assign mo_awaddr = '0; assign mo_awlen = '0; assign mo_awsize = '0; assign mo_awburst = '0;
    assign mo_awvalid = 1'b0; assign mo_wdata = '0; assign mo_wstrb = '0; assign mo_wlast = 1'b0;
    assign mo_wvalid = 1'b0; assign mo_bready = 1'b0;
  end

  // ---------------- metric ----------------
  if (METRIC == METRIC_MSE) begin : g_mse
    mse_metric #(.DIM(DIM), .PE(PE), .B(B)) u_metric (
      .clk, .rst_n, .ref_valid, .ref_data, .flt_valid(m_flt_valid), .flt_data,
      .in_ready(m_in_ready), .res_valid, .res_value, .res_ready);
  end else if (METRIC == METRIC_CC) begin : g_cc
    cc_metric #(.DIM(DIM), .PE(PE), .B(B)) u_metric (
      .clk, .rst_n, .ref_valid, .ref_data, .flt_valid(m_flt_valid), .flt_data,
      .in_ready(m_in_ready), .res_valid, .res_value, .res_ready);
  end else if (METRIC == METRIC_MI) begin : g_mi
    mi_metric #(.DIM(DIM), .PE(PE), .B(B)) u_metric (
      .clk, .rst_n, .ref_valid, .ref_data, .flt_valid(m_flt_valid), .flt_data,
      .in_ready(m_in_ready), .res_valid, .res_value, .res_ready);
  end else begin : g_nmi
    nmi_metric #(.DIM(DIM), .PE(PE), .B(B)) u_metric (
      .clk, .rst_n, .ref_valid, .ref_data, .flt_valid(m_flt_valid), .flt_data,
      .in_ready(m_in_ready), .res_valid, .res_value, .res_ready);
  end

  // ---------------- result write ----------------
  logic wr_start, wr_busy, wr_done;
  axi_wr_result u_wr (
    .clk, .rst_n, .start(wr_start), .addr(res_addr), .data(result),
    .busy(wr_busy), .done(wr_done),
    .awaddr(mw_awaddr), .awlen(mw_awlen), .awsize(mw_awsize), .awburst(mw_awburst),
    .awvalid(mw_awvalid), .awready(mw_awready),
    .wdata(mw_wdata), .wstrb(mw_wstrb), .wlast(mw_wlast), .wvalid(mw_wvalid),
    .wready(mw_wready), .bresp(mw_bresp), .bvalid(mw_bvalid), .bready(mw_bready));

  // ---------------- sequencing ----------------
  assign res_ready = (state == S_WAIT);
  assign core_done = wr_done || wo_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; rd0_start <= 1'b0; rd0_base <= '0;
      cache_fill <= 1'b0; cache_replay <= 1'b0; wr_start <= 1'b0; result <= '0;
      warp_mode <= 1'b0;
    end else begin
      rd0_start    <= 1'b0;
      cache_fill   <= 1'b0;
      cache_replay <= 1'b0;
      wr_start     <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          warp_mode <= 1'b0;
          if (USE_TRANSFORM && warp_req) begin
            warp_mode <= 1'b1;
            state     <= S_RUN;
          end else if (USE_CACHE && (fill_req || !cache_filled)) begin
            rd0_base   <= ref_addr;
            rd0_start  <= 1'b1;
            cache_fill <= 1'b1;
            state      <= S_FILL;
          end else begin
            state <= S_RUN;
          end
        end
        S_FILL: if (rd0_done) state <= S_RUN;
        S_RUN: if (!cache_busy && !rd0_busy) begin
          rd0_base     <= flt_addr;
          rd0_start    <= 1'b1;
          cache_replay <= !warp_mode;
          state        <= warp_mode ? S_WARP : S_WAIT;
        end
        S_WAIT: if (res_valid) begin
          result   <= res_value;
          wr_start <= 1'b1;
          state    <= S_WRITE;
        end
        S_WRITE: if (wr_done) state <= S_IDLE;
        S_WARP: if (wo_done) begin
          warp_mode <= 1'b0;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{wr_busy, wo_busy, m1_rdata, m1_rresp, m1_rlast, m1_rvalid, m1_arready};

endmodule
