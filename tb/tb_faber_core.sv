// tb_faber_core: self-checking test of one accelerator core in its plainest
// build: no on-chip transform and no reference cache, so the core streams the
// reference image over read port 1 and the floating image over read port 0
// straight into the metric (here MSE). The host model programs the core over
// AXI-Lite, starts it, polls DONE, and reads the result both from the register
// file and from the memory word the core wrote. Two image pairs are run; the
// cycle count of each run is checked against one pixel packet per cycle plus
// a fixed allowance for the memory latency, the reduction and the write-back.
module tb_faber_core;
  import faber_pkg::*;
  localparam int DIM = 16, PE = 4, B = 8;
  localparam int DW = PE * B, N = DIM * DIM, NPKT = N / PE;
  localparam longint REF_A = 64'h400, FLT_A = 64'h800, RES_A = 64'hC00;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0]  s_awaddr, s_araddr; logic s_awvalid, s_awready, s_wvalid, s_wready;
  logic [31:0] s_wdata, s_rdata; logic [3:0] s_wstrb; logic [1:0] s_bresp, s_rresp;
  logic s_bvalid, s_bready, s_arvalid, s_arready, s_rvalid, s_rready;
  logic [63:0] m0_araddr, m1_araddr; logic [7:0] m0_arlen, m1_arlen;
  logic [2:0] m0_arsize, m1_arsize; logic [1:0] m0_arburst, m1_arburst;
  logic m0_arvalid, m0_arready, m1_arvalid, m1_arready;
  logic [DW-1:0] m0_rdata, m1_rdata; logic [1:0] m0_rresp, m1_rresp;
  logic m0_rlast, m0_rvalid, m0_rready, m1_rlast, m1_rvalid, m1_rready;
  logic [63:0] mw_awaddr, mw_wdata; logic [7:0] mw_awlen, mw_wstrb; logic [2:0] mw_awsize;
  logic [1:0] mw_awburst, mw_bresp; logic mw_awvalid, mw_awready, mw_wlast, mw_wvalid;
  logic mw_wready, mw_bvalid, mw_bready;
  logic [63:0] mo_awaddr; logic [7:0] mo_awlen; logic [2:0] mo_awsize; logic [1:0] mo_awburst;
  logic mo_awvalid, mo_wlast, mo_wvalid, mo_bready; logic [DW-1:0] mo_wdata; logic [DW/8-1:0] mo_wstrb;
  logic mo_awready = 1'b0, mo_wready = 1'b0, mo_bvalid = 1'b0; logic [1:0] mo_bresp = 2'b00;

  faber_core #(.DIM(DIM), .PE(PE), .B(B), .METRIC(METRIC_MSE), .USE_TRANSFORM(1'b0),
               .USE_CACHE(1'b0)) dut (.*);

  axi_mem_model #(.DW(DW), .WORDS(1024)) u_mem (
    .clk, .rst_n,
    .araddr('{m0_araddr, m1_araddr}), .arlen('{m0_arlen, m1_arlen}),
    .arvalid('{m0_arvalid, m1_arvalid}), .arready('{m0_arready, m1_arready}),
    .rdata('{m0_rdata, m1_rdata}), .rresp('{m0_rresp, m1_rresp}),
    .rlast('{m0_rlast, m1_rlast}), .rvalid('{m0_rvalid, m1_rvalid}),
    .rready('{m0_rready, m1_rready}),
    .awaddr(mw_awaddr), .awvalid(mw_awvalid), .awready(mw_awready),
    .wdata(mw_wdata), .wvalid(mw_wvalid), .wready(mw_wready),
    .bresp(mw_bresp), .bvalid(mw_bvalid), .bready(mw_bready));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p1_beats = 0;
  always @(posedge clk) if (m1_rvalid && m1_rready) p1_beats++;

  task automatic lite_write(input logic [7:0] a, input logic [31:0] d);
    s_awaddr = a; s_wdata = d; s_wstrb = 4'hf; s_awvalid = 1; s_wvalid = 1;
    do @(posedge clk); while (!s_awready);
    #1 s_awvalid = 0; s_wvalid = 0; s_bready = 1;
    while (!s_bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1 s_bready = 0;
  endtask

  task automatic lite_read(input logic [7:0] a, output logic [31:0] d);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0; s_rready = 1;
    while (!s_rvalid) begin @(posedge clk); #1; end
    d = s_rdata;
    @(posedge clk); #1 s_rready = 0;
  endtask

  task automatic run(input int pair);
    logic [31:0] st, lo, hi;
    longint sd = 0;
    int cyc0, cyc, beats0;
    real expv, got, got_mem;
    for (int w = 0; w < NPKT; w++)
      for (int k = 0; k < PE; k++) begin
        int r = $urandom % 256, f;
        f = (pair == 0) ? r : (r + ($urandom % 61) - 30 + 256) % 256;
        u_mem.mem[REF_A / (DW/8) + w][k*B +: B] = B'(r);
        u_mem.mem[FLT_A / (DW/8) + w][k*B +: B] = B'(f);
        sd += (r - f) * (r - f);
      end
    expv = real'(sd) / N;
    lite_write(8'h10, 32'(REF_A)); lite_write(8'h14, 0);
    lite_write(8'h18, 32'(FLT_A)); lite_write(8'h1c, 0);
    lite_write(8'h20, 32'(RES_A)); lite_write(8'h24, 0);
    beats0 = p1_beats;
    cyc0 = cycle;
    lite_write(8'h00, 32'h1);
    do lite_read(8'h00, st); while (!st[1]);
    cyc = cycle - cyc0;
    lite_read(8'h40, lo); lite_read(8'h44, hi);
    got = real'(metric_t'({hi, lo})) / 4294967296.0;
    got_mem = real'(metric_t'(u_mem.results[RES_A])) / 4294967296.0;
    checks += 5;
    if (got - expv > 1e-6 || expv - got > 1e-6) begin
      failures++; $display("pair %0d: MSE %f expected %f", pair, got, expv);
    end
    if (got_mem != got) begin failures++; $display("pair %0d: memory %f, register %f", pair, got_mem, got); end
    if (p1_beats - beats0 != NPKT) begin
      failures++; $display("pair %0d: %0d reference beats on port 1", pair, p1_beats - beats0);
    end
    if (mo_awvalid || mo_wvalid) begin failures++; $display("image write port active"); end
    if (cyc > NPKT + 150) begin failures++; $display("pair %0d: %0d cycles", pair, cyc); end
    $display("pair %0d: MSE %f expected %f, %0d cycles", pair, got, expv, cyc);
  endtask

  initial begin
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_wdata = 0; s_wstrb = 0; s_araddr = 0;
    repeat (5) @(posedge clk); #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
