// tb_faber_top_full: the end-to-end test of tb_faber_top at the default size
// (512 x 512 images, 16 PEs, 100-row buffer, four cores), top parameters
// left at their defaults.
// Each core (MI, NMI, CC, MSE) gets its own memory model holding a reference
// image and a floating image. Through its AXI-Lite port the host model sets
// the addresses, an affine matrix and the interpolation mode and starts it;
// every core runs three registrations: a first one that fills the reference
// cache, a second one that reuses the cache with another matrix and bilinear
// interpolation, and a third that forces a refill. The metric read back over
// AXI-Lite and the value written to memory are compared with a reference
// computed here: the warp model (Q16.16 coordinates, row window, zero border)
// followed by the metric in floating point. The test counts the mechanisms
// it must see: cache fills, cache reuse, both interpolation modes, memory
// back-pressure, several bursts in flight, pixels lost to the row window,
// and a warp-out run per core, in which the core writes the warped image back
// to memory instead of computing a metric; it is compared pixel by pixel.
// The cycle count of each cached run is checked against the latency model
// (DIM + START_ROWS)*DIM + histogram pass, plus a margin for memory gaps.
module tb_faber_top_full;
  import faber_pkg::*;
  localparam int NC = 4, DIM = 512, PE = 16, B = 8, STORE = 100, START = 50;
  localparam int DW = PE * B, N = DIM * DIM, NPKT = N / PE, NB = 1 << B, K = 3;
  localparam metric_e MET [NC] = '{METRIC_MI, METRIC_NMI, METRIC_CC, METRIC_MSE};
  localparam longint REF_A = 64'h1_0000, FLT_A = 64'h5_0000, RES_A = 64'h9_0000, OUT_A = 64'hA_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- ports ----
  logic [7:0]  s_awaddr [NC]; logic s_awvalid [NC]; logic s_awready [NC];
  logic [31:0] s_wdata [NC];  logic [3:0] s_wstrb [NC]; logic s_wvalid [NC]; logic s_wready [NC];
  logic [1:0]  s_bresp [NC];  logic s_bvalid [NC]; logic s_bready [NC];
  logic [7:0]  s_araddr [NC]; logic s_arvalid [NC]; logic s_arready [NC];
  logic [31:0] s_rdata [NC];  logic [1:0] s_rresp [NC]; logic s_rvalid [NC]; logic s_rready [NC];
  logic [63:0] m0_araddr [NC]; logic [7:0] m0_arlen [NC]; logic [2:0] m0_arsize [NC];
  logic [1:0]  m0_arburst [NC]; logic m0_arvalid [NC]; logic m0_arready [NC];
  logic [DW-1:0] m0_rdata [NC]; logic [1:0] m0_rresp [NC]; logic m0_rlast [NC];
  logic m0_rvalid [NC]; logic m0_rready [NC];
  logic [63:0] m1_araddr [NC]; logic [7:0] m1_arlen [NC]; logic [2:0] m1_arsize [NC];
  logic [1:0]  m1_arburst [NC]; logic m1_arvalid [NC]; logic m1_arready [NC];
  logic [DW-1:0] m1_rdata [NC]; logic [1:0] m1_rresp [NC]; logic m1_rlast [NC];
  logic m1_rvalid [NC]; logic m1_rready [NC];
  logic [63:0] mw_awaddr [NC]; logic [7:0] mw_awlen [NC]; logic [2:0] mw_awsize [NC];
  logic [1:0]  mw_awburst [NC]; logic mw_awvalid [NC]; logic mw_awready [NC];
  logic [63:0] mw_wdata [NC]; logic [7:0] mw_wstrb [NC]; logic mw_wlast [NC];
  logic mw_wvalid [NC]; logic mw_wready [NC]; logic [1:0] mw_bresp [NC];
  logic mw_bvalid [NC]; logic mw_bready [NC];
  logic [63:0] mo_awaddr [NC]; logic [7:0] mo_awlen [NC]; logic [2:0] mo_awsize [NC];
  logic [1:0]  mo_awburst [NC]; logic mo_awvalid [NC]; logic mo_awready [NC];
  logic [DW-1:0] mo_wdata [NC]; logic [DW/8-1:0] mo_wstrb [NC]; logic mo_wlast [NC];
  logic mo_wvalid [NC]; logic mo_wready [NC]; logic [1:0] mo_bresp [NC];
  logic mo_bvalid [NC]; logic mo_bready [NC];

  faber_top dut (.*);

  for (genvar c = 0; c < NC; c++) begin : g_mem
    axi_mem_model #(.DW(DW), .WORDS(65536)) u_mem (
      .clk, .rst_n,
      .araddr('{m0_araddr[c], m1_araddr[c]}), .arlen('{m0_arlen[c], m1_arlen[c]}),
      .arvalid('{m0_arvalid[c], m1_arvalid[c]}), .arready('{m0_arready[c], m1_arready[c]}),
      .rdata('{m0_rdata[c], m1_rdata[c]}), .rresp('{m0_rresp[c], m1_rresp[c]}),
      .rlast('{m0_rlast[c], m1_rlast[c]}), .rvalid('{m0_rvalid[c], m1_rvalid[c]}),
      .rready('{m0_rready[c], m1_rready[c]}),
      .awaddr(mw_awaddr[c]), .awvalid(mw_awvalid[c]), .awready(mw_awready[c]),
      .wdata(mw_wdata[c]), .wvalid(mw_wvalid[c]), .wready(mw_wready[c]),
      .bresp(mw_bresp[c]), .bvalid(mw_bvalid[c]), .bready(mw_bready[c]));
    axi_wr_sink #(.DW(DW)) u_out (
      .clk, .rst_n, .awaddr(mo_awaddr[c]), .awlen(mo_awlen[c]), .awvalid(mo_awvalid[c]),
      .awready(mo_awready[c]), .wdata(mo_wdata[c]), .wstrb(mo_wstrb[c]), .wlast(mo_wlast[c]),
      .wvalid(mo_wvalid[c]), .wready(mo_wready[c]), .bresp(mo_bresp[c]),
      .bvalid(mo_bvalid[c]), .bready(mo_bready[c]));
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_fill = 0, n_reuse = 0, n_bilinear = 0, n_nearest = 0, n_window = 0, n_warpout = 0;

  // ---- images ----
  int refimg [NC][N];
  int fltimg [NC][N];
  int warped [N];

  function automatic coef_t q16(input real v);
    return coef_t'($rtoi(v * 65536.0 + (v < 0 ? -0.5 : 0.5)));
  endfunction

  function automatic affine_t make_matrix(input real ang, input real tx, input real ty);
    affine_t m;
    real cs = $cos(ang), sn = $sin(ang), cx = DIM / 2.0;
    m.m00 = q16(cs); m.m01 = q16(-sn); m.m02 = q16(cx - cs*cx + sn*cx + tx);
    m.m10 = q16(sn); m.m11 = q16(cs);  m.m12 = q16(cx - sn*cx - cs*cx + ty);
    return m;
  endfunction

  function automatic int tap(input int c, input longint r, input longint x, input int y, inout int lost);
    longint lo = y + START - STORE + 1, hi = y + START - 1;
    if (r < 0 || r >= DIM || x < 0 || x >= DIM) return 0;
    if (r < lo || r > hi) begin lost++; return 0; end
    return fltimg[c][r*DIM + x];
  endfunction

  // Reference warp of core c's floating image; returns window-lost taps.
  function automatic int warp(input int c, input affine_t m, input interp_e it);
    int lost = 0;
    for (int y = 0; y < DIM; y++)
      for (int x = 0; x < DIM; x++) begin
        longint xs = longint'(m.m00) * x + longint'(m.m01) * y + longint'(m.m02);
        longint ys = longint'(m.m10) * x + longint'(m.m11) * y + longint'(m.m12);
        if (it == INTERP_NEAREST)
          warped[y*DIM+x] = tap(c, (ys + 32768) >>> 16, (xs + 32768) >>> 16, y, lost);
        else begin
          longint xi = xs >>> 16, yi = ys >>> 16;
          longint fx = (xs >>> 8) & 255, fy = (ys >>> 8) & 255;
          longint top = tap(c, yi, xi, y, lost) * (256 - fx) + tap(c, yi, xi+1, y, lost) * fx;
          longint bot = tap(c, yi+1, xi, y, lost) * (256 - fx) + tap(c, yi+1, xi+1, y, lost) * fx;
          warped[y*DIM+x] = int'((top * (256 - fy) + bot * fy + 32768) >> 16);
        end
      end
    return lost;
  endfunction

  function automatic real plogp(input real v, input real t);
    return (v > 0) ? -(v / t) * $ln(v / t) / $ln(2.0) : 0.0;
  endfunction

  function automatic real ref_metric(input int c);
    real sxy = 0, sxx = 0, syy = 0, sd = 0;
    real hj [NB][NB];
    real hs [NB+K-1][NB+K-1];
    int kc[3] = '{1, 4, 1};
    int nb = (MET[c] == METRIC_NMI) ? NB + K - 1 : NB;
    real t = 0, ex = 0, ey = 0, exy = 0;
    for (int i = 0; i < N; i++) begin
      real xv = refimg[c][i], yv = warped[i];
      sxy += xv*yv; sxx += xv*xv; syy += yv*yv; sd += (xv-yv)*(xv-yv);
    end
    if (MET[c] == METRIC_MSE) return sd / N;
    if (MET[c] == METRIC_CC) return (sxx*syy == 0) ? 0.0 : -sxy / $sqrt(sxx*syy);
    foreach (hj[i, j]) hj[i][j] = 0;
    for (int i = 0; i < N; i++) hj[refimg[c][i]][warped[i]] += 1;
    for (int r = 0; r < nb; r++)
      for (int q = 0; q < nb; q++) begin
        hs[r][q] = 0;
        if (MET[c] == METRIC_MI) hs[r][q] = hj[r][q];
        else
          for (int a = 0; a < K; a++)
            for (int b = 0; b < K; b++)
              if (r-a >= 0 && r-a < NB && q-b >= 0 && q-b < NB)
                hs[r][q] += kc[a] * kc[b] * hj[r-a][q-b];
        t += hs[r][q];
      end
    for (int r = 0; r < nb; r++) begin
      real rs = 0, cs = 0;
      for (int q = 0; q < nb; q++) begin
        rs += hs[r][q]; cs += hs[q][r]; exy += plogp(hs[r][q], t);
      end
      ex += plogp(rs, t); ey += plogp(cs, t);
    end
    return (MET[c] == METRIC_MI) ? ex + ey - exy : (ex + ey) / exy;
  endfunction

  // ---- access to the memory models (constant indices only) ----
  task automatic mem_put(input int c, input int w, input int k, input logic [B-1:0] v);
    case (c)
      0: g_mem[0].u_mem.mem[w][k*B +: B] = v;
      1: g_mem[1].u_mem.mem[w][k*B +: B] = v;
      2: g_mem[2].u_mem.mem[w][k*B +: B] = v;
      default: g_mem[3].u_mem.mem[w][k*B +: B] = v;
    endcase
  endtask

  function automatic longint unsigned mem_result(input int c);
    case (c)
      0: return g_mem[0].u_mem.results[RES_A];
      1: return g_mem[1].u_mem.results[RES_A];
      2: return g_mem[2].u_mem.results[RES_A];
      default: return g_mem[3].u_mem.results[RES_A];
    endcase
  endfunction

  // Pixel k of beat w of the image written by core c's warp-out port; -1 if absent.
  function automatic int out_pixel(input int c, input int w, input int k);
    longint a = OUT_A + longint'(w) * (DW / 8);
    logic [DW-1:0] v;
    case (c)
      0: begin if (!g_mem[0].u_out.mem.exists(a)) return -1; v = g_mem[0].u_out.mem[a]; end
      1: begin if (!g_mem[1].u_out.mem.exists(a)) return -1; v = g_mem[1].u_out.mem[a]; end
      2: begin if (!g_mem[2].u_out.mem.exists(a)) return -1; v = g_mem[2].u_out.mem[a]; end
      default: begin if (!g_mem[3].u_out.mem.exists(a)) return -1; v = g_mem[3].u_out.mem[a]; end
    endcase
    return int'(v[k*B +: B]);
  endfunction

  function automatic int out_stalls(input int c);
    case (c)
      0: return g_mem[0].u_out.stalls;
      1: return g_mem[1].u_out.stalls;
      2: return g_mem[2].u_out.stalls;
      default: return g_mem[3].u_out.stalls;
    endcase
  endfunction

  // ---- AXI-Lite host ----
  task automatic lite_write(input int c, input logic [7:0] a, input logic [31:0] d);
    s_awaddr[c] = a; s_wdata[c] = d; s_wstrb[c] = 4'hf;
    s_awvalid[c] = 1; s_wvalid[c] = 1;
    do @(posedge clk); while (!s_awready[c]);
    #1 s_awvalid[c] = 0; s_wvalid[c] = 0; s_bready[c] = 1;
    while (!s_bvalid[c]) begin @(posedge clk); #1; end
    @(posedge clk); #1 s_bready[c] = 0;
  endtask

  task automatic lite_read(input int c, input logic [7:0] a, output logic [31:0] d);
    s_araddr[c] = a; s_arvalid[c] = 1;
    do @(posedge clk); while (!s_arready[c]);
    #1 s_arvalid[c] = 0; s_rready[c] = 1;
    while (!s_rvalid[c]) begin @(posedge clk); #1; end
    d = s_rdata[c];
    @(posedge clk); #1 s_rready[c] = 0;
  endtask

  task automatic run_core(input int c, input affine_t m, input interp_e it, input bit fill,
                          input string name);
    logic [31:0] st, lo, hi;
    real exp_v, got, got_mem, tol;
    int lost, cyc0, bound;
    metric_t mv;
    lost = warp(c, m, it);
    exp_v = ref_metric(c);
    if (lost > 0) n_window++;
    lite_write(c, 8'h08, {31'd0, it});
    lite_write(c, 8'h10, 32'(REF_A)); lite_write(c, 8'h14, 0);
    lite_write(c, 8'h18, 32'(FLT_A)); lite_write(c, 8'h1c, 0);
    lite_write(c, 8'h20, 32'(RES_A)); lite_write(c, 8'h24, 0);
    lite_write(c, 8'h28, m.m00); lite_write(c, 8'h2c, m.m01); lite_write(c, 8'h30, m.m02);
    lite_write(c, 8'h34, m.m10); lite_write(c, 8'h38, m.m11); lite_write(c, 8'h3c, m.m12);
    cyc0 = cycle;
    lite_write(c, 8'h00, fill ? 32'h9 : 32'h1);
    do lite_read(c, 8'h00, st); while (!st[1]);
    lite_read(c, 8'h40, lo); lite_read(c, 8'h44, hi);
    mv = {hi, lo};
    got = real'(mv) / 4294967296.0;
    got_mem = real'(metric_t'(mem_result(c))) / 4294967296.0;
    tol = (MET[c] == METRIC_MI || MET[c] == METRIC_NMI) ? 1.0e-4 : 1.0e-6;
    checks += 2;
    if (got - exp_v > tol || exp_v - got > tol) begin
      failures++; $display("core %0d %s: metric %f, expected %f", c, name, got, exp_v);
    end
    if (got_mem != got) begin
      failures++; $display("core %0d %s: memory holds %f, register %f", c, name, got_mem, got);
    end
    if (!fill) begin
      int nb = (MET[c] == METRIC_NMI) ? NB + K - 1 : NB;
      bound = (DIM + START) * DIM + ((MET[c] == METRIC_MI || MET[c] == METRIC_NMI) ? nb * nb : 0)
              + 1500;
      checks++;
      if (cycle - cyc0 > bound) begin
        failures++; $display("core %0d %s: %0d cycles, bound %0d", c, name, cycle - cyc0, bound);
      end
      n_reuse++;
    end else n_fill++;
    if (it == INTERP_BILINEAR) n_bilinear++; else n_nearest++;
    $display("core %0d %s: metric %f expected %f (%0d cycles)", c, name, got, exp_v, cycle - cyc0);
  endtask

  // Warp-out run: the core writes the warped floating image instead of a metric.
  task automatic run_warp_out(input int c, input affine_t m, input interp_e it);
    logic [31:0] st;
    int cyc0, bad = 0, st0;
    lite_write(c, 8'h08, {31'd0, it});
    lite_write(c, 8'h18, 32'(FLT_A)); lite_write(c, 8'h1c, 0);
    lite_write(c, 8'h48, 32'(OUT_A)); lite_write(c, 8'h4c, 0);
    lite_write(c, 8'h28, m.m00); lite_write(c, 8'h2c, m.m01); lite_write(c, 8'h30, m.m02);
    lite_write(c, 8'h34, m.m10); lite_write(c, 8'h38, m.m11); lite_write(c, 8'h3c, m.m12);
    cyc0 = cycle;
    st0 = out_stalls(c);
    lite_write(c, 8'h00, 32'h11);
    do lite_read(c, 8'h00, st); while (!st[1]);
    void'(warp(c, m, it));  // the model image is shared by the cores: fill it just before use
    for (int w = 0; w < NPKT; w++)
      for (int k = 0; k < PE; k++)
        if (out_pixel(c, w, k) != warped[w*PE+k]) bad++;
    checks += 2;
    if (bad != 0) begin failures++; $display("core %0d warp-out: %0d pixels differ", c, bad); end
    // latency model plus the cycles the memory refused a beat
    if (cycle - cyc0 > (DIM + START) * DIM + (out_stalls(c) - st0) + 1500) begin
      failures++; $display("core %0d warp-out: %0d cycles", c, cycle - cyc0);
    end
    n_warpout++;
    if (it == INTERP_BILINEAR) n_bilinear++; else n_nearest++;
    $display("core %0d warp-out: %0d pixels differ (%0d cycles)", c, bad, cycle - cyc0);
  endtask

  task automatic load_images(input int c);
    for (int i = 0; i < N; i++) begin
      int x = i % DIM, y = i / DIM;
      // smooth structure plus noise; the floating image is a shifted copy
      refimg[c][i] = (((x * 7 + y * 3) / 4) + ($urandom % 24) + 40 * ((x/8 + y/8) % 2)) % NB;
    end
    for (int i = 0; i < N; i++) begin
      int x = i % DIM, y = i / DIM;
      int xs = (x + 1 < DIM) ? x + 1 : x, ys = (y + 2 < DIM) ? y + 2 : y;
      fltimg[c][i] = (255 - refimg[c][ys*DIM + xs]) % NB;
    end
    for (int w = 0; w < NPKT; w++)
      for (int k = 0; k < PE; k++) begin
        mem_put(c, int'(REF_A / (DW/8)) + w, k, B'(refimg[c][w*PE+k]));
        mem_put(c, int'(FLT_A / (DW/8)) + w, k, B'(fltimg[c][w*PE+k]));
      end
  endtask

  task automatic core_test(input int c);
    load_images(c);
    run_core(c, make_matrix(0.0, 1.0, 2.0), INTERP_NEAREST, 1, "fill+nearest");
    run_warp_out(c, make_matrix(0.1, -1.5, 0.5), c % 2 ? INTERP_BILINEAR : INTERP_NEAREST);
    run_core(c, make_matrix(0.06, 0.7, 1.4), INTERP_BILINEAR, 0, "cached+bilinear");
    run_core(c, make_matrix(-0.2, 0.0, 5.0), INTERP_NEAREST, 1, "refill+window");
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      s_awvalid[c] = 0; s_wvalid[c] = 0; s_bready[c] = 0; s_arvalid[c] = 0; s_rready[c] = 0;
      s_awaddr[c] = 0; s_wdata[c] = 0; s_wstrb[c] = 0; s_araddr[c] = 0;
    end
    repeat (5) @(posedge clk); #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;
    fork
      core_test(0);
      core_test(1);
      core_test(2);
      core_test(3);
    join
    begin
      automatic int stalls = 0, inflight = 0;
      stalls = g_mem[0].u_mem.ar_stalls + g_mem[1].u_mem.ar_stalls + g_mem[2].u_mem.ar_stalls
             + g_mem[3].u_mem.ar_stalls;
      inflight = g_mem[0].u_mem.max_inflight;
      $display("warped images written back %0d", n_warpout);
      $display("fills %0d, cache reuses %0d, nearest %0d, bilinear %0d, window losses %0d, AR stalls %0d, max bursts in flight %0d",
               n_fill, n_reuse, n_nearest, n_bilinear, n_window, stalls, inflight);
      checks += 8;
      if (n_warpout == 0)  begin failures++; $display("no warped image written back"); end
      if (n_fill == 0)     begin failures++; $display("no cache fill seen"); end
      if (n_reuse == 0)    begin failures++; $display("no cache reuse seen"); end
      if (n_nearest == 0)  begin failures++; $display("no nearest run"); end
      if (n_bilinear == 0) begin failures++; $display("no bilinear run"); end
      if (n_window == 0)   begin failures++; $display("row window never limited a warp"); end
      if (stalls == 0)     begin failures++; $display("no memory back-pressure"); end
      if (inflight < 2)    begin failures++; $display("never more than one burst in flight"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
