// tb_mi_metric: end-to-end test of the mutual-information accelerator.
// Feeds image pairs (identical, related by a noisy intensity mapping,
// independent) as PE-pixel packets and compares the result with
// MI = H(X) + H(Y) - H(X,Y) computed here in floating point from the images.
// Tolerance 1e-4 bit. A gap-free image must finish within
// N/PE + (2^B)^2 cycles plus the fixed tail (latency model of the source).
module tb_mi_metric;
  import faber_pkg::*;
  localparam int DIM = 16, PE = 4, B = 4, N = DIM*DIM, NB = 1 << B;
  localparam bit NMI = 0;
  localparam int K = 3, NC = NMI ? NB + K - 1 : NB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ref_valid, flt_valid, in_ready, res_valid, res_ready;
  logic [PE*B-1:0] ref_data, flt_data;
  metric_t res_value;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  mi_metric #(.DIM(DIM), .PE(PE), .B(B)) dut (.*);

  int x[N], y[N];
  real hj[NB][NB];
  real hs[NC][NC];
  int kc[3] = '{1, 4, 1};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real plogp(input real c, input real t);
    return (c > 0) ? -(c / t) * $ln(c / t) / $ln(2.0) : 0.0;
  endfunction

  // Reference metric from the images.
  function automatic real reference();
    real t = 0, ex = 0, ey = 0, exy = 0, m;
    foreach (hj[i, j]) hj[i][j] = 0;
    for (int i = 0; i < N; i++) hj[x[i]][y[i]] += 1;
    foreach (hs[r, c]) begin
      hs[r][c] = 0;
      if (!NMI) hs[r][c] = hj[r][c];
      else
        for (int a = 0; a < K; a++)
          for (int b = 0; b < K; b++)
            if (r-a >= 0 && r-a < NB && c-b >= 0 && c-b < NB)
              hs[r][c] += kc[a] * kc[b] * hj[r-a][c-b];
    end
    foreach (hs[r, c]) t += hs[r][c];
    for (int r = 0; r < NC; r++) begin
      real rs = 0, cs = 0;
      for (int c = 0; c < NC; c++) begin
        rs += hs[r][c]; cs += hs[c][r];
        exy += plogp(hs[r][c], t);
      end
      ex += plogp(rs, t); ey += plogp(cs, t);
    end
    m = NMI ? (ex + ey) / exy : ex + ey - exy;
    return m;
  endfunction

  task automatic run_image(input int mode, input bit gaps);
    real exp_v, got;
    int cyc0;
    for (int i = 0; i < N; i++) begin
      x[i] = $urandom % NB;
      case (mode)
        0: y[i] = x[i];
        1: y[i] = (NB - 1 - x[i] + (($urandom % 4 == 0) ? 1 : 0)) % NB;
        default: y[i] = $urandom % NB;
      endcase
    end
    exp_v = reference();
    while (!in_ready) begin @(posedge clk); #1; end
    cyc0 = cycle;
    for (int p = 0; p < N/PE; p++) begin
      for (int k = 0; k < PE; k++) begin
        ref_data[k*B +: B] = B'(x[p*PE+k]);
        flt_data[k*B +: B] = B'(y[p*PE+k]);
      end
      ref_valid = 1; flt_valid = 0;
      while (gaps && ($urandom % 3 == 0)) begin @(posedge clk); #1; end
      flt_valid = 1;
      do @(posedge clk); while (!in_ready);
      #1;
    end
    ref_valid = 0; flt_valid = 0;
    while (!res_valid) @(posedge clk);
    #1;
    got = real'(res_value) / 4294967296.0;
    checks++;
    if (got - exp_v > 1.0e-4 || exp_v - got > 1.0e-4) begin
      failures++;
      $display("mode %0d: got %f exp %f", mode, got, exp_v);
    end
    if (!gaps) begin
      checks++;
      if (cycle - cyc0 > N/PE + NC*NC + 2*NC + 600) begin
        failures++;
        $display("latency %0d, model %0d", cycle - cyc0, N/PE + NC*NC);
      end
    end
    res_ready = 1; @(posedge clk); #1; res_ready = 0;
  endtask

  initial begin
    ref_valid = 0; flt_valid = 0; res_ready = 0; ref_data = '0; flt_data = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run_image(0, 0);
    run_image(1, 1);
    run_image(2, 0);
    run_image(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
