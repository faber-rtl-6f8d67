// parzen_conv: streaming K x K convolution of the joint histogram with a
// separable B-spline kernel (Parzen-window density estimate for NMI).
//
// Input: NB x NB bins, row-major, on in_valid/in_data/in_ready. Output: the
// full convolution, M x M bins with M = NB + K - 1, row-major on
// out_valid/out_data/out_last/out_ready, one bin per cycle.
//   out(r,c) = sum_{a,b < K} KC[a]*KC[b] * in(r-a, c-b)   (zero outside)
// The unit walks the M x M output grid; at grid points inside the NB x NB
// input it takes one input bin, elsewhere it uses zero. A line buffer keeps
// the K-1 previous rows of this (zero-extended) input and a K x (K-1) register
// window the previous columns, so each output needs one new input value.
// Rows/columns before the first one are masked to zero, so the buffers need
// no clearing. Timing: M*M cycles per histogram when neither side stalls.
// Integer weights are used (default 1,4,1: the cubic B-spline at -1,0,1 times
// 6); the factor 36 cancels because the entropies normalise by the total.
// The (K-1)-row line buffer and the K x K kernel are from the source; the
// kernel size, its weights and the full-size output are this design's
// reading of it.
module parzen_conv
  import faber_pkg::*;
#(
  parameter int unsigned NB   = 256,
  parameter int unsigned IN_W = 19,
  parameter int unsigned K    = 3,
  parameter int unsigned KC [K] = '{1, 4, 1},
  parameter int unsigned KSUM_W = 6,  // bits of the kernel's total weight (36)
  localparam int unsigned M     = NB + K - 1,
  localparam int unsigned OUT_W = IN_W + KSUM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_data,
  output logic             out_last,
  input  logic             out_ready
);
  localparam int unsigned CW = $clog2(M);

  logic [CW-1:0]   r, c;
  logic            in_grid, adv, step;
  logic [IN_W-1:0] e;
  logic [IN_W-1:0] line [K-1][M];     // line[a][c] = e(r-1-a, c)
  logic [IN_W-1:0] win  [K][K-1];     // win[a][b]  = e(r-a, c-1-b)
  logic [IN_W-1:0] v    [K];          // current column: v[a] = e(r-a, c)
  logic [OUT_W-1:0] sum;

  function automatic int unsigned kernel_total();
    int unsigned t = 0;
    for (int a = 0; a < K; a++)
      for (int b = 0; b < K; b++) t += KC[a] * KC[b];
    return t;
  endfunction

  if (kernel_total() >= (1 << KSUM_W)) begin : g_bad_ksum
    $error("parzen_conv: KSUM_W too small for the kernel weights");
  end

  assign in_grid   = (r < CW'(NB)) && (c < CW'(NB));
  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && in_grid;
  assign step     = adv && (!in_grid || in_valid);
  assign e        = in_grid ? in_data : '0;

  always_comb begin
    v[0] = e;
    for (int a = 1; a < K; a++)
      v[a] = (r >= CW'(a)) ? line[a-1][c] : '0;
    sum = '0;
    for (int a = 0; a < K; a++) begin
      sum = sum + OUT_W'(KC[a] * KC[0]) * OUT_W'(v[a]);
      for (int b = 1; b < K; b++)
        if (c >= CW'(b))
          sum = sum + OUT_W'(KC[a] * KC[b]) * OUT_W'(win[a][b-1]);
    end
  end

  always_ff @(posedge clk) begin
    if (step) begin
      line[0][c] <= e;
      for (int a = 1; a < K-1; a++) line[a][c] <= line[a-1][c];
      for (int a = 0; a < K; a++) begin
        win[a][0] <= v[a];
        for (int b = 1; b < K-1; b++) win[a][b] <= win[a][b-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; c <= '0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      if (adv) out_valid <= 1'b0;
      if (step) begin
        out_valid <= 1'b1;
        out_data  <= sum;
        out_last  <= (r == CW'(M-1)) && (c == CW'(M-1));
        if (c == CW'(M-1)) begin
          c <= '0;
          r <= (r == CW'(M-1)) ? '0 : r + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

endmodule
