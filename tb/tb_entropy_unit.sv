// tb_entropy_unit: self-checking test of the entropy stage.
// Streams NB x NB histograms (random counts with many empty bins, a single
// full bin, a diagonal and a uniform one) with random gaps, and compares
// Hx, Hy and Hxy with entropies computed here in floating point from the same
// counts. Tolerance 1e-4 bit.
module tb_entropy_unit;
  localparam int NB = 16, IN_W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bin_valid, bin_last, bin_ready, res_valid, res_ready;
  logic [IN_W-1:0] bin_data;
  logic [63:0] hx, hy, hxy;
  int checks = 0, failures = 0;

  entropy_unit #(.NB(NB), .IN_W(IN_W)) dut (.*);

  int h[NB][NB];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ent(input real c[], input real t);
    real e = 0;
    foreach (c[i]) if (c[i] > 0) e -= (c[i] / t) * $ln(c[i] / t) / $ln(2.0);
    return e;
  endfunction

  task automatic check(input string what, input logic [63:0] got, input real exp_v);
    real g = real'(got) / 4294967296.0;
    checks++;
    if (g - exp_v > 1.0e-4 || exp_v - g > 1.0e-4) begin
      failures++;
      $display("%s: got %f exp %f", what, g, exp_v);
    end
  endtask

  task automatic run(input int mode);
    real cx[] = new[NB], cy[] = new[NB], cxy[] = new[NB*NB];
    real t = 0;
    foreach (cx[i]) begin cx[i] = 0; cy[i] = 0; end
    for (int r = 0; r < NB; r++)
      for (int c = 0; c < NB; c++) begin
        case (mode)
          0: h[r][c] = ($urandom % 3 == 0) ? 0 : $urandom % 200;
          1: h[r][c] = (r == 5 && c == 9) ? 4000 : 0;
          2: h[r][c] = (r == c) ? 1 + r : 0;
          default: h[r][c] = 7;
        endcase
        cx[r] += h[r][c]; cy[c] += h[r][c]; cxy[r*NB+c] = h[r][c]; t += h[r][c];
      end
    for (int r = 0; r < NB; r++)
      for (int c = 0; c < NB; c++) begin
        bin_valid = 0;
        while ($urandom % 4 == 0) begin @(posedge clk); #1; end
        bin_valid = 1; bin_data = IN_W'(h[r][c]); bin_last = (r == NB-1 && c == NB-1);
        do @(posedge clk); while (!bin_ready);
        #1;
      end
    bin_valid = 0; bin_last = 0;
    while (!res_valid) @(posedge clk);
    #1;
    check("Hx", hx, ent(cx, t));
    check("Hy", hy, ent(cy, t));
    check("Hxy", hxy, ent(cxy, t));
    res_ready = 1; @(posedge clk); #1; res_ready = 0;
  endtask

  initial begin
    bin_valid = 0; bin_last = 0; bin_data = '0; res_ready = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int m = 0; m < 4; m++) run(m);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
