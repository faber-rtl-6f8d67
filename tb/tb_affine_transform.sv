// tb_affine_transform: self-checking test of the streaming affine warp.
// A small image (DIM = 32, 8-row buffer, output after 4 rows) is warped with
// the identity, an integer translation, a rotation in nearest-neighbour and
// bilinear modes and a vertical shift beyond the row window. Every output
// pixel is compared with a model written here from the specification
// (Q16.16 source coordinates, 8-bit bilinear weights, zero outside the image
// and outside the row window). One run uses random input gaps and output
// stalls; a gap-free run must take (DIM + START_ROWS) * DIM cycles plus a few.
module tb_affine_transform;
  import faber_pkg::*;
  localparam int DIM = 32, B = 8, STORE = 8, START = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  affine_t matrix;
  interp_e interp;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [B-1:0] in_data, out_data;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  affine_transform #(.DIM(DIM), .B(B), .STORE_ROWS(STORE), .START_ROWS(START)) dut (.*);

  int img[DIM][DIM];
  int expv[DIM*DIM];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap(input longint r, input longint c, input int y);
    longint lo = y + START - STORE + 1, hi = y + START - 1;
    if (r < 0 || r >= DIM || c < 0 || c >= DIM || r < lo || r > hi) return 0;
    return img[r][c];
  endfunction

  function automatic void model(input affine_t m, input interp_e it);
    for (int y = 0; y < DIM; y++)
      for (int x = 0; x < DIM; x++) begin
        longint xs = longint'(m.m00) * x + longint'(m.m01) * y + longint'(m.m02);
        longint ys = longint'(m.m10) * x + longint'(m.m11) * y + longint'(m.m12);
        if (it == INTERP_NEAREST) begin
          expv[y*DIM+x] = tap((ys + 32768) >>> 16, (xs + 32768) >>> 16, y);
        end else begin
          longint xi = xs >>> 16, yi = ys >>> 16;
          longint fx = (xs >>> 8) & 255, fy = (ys >>> 8) & 255;
          longint top = tap(yi, xi, y) * (256 - fx) + tap(yi, xi+1, y) * fx;
          longint bot = tap(yi+1, xi, y) * (256 - fx) + tap(yi+1, xi+1, y) * fx;
          expv[y*DIM+x] = int'((top * (256 - fy) + bot * fy + 32768) >> 16);
        end
      end
  endfunction

  function automatic coef_t q16(input real v);
    return coef_t'($rtoi(v * 65536.0 + (v < 0 ? -0.5 : 0.5)));
  endfunction

  task automatic run(input string name, input real ang, input real tx, input real ty,
                     input interp_e it, input bit gaps);
    int nout = 0, bad = 0, cyc0;
    real cs = $cos(ang), sn = $sin(ang), cx = DIM / 2.0;
    foreach (img[r, c]) img[r][c] = $urandom % 256;
    // rotation about the centre, then translation (output -> input map)
    matrix.m00 = q16(cs);  matrix.m01 = q16(-sn); matrix.m02 = q16(cx - cs*cx + sn*cx + tx);
    matrix.m10 = q16(sn);  matrix.m11 = q16(cs);  matrix.m12 = q16(cx - sn*cx - cs*cx + ty);
    interp = it;
    model(matrix, it);
    cyc0 = cycle;
    fork
      for (int i = 0; i < DIM*DIM; i++) begin
        in_valid = 0;
        while (gaps && $urandom % 4 == 0) begin @(posedge clk); #1; end
        in_valid = 1; in_data = B'(img[i / DIM][i % DIM]);
        do @(posedge clk); while (!in_ready);
        #1;
        in_valid = 0;
      end
      while (nout < DIM*DIM) begin
        out_ready = gaps ? ($urandom % 3 != 0) : 1'b1;
        @(posedge clk);
        if (out_valid && out_ready) begin
          if (int'(out_data) != expv[nout]) begin
            bad++;
            if (bad < 4) $display("%s: pixel %0d,%0d got %0d exp %0d", name,
                                  nout % DIM, nout / DIM, out_data, expv[nout]);
          end
          nout++;
        end
        #1;
      end
    join
    out_ready = 0;
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d bad pixels", name, bad); end
    if (!gaps) begin
      checks++;
      if (cycle - cyc0 > (DIM + START) * DIM + 8) begin
        failures++;
        $display("%s: %0d cycles, model %0d", name, cycle - cyc0, (DIM + START) * DIM);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0; matrix = '0; interp = INTERP_NEAREST;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run("identity", 0.0, 0.0, 0.0, INTERP_NEAREST, 0);
    run("translate", 0.0, 3.0, -2.0, INTERP_NEAREST, 0);
    run("rotate-nn", 0.05, 0.4, 0.3, INTERP_NEAREST, 1);
    run("rotate-bilinear", -0.08, 1.3, -0.6, INTERP_BILINEAR, 0);
    run("bilinear-gaps", 0.03, -0.7, 1.2, INTERP_BILINEAR, 1);
    run("beyond-window", 0.0, 0.0, 6.0, INTERP_NEAREST, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
