// tb_joint_histogram: self-checking test of the joint-histogram stage.
// Random images, images with long runs of one bin (to exercise the increment
// forwarding) and images with few grey levels are fed as packets; every bin of
// the reduced histogram is compared with counts made here. bin_ready is
// randomly withheld in one run. A gap-free run must take about
// N/PE + 2^(2B) cycles from the first packet to the last bin.
module tb_joint_histogram;
  localparam int DIM = 16, PE = 4, B = 4, N = DIM*DIM, BINS = 1 << (2*B);
  localparam int OUT_W = faber_pkg::cnt_w(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ref_valid, flt_valid, in_ready, bin_valid, bin_last, bin_ready;
  logic [PE*B-1:0] ref_data, flt_data;
  logic [OUT_W-1:0] bin_data;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  joint_histogram #(.DIM(DIM), .PE(PE), .B(B)) dut (.*);

  int x[N], y[N], h[BINS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_image(input int mode, input bit stall);
    int cyc0, nb, bad;
    foreach (h[i]) h[i] = 0;
    for (int i = 0; i < N; i++) begin
      case (mode)
        0: begin x[i] = $urandom % (1 << B); y[i] = $urandom % (1 << B); end
        1: begin x[i] = (i / 37) % (1 << B); y[i] = 3; end
        default: begin x[i] = $urandom % 2; y[i] = 15 * ($urandom % 2); end
      endcase
      h[x[i] * (1 << B) + y[i]]++;
    end
    while (!in_ready) begin @(posedge clk); #1; end
    cyc0 = cycle;
    ref_valid = 1; flt_valid = 1;
    for (int p = 0; p < N/PE; p++) begin
      for (int k = 0; k < PE; k++) begin
        ref_data[k*B +: B] = B'(x[p*PE+k]);
        flt_data[k*B +: B] = B'(y[p*PE+k]);
      end
      do @(posedge clk); while (!in_ready);
      #1;
    end
    ref_valid = 0; flt_valid = 0;
    nb = 0; bad = 0;
    while (1) begin
      bin_ready = stall ? ($urandom % 2) : 1'b1;
      @(posedge clk);
      if (bin_valid && bin_ready) begin
        if (int'(bin_data) != h[nb]) begin
          bad++;
          if (bad < 5) $display("bin %0d: got %0d exp %0d", nb, bin_data, h[nb]);
        end
        if (bin_last != (nb == BINS-1)) bad++;
        nb++;
        if (bin_last) break;
      end
      #1;
    end
    #1;
    bin_ready = 0;
    checks++;
    if (bad != 0 || nb != BINS) begin
      failures++;
      $display("mode %0d: %0d bad bins, %0d bins seen", mode, bad, nb);
    end
    if (!stall) begin
      checks++;
      if (cycle - cyc0 > N/PE + BINS + 10) begin
        failures++;
        $display("latency %0d, model %0d", cycle - cyc0, N/PE + BINS);
      end
    end
  endtask

  initial begin
    ref_valid = 0; flt_valid = 0; bin_ready = 0; ref_data = '0; flt_data = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run_image(0, 0);
    run_image(1, 1);
    run_image(2, 0);
    run_image(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
