// tb_parzen_conv: self-checking test of the Parzen-window convolution.
// Streams NB x NB histograms (random, a single impulse, a corner bin) with
// random input gaps and random output stalls, and compares every one of the
// (NB+K-1)^2 outputs with a direct full 2-D convolution computed here with
// the 1,4,1 x 1,4,1 kernel. Also checks that a stall-free pass takes
// (NB+K-1)^2 cycles.
module tb_parzen_conv;
  localparam int NB = 8, IN_W = 10, K = 3, M = NB + K - 1;
  localparam int OUT_W = IN_W + 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_last, out_ready;
  logic [IN_W-1:0] in_data;
  logic [OUT_W-1:0] out_data;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int kc[3] = '{1, 4, 1};

  parzen_conv #(.NB(NB), .IN_W(IN_W)) dut (.*);

  int h[NB][NB];
  int exp_q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode, input bit gaps);
    int nout = 0, bad = 0, cyc0;
    bit done_in = 0;
    for (int r = 0; r < NB; r++)
      for (int c = 0; c < NB; c++)
        case (mode)
          0: h[r][c] = $urandom % 1024;
          1: h[r][c] = (r == 3 && c == 4) ? 100 : 0;
          default: h[r][c] = (r == NB-1 && c == NB-1) ? 1023 : 0;
        endcase
    exp_q.delete();
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        int s = 0;
        for (int a = 0; a < K; a++)
          for (int b = 0; b < K; b++)
            if (r-a >= 0 && r-a < NB && c-b >= 0 && c-b < NB) s += kc[a]*kc[b]*h[r-a][c-b];
        exp_q.push_back(s);
      end
    cyc0 = cycle;
    fork
      begin
        for (int i = 0; i < NB*NB; i++) begin
          in_valid = 0;
          while (gaps && $urandom % 3 == 0) begin @(posedge clk); #1; end
          in_valid = 1; in_data = IN_W'(h[i/NB][i%NB]);
          do @(posedge clk); while (!in_ready);
          #1;
        end
        in_valid = 0;
      end
      begin
        while (nout < M*M) begin
          out_ready = gaps ? ($urandom % 4 != 0) : 1'b1;
          @(posedge clk);
          if (out_valid && out_ready) begin
            if (int'(out_data) != exp_q[nout] || out_last != (nout == M*M-1)) begin
              bad++;
              if (bad < 4) $display("out %0d: got %0d exp %0d", nout, out_data, exp_q[nout]);
            end
            nout++;
          end
          #1;
        end
        out_ready = 0;
      end
    join
    checks++;
    if (bad != 0) begin failures++; $display("mode %0d: %0d bad outputs", mode, bad); end
    if (!gaps) begin
      checks++;
      if (cycle - cyc0 > M*M + 3) begin
        failures++; $display("took %0d cycles, expected %0d", cycle - cyc0, M*M);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run(0, 0);
    run(1, 1);
    run(2, 0);
    run(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
