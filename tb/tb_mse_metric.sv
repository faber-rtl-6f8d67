// tb_mse_metric: self-checking test of the MSE accelerator.
// Feeds several random image pairs (plus an identical pair and an extreme
// pair) as PE-pixel packets with random gaps on the floating stream, and
// compares the result with sum((x-y)^2)*2^32/N computed here in integer
// arithmetic. Also checks that a gap-free image takes about N/PE cycles.
module tb_mse_metric;
  import faber_pkg::*;
  localparam int DIM = 16, PE = 4, B = 8, N = DIM*DIM;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ref_valid, flt_valid, in_ready, res_valid, res_ready;
  logic [PE*B-1:0] ref_data, flt_data;
  metric_t res_value;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  mse_metric #(.DIM(DIM), .PE(PE), .B(B)) dut (.*);

  byte unsigned x[N], y[N];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_image(input int mode, input bit gaps);
    longint unsigned s = 0;
    longint unsigned exp_v;
    int cyc0, cyc1;
    for (int i = 0; i < N; i++) begin
      case (mode)
        0: begin x[i] = 8'($urandom); y[i] = 8'($urandom); end
        1: begin x[i] = 8'($urandom); y[i] = x[i]; end
        default: begin x[i] = 8'hff; y[i] = 8'h00; end
      endcase
      s += longint'((int'(x[i]) - int'(y[i])) * (int'(x[i]) - int'(y[i])));
    end
    exp_v = (s << 32) / N;
    cyc0 = cycle;
    for (int p = 0; p < N/PE; p++) begin
      for (int k = 0; k < PE; k++) begin
        ref_data[k*B +: B] = x[p*PE+k];
        flt_data[k*B +: B] = y[p*PE+k];
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
    cyc1 = cycle;
    checks++;
    if (res_value !== metric_t'(exp_v)) begin
      failures++;
      $display("MSE mismatch mode %0d: got %h exp %h", mode, res_value, exp_v);
    end
    if (!gaps) begin
      checks++;
      if (cyc1 - cyc0 > N/PE + 80) begin
        failures++;
        $display("MSE latency %0d cycles, expected about %0d", cyc1 - cyc0, N/PE);
      end
    end
    res_ready = 1; @(posedge clk); #1; res_ready = 0;
  endtask

  initial begin
    ref_valid = 0; flt_valid = 0; res_ready = 0; ref_data = '0; flt_data = '0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    run_image(0, 0);
    run_image(0, 1);
    run_image(1, 0);
    run_image(2, 1);
    run_image(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
