// tb_ref_cache: self-checking test of the reference-image cache.
// Fills the cache with a random image, replays it three times (one with
// random output stalls) and checks every packet and its order; refills with a
// second image and checks that the replay returns the new one. A stall-free
// replay must deliver one packet per cycle.
module tb_ref_cache;
  localparam int DIM = 16, PE = 4, B = 8, NPKT = DIM*DIM/PE;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fill, replay, busy, filled, in_valid, in_ready, out_valid, out_ready;
  logic [PE*B-1:0] in_data, out_data;
  logic [PE*B-1:0] img [NPKT];
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  ref_cache #(.DIM(DIM), .PE(PE), .B(B)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_fill();
    foreach (img[i]) img[i] = {$urandom, $urandom};
    fill = 1; @(posedge clk); #1; fill = 0;
    for (int i = 0; i < NPKT; i++) begin
      in_valid = 0;
      while ($urandom % 3 == 0) begin @(posedge clk); #1; end
      in_valid = 1; in_data = img[i];
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (!filled || busy) begin failures++; $display("fill did not complete"); end
  endtask

  task automatic do_replay(input bit stall);
    int n = 0, bad = 0, cyc0;
    replay = 1; @(posedge clk); #1; replay = 0;
    cyc0 = cycle;
    while (n < NPKT) begin
      out_ready = stall ? ($urandom % 2) : 1'b1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (out_data !== img[n]) bad++;
        n++;
      end
      #1;
    end
    out_ready = 0;
    checks++;
    if (bad != 0) begin failures++; $display("replay: %0d bad packets", bad); end
    if (!stall) begin
      checks++;
      if (cycle - cyc0 > NPKT + 2) begin failures++; $display("replay took %0d cycles", cycle - cyc0); end
    end
    repeat (2) @(posedge clk); #1;
    checks++;
    if (busy || out_valid) begin failures++; $display("replay did not end"); end
  endtask

  initial begin
    fill = 0; replay = 0; in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    do_fill();
    do_replay(0);
    do_replay(1);
    do_replay(0);
    do_fill();
    do_replay(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
