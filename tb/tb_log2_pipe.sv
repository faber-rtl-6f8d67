// tb_log2_pipe: self-checking test of the pipelined base-2 logarithm.
// Sends one value per cycle (zero, powers of two, their neighbours and random
// values of every magnitude) and checks each result against $ln(v)/$ln(2)
// within 2^-18, that it appears exactly FRAC+1 cycles after its input, and
// that tag and value travel with it.
module tb_log2_pipe;
  localparam int IN_W = 32, FRAC = 20, TAG_W = 2, LW = $clog2(IN_W) + FRAC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [IN_W-1:0] in_data, out_data;
  logic [TAG_W-1:0] in_tag, out_tag;
  logic [LW-1:0] out_log;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  log2_pipe #(.IN_W(IN_W), .FRAC(FRAC), .TAG_W(TAG_W)) dut (.*);

  typedef struct { longint unsigned v; int t; int cyc; } item_t;
  item_t sent[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    item_t it;
    real exp_v, got;
    it = sent.pop_front();
    exp_v = (it.v == 0) ? 0.0 : $ln(real'(it.v)) / $ln(2.0);
    got = real'(out_log) / real'(1 << FRAC);
    checks++;
    if (got - exp_v > 3.9e-6 || exp_v - got > 3.9e-6 || out_data != IN_W'(it.v) ||
        int'(out_tag) != it.t || cycle - it.cyc != FRAC + 1) begin
      failures++;
      if (failures < 6)
        $display("log2(%0d): got %f exp %f, latency %0d", it.v, got, exp_v, cycle - it.cyc);
    end
  end

  task automatic send(input longint unsigned v);
    item_t it;
    in_valid = 1; in_data = IN_W'(v); in_tag = TAG_W'($urandom);
    it.v = v; it.t = int'(in_tag); it.cyc = cycle;
    sent.push_back(it);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = '0; in_tag = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    send(0); send(1); send(2); send(3);
    for (int s = 1; s < IN_W; s++) begin
      send(64'd1 << s); send((64'd1 << s) - 1); send((64'd1 << s) + 1);
    end
    for (int i = 0; i < 2000; i++) begin
      send(({$urandom, $urandom} >> ($urandom % 64)) & 64'hffff_ffff);
      if ($urandom % 5 == 0) begin @(posedge clk); #1; end
    end
    repeat (FRAC + 4) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d results missing", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
