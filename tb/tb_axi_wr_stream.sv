// tb_axi_wr_stream: self-checking test of the burst image writer.
// Streams packets of several counts (one beat, a partial burst, whole bursts,
// an odd count) with random gaps on the input into the write sink model,
// which withdraws awready/wready at random. Checks every stored beat and its
// address, wlast on the last beat of each burst only, full strobes, one done
// pulse per transfer, and that a transfer with a steady input and a ready
// memory takes about one cycle per beat.
module tb_axi_wr_stream;
  localparam int DW = 64, MB = 16, CNT_W = 16, BYTES = DW / 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, in_valid, in_ready;
  logic [63:0] base, awaddr;
  logic [CNT_W-1:0] beats;
  logic [DW-1:0] in_data, wdata;
  logic [7:0] awlen, wstrb; logic [2:0] awsize; logic [1:0] awburst, bresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  axi_wr_stream #(.DW(DW), .MAX_BURST(MB), .CNT_W(CNT_W)) dut (.*);
  axi_wr_sink #(.DW(DW)) u_sink (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input longint b, input int n, input bit gaps);
    logic [DW-1:0] ref_d [] = new[n];
    int sent = 0, dones = 0, bad = 0, c0;
    foreach (ref_d[i]) ref_d[i] = {$urandom, $urandom};
    base = 64'(b); beats = CNT_W'(n); start = 1;
    c0 = cycle;
    @(posedge clk); #1 start = 0;
    while (busy || sent < n) begin
      in_valid = (sent < n) && (!gaps || $urandom % 3 != 0);
      in_data  = (sent < n) ? ref_d[sent] : '0;
      @(posedge clk);
      if (done) dones++;
      if (in_valid && in_ready) sent++;
      #1;
    end
    in_valid = 0;
    @(posedge clk); if (done) dones++; #1;
    for (int i = 0; i < n; i++)
      if (!u_sink.mem.exists(b + i * BYTES) || u_sink.mem[b + i * BYTES] !== ref_d[i]) bad++;
    checks += 2;
    if (bad != 0) begin failures++; $display("%0d beats: %0d wrong", n, bad); end
    if (dones != 1) begin failures++; $display("%0d beats: %0d done pulses", n, dones); end
    $display("%0d beats written in %0d cycles", n, cycle - c0);
    if (!gaps && n >= 64) begin
      checks++;
      if (cycle - c0 > n * 3 / 2 + 40) begin failures++; $display("%0d beats: too slow", n); end
    end
  endtask

  initial begin
    start = 0; base = 0; beats = 0; in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;
    send(64'h0, 1, 1);
    send(64'h1000, 7, 1);
    send(64'h2000, 48, 0);
    send(64'h4000, 333, 1);
    send(64'h8000, 512, 0);
    checks += 2;
    if (u_sink.bad_last != 0) begin failures++; $display("%0d bad wlast/wstrb", u_sink.bad_last); end
    if (u_sink.beats != 1 + 7 + 48 + 333 + 512) begin failures++; $display("%0d beats stored", u_sink.beats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
