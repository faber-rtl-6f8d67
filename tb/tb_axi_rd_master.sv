// tb_axi_rd_master: self-checking test of the AXI4 image reader.
// Reads regions of several lengths (a single beat, part of a burst, several
// whole bursts, an odd count) from the memory model, which stalls at random,
// with random back-pressure on the output stream; every beat and its order is
// checked, as are arlen/arsize/arburst, the 4 KiB rule, the done pulse, and
// that several bursts were in flight at once.
module tb_axi_rd_master;
  localparam int DW = 64, MB = 16, CNT_W = 16, BYTES = DW / 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [63:0] base;
  logic [CNT_W-1:0] beats;
  logic [63:0] araddr [2]; logic [7:0] arlen [2]; logic arvalid [2]; logic arready [2];
  logic [DW-1:0] rdata [2]; logic [1:0] rresp [2]; logic rlast [2]; logic rvalid [2];
  logic rready [2];
  logic [2:0] arsize; logic [1:0] arburst;
  logic out_valid, out_ready;
  logic [DW-1:0] out_data;
  logic [63:0] awaddr, wdata; logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic [1:0] bresp;
  int checks = 0, failures = 0;

  axi_rd_master #(.DW(DW), .MAX_BURST(MB), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .start, .base, .beats, .busy, .done,
    .araddr(araddr[0]), .arlen(arlen[0]), .arsize, .arburst, .arvalid(arvalid[0]),
    .arready(arready[0]), .rdata(rdata[0]), .rresp(rresp[0]), .rlast(rlast[0]),
    .rvalid(rvalid[0]), .rready(rready[0]), .out_valid, .out_data, .out_ready);

  axi_mem_model #(.DW(DW), .WORDS(4096)) u_mem (.*);

  assign araddr[1] = '0; assign arlen[1] = '0; assign arvalid[1] = 1'b0; assign rready[1] = 1'b0;
  assign awaddr = '0; assign wdata = '0; assign awvalid = 1'b0; assign wvalid = 1'b0;
  assign bready = 1'b0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // protocol checks on every address handshake
  int bad_ar = 0;
  always @(posedge clk) if (arvalid[0] && arready[0]) begin
    if (arsize != 3'd3 || arburst != 2'b01) bad_ar++;
    if ((araddr[0] % 4096) + (int'(arlen[0]) + 1) * BYTES > 4096) bad_ar++;
  end

  task automatic read(input int w0, input int n, input bit stall);
    int got = 0, bad = 0, dones = 0;
    base = 64'(w0 * BYTES); beats = CNT_W'(n); start = 1;
    @(posedge clk); #1 start = 0;
    while (got < n || busy) begin
      out_ready = stall ? ($urandom % 3 != 0) : 1'b1;
      @(posedge clk);
      if (done) dones++;
      if (out_valid && out_ready) begin
        if (out_data !== u_mem.mem[w0 + got]) bad++;
        got++;
      end
      #1;
    end
    @(posedge clk); if (done) dones++;
    #1 out_ready = 0;
    checks += 2;
    if (bad != 0 || got != n) begin failures++; $display("read %0d beats: %0d bad, %0d seen", n, bad, got); end
    if (dones != 1) begin failures++; $display("read %0d beats: %0d done pulses", n, dones); end
  endtask

  initial begin
    start = 0; base = '0; beats = '0; out_ready = 0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;
    read(0, 1, 0);
    read(32, 7, 1);
    read(256, 16 * 12, 0);
    read(1024, 333, 1);
    read(2048, 512, 0);
    checks += 2;
    if (bad_ar != 0) begin failures++; $display("%0d bad read addresses", bad_ar); end
    if (u_mem.max_inflight < 2) begin failures++; $display("only one burst in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
