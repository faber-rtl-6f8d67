// tb_axi_wr_result: self-checking test of the single-beat result writer.
// A small AXI slave in the testbench accepts the address and the data after
// independent random delays and answers after a further delay. Each write
// must carry the right address, data, a full byte strobe, awlen 0, wlast,
// and end with exactly one done pulse, busy being high in between.
module tb_axi_wr_result;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [63:0] addr, data, awaddr, wdata;
  logic [7:0] awlen, wstrb; logic [2:0] awsize; logic [1:0] awburst, bresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  int checks = 0, failures = 0;

  axi_wr_result dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave: random ready delays, one response after both halves arrived
  logic got_aw, got_w;
  logic [63:0] s_addr, s_data;
  logic [7:0] s_strb, s_len;
  logic s_last;
  assign bresp = 2'b00;
  always @(posedge clk) begin
    if (!rst_n) begin
      got_aw <= 0; got_w <= 0; bvalid <= 0; awready <= 0; wready <= 0;
    end else begin
      awready <= ($urandom % 3 == 0);
      wready  <= ($urandom % 4 == 0);
      if (awvalid && awready) begin got_aw <= 1; s_addr <= awaddr; s_len <= awlen; end
      if (wvalid && wready) begin got_w <= 1; s_data <= wdata; s_strb <= wstrb; s_last <= wlast; end
      if (got_aw && got_w && !bvalid && ($urandom % 2)) bvalid <= 1;
      if (bvalid && bready) begin bvalid <= 0; got_aw <= 0; got_w <= 0; end
    end
  end

  initial begin
    start = 0; addr = 0; data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      automatic int dones = 0, cyc = 0;
      automatic logic [63:0] a = {$urandom, $urandom} & ~64'h7, d = {$urandom, $urandom};
      addr = a; data = d; start = 1;
      @(posedge clk); #1 start = 0; addr = '0; data = '0;
      while (busy && cyc < 200) begin @(posedge clk); cyc++; if (done) dones++; #1; end
      @(posedge clk); if (done) dones++; #1;
      checks += 3;
      if (s_addr !== a || s_data !== d) begin failures++; $display("write %0d: %h <- %h", t, s_addr, s_data); end
      if (s_strb !== 8'hff || s_len !== 8'd0 || !s_last || awsize !== 3'd3 || awburst !== 2'b01) begin
        failures++; $display("write %0d: bad beat attributes", t);
      end
      if (dones != 1) begin failures++; $display("write %0d: %0d done pulses", t, dones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
