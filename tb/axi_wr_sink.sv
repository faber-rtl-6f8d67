// axi_wr_sink: behavioural AXI4 write slave for the testbenches (not
// synthesizable). Accepts incrementing bursts of DW-bit beats and stores
// every beat in an associative array indexed by byte address, so a
// testbench can compare an image written by the design with its own model.
// awready and wready are withdrawn at random to exercise back-pressure; one
// OKAY response is returned per burst after its last beat. stalls counts
// the cycles a beat was offered but not taken.
module axi_wr_sink #(
  parameter int unsigned DW = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [63:0]     awaddr,
  input  logic [7:0]      awlen,
  input  logic            awvalid,
  output logic            awready,
  input  logic [DW-1:0]   wdata,
  input  logic [DW/8-1:0] wstrb,
  input  logic            wlast,
  input  logic            wvalid,
  output logic            wready,
  output logic [1:0]      bresp,
  output logic            bvalid,
  input  logic            bready
);
  logic [DW-1:0] mem [longint];
  longint addr_q [$];
  int     len_q [$];
  longint cur;
  int     left = 0, pend = 0, stalls = 0, beats = 0, bad_last = 0;

  assign bresp = 2'b00;

  always @(posedge clk) begin
    if (!rst_n) begin
      awready <= 1'b0; wready <= 1'b0; bvalid <= 1'b0;
    end else begin
      awready <= ($urandom % 4 != 0);
      wready  <= ($urandom % 5 != 0) && (left > 0 || addr_q.size() > 0);
      if (awvalid && awready) begin addr_q.push_back(longint'(awaddr)); len_q.push_back(int'(awlen) + 1); end
      if (wvalid && !wready) stalls++;
      if (wvalid && wready) begin
        if (left == 0) begin
          cur  = addr_q.pop_front();
          left = len_q.pop_front();
        end
        if (wstrb != '1) bad_last++;
        mem[cur] = wdata;
        cur += DW / 8;
        left--;
        beats++;
        if ((left == 0) != wlast) bad_last++;
        if (left == 0) pend++;
      end
      if (bvalid && bready) begin bvalid <= 1'b0; pend--; end
      else if (!bvalid && pend > 0 && ($urandom % 2)) bvalid <= 1'b1;
    end
  end
endmodule
