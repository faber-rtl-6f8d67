// axi_mem_model: behavioural off-chip memory for the testbenches (not
// synthesizable). One AXI4 slave with two read ports and one write port
// sharing a word array of DW-bit words. Read bursts are queued (up to 8 per
// port) and returned in order; arready, rvalid, awready and wready are
// withheld at random to exercise back-pressure. The testbench loads and
// inspects mem[] hierarchically. Counters report stalls and the highest
// number of read bursts in flight.
module axi_mem_model #(
  parameter int unsigned DW    = 32,
  parameter int unsigned WORDS = 32768
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [63:0]   araddr  [2],
  input  logic [7:0]    arlen   [2],
  input  logic          arvalid [2],
  output logic          arready [2],
  output logic [DW-1:0] rdata   [2],
  output logic [1:0]    rresp   [2],
  output logic          rlast   [2],
  output logic          rvalid  [2],
  input  logic          rready  [2],
  input  logic [63:0]   awaddr,
  input  logic          awvalid,
  output logic          awready,
  input  logic [63:0]   wdata,
  input  logic          wvalid,
  output logic          wready,
  output logic [1:0]    bresp,
  output logic          bvalid,
  input  logic          bready
);
  localparam int unsigned BYTES = DW / 8;

  logic [DW-1:0] mem [WORDS];
  longint unsigned results [longint unsigned];   // address -> 64-bit value

  int ar_stalls = 0, r_gaps = 0, max_inflight = 0;

  typedef struct { longint unsigned addr; int len; } burst_t;
  burst_t q [2][$];
  int beat [2];

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin
        arready[p] <= 1'b0; rvalid[p] <= 1'b0; rlast[p] <= 1'b0;
        rdata[p] <= '0; rresp[p] <= 2'b00; beat[p] = 0; q[p].delete();
      end
      awready <= 1'b0; wready <= 1'b0; bvalid <= 1'b0; bresp <= 2'b00;
    end else begin
      for (int p = 0; p < 2; p++) begin
        burst_t b;
        // address channel
        if (arvalid[p] && arready[p]) begin
          b.addr = araddr[p]; b.len = int'(arlen[p]) + 1;
          q[p].push_back(b);
        end
        if (arvalid[p] && !arready[p]) ar_stalls++;
        if (q[p].size() > max_inflight) max_inflight = q[p].size();
        arready[p] <= (q[p].size() < 8) && ($urandom % 4 != 0);
        // data channel
        if (rvalid[p] && rready[p]) begin
          beat[p]++;
          if (beat[p] == q[p][0].len) begin
            void'(q[p].pop_front());
            beat[p] = 0;
          end
        end
        if (!(rvalid[p] && !rready[p])) begin
          if (q[p].size() > 0 && $urandom % 5 != 0) begin
            rvalid[p] <= 1'b1;
            rdata[p]  <= mem[(q[p][0].addr / BYTES + beat[p]) % WORDS];
            rlast[p]  <= (beat[p] == q[p][0].len - 1);
          end else begin
            if (q[p].size() > 0) r_gaps++;
            rvalid[p] <= 1'b0;
            rlast[p]  <= 1'b0;
          end
        end
      end
      // write: take address and data together, then respond
      if (bvalid && bready) bvalid <= 1'b0;
      if (awvalid && wvalid && awready && wready) begin
        results[awaddr] = wdata;
        awready <= 1'b0; wready <= 1'b0;
        bvalid  <= 1'b1;
      end else begin
        logic go;
        go = awvalid && wvalid && !bvalid && ($urandom % 2 == 0);
        awready <= go;
        wready  <= go;
      end
    end
  end
endmodule
