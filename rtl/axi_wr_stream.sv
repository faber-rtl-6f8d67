// axi_wr_stream: AXI4 write master that stores a packet stream in off-chip
// memory, for writing the warped image back.
//
// A pulse on start with base (byte address) and beats (number of DW-bit
// beats) writes the next `beats` packets of in_valid/in_data/in_ready to
// consecutive addresses from base, in incrementing bursts of up to MAX_BURST
// beats with full byte strobes. Addresses run up to two bursts ahead of the
// data, and data beats of a burst are only sent once its address has been
// accepted. Data passes straight from the input stream to the W channel
// (in_ready = wready while an addressed burst is open), so the stream is
// written at the rate the memory accepts it, one beat per cycle at best, with
// no gap between bursts. Write responses are counted as they come; done
// pulses once the last beat is sent and the last response is in. busy is
// high from start to done; start is ignored while busy.
// base must be aligned to MAX_BURST*DW/8 bytes so that no burst crosses a
// 4 KiB boundary.
// The source says only that the transformation can write its output image
// back to memory instead of streaming it to the metric; the burst scheme is
// this design's choice.
module axi_wr_stream #(
  parameter int unsigned DW        = 128,
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned CNT_W     = 24
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [63:0]     base,
  input  logic [CNT_W-1:0] beats,
  output logic            busy,
  output logic            done,
  input  logic            in_valid,
  input  logic [DW-1:0]   in_data,
  output logic            in_ready,
  output logic [63:0]     awaddr,
  output logic [7:0]      awlen,
  output logic [2:0]      awsize,
  output logic [1:0]      awburst,
  output logic            awvalid,
  input  logic            awready,
  output logic [DW-1:0]   wdata,
  output logic [DW/8-1:0] wstrb,
  output logic            wlast,
  output logic            wvalid,
  input  logic            wready,
  input  logic [1:0]      bresp,
  input  logic            bvalid,
  output logic            bready
);
  localparam int unsigned BYTES = DW / 8;
  localparam int unsigned BL_W  = $clog2(MAX_BURST + 1);

  logic [CNT_W-1:0] aw_left;    // beats not yet addressed
  logic [CNT_W-1:0] w_left;     // beats not yet written
  logic [CNT_W-1:0] resp_left;  // bursts whose response is still due
  logic [1:0]       ahead;      // bursts addressed whose data is not complete
  logic [BL_W-1:0]  beat;       // beat within the current data burst
  logic [BL_W-1:0]  aw_len;
  logic             aw_go, w_end, b_go;

  assign aw_len   = (aw_left > CNT_W'(MAX_BURST)) ? BL_W'(MAX_BURST) : BL_W'(aw_left);
  assign awsize   = 3'($clog2(BYTES));
  assign awburst  = 2'b01;
  assign wstrb    = '1;
  assign wdata    = in_data;
  assign wvalid   = busy && (ahead != '0) && in_valid;
  // every burst but the last is MAX_BURST long
  assign wlast    = (beat == BL_W'(MAX_BURST - 1)) || (w_left == CNT_W'(1));
  assign in_ready = busy && (ahead != '0) && wready;
  assign bready   = 1'b1;
  assign aw_go    = awvalid && awready;
  assign w_end    = wvalid && wready && wlast;
  assign b_go     = bvalid && busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; aw_left <= '0; w_left <= '0; resp_left <= '0;
      ahead <= '0; beat <= '0; awaddr <= '0; awlen <= '0; awvalid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && beats != '0) begin
          busy      <= 1'b1;
          aw_left   <= beats;
          w_left    <= beats;
          resp_left <= CNT_W'((beats + CNT_W'(MAX_BURST - 1)) / CNT_W'(MAX_BURST));
          awaddr    <= base;
          ahead     <= '0;
          beat      <= '0;
        end
      end else begin
        // address channel: keep up to two bursts addressed ahead of the data
        if (aw_go) begin
          awvalid <= 1'b0;
          awaddr  <= awaddr + 64'(awlen + 1'b1) * BYTES;
        end else if (!awvalid && aw_left != '0 && ahead < 2'd2) begin
          awvalid <= 1'b1;
          awlen   <= 8'(aw_len - 1'b1);
          aw_left <= aw_left - CNT_W'(aw_len);
        end
        ahead <= ahead + 2'(aw_go) - 2'(w_end);
        // data channel
        if (wvalid && wready) begin
          beat   <= wlast ? '0 : beat + 1'b1;
          w_left <= w_left - 1'b1;
        end
        // responses
        if (b_go) resp_left <= resp_left - 1'b1;
        if (w_left == '0 && (resp_left == '0 || (resp_left == CNT_W'(1) && b_go))) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   awvalid && !awready |=> awvalid && $stable(awaddr) && $stable(awlen));

  logic unused;
  assign unused = ^bresp;

endmodule
