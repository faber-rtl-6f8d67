// pkt_unpack: splits a packet of PE coalesced pixels into single pixels.
//
// Used in front of the transformation, which consumes one pixel per cycle.
// Pixel k of a packet sits in bits [k*B +: B] and leaves k-th. One pixel per
// cycle on out_valid/out_data/out_ready; a new packet is accepted as the last
// pixel of the previous one leaves, so the output never idles.
//
// The source only says the transform works on single pixels and the metrics
// on packets; this converter is this design's own.
module pkt_unpack #(
  parameter int unsigned PE = 16,
  parameter int unsigned B  = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [PE*B-1:0] in_data,
  output logic            in_ready,
  output logic            out_valid,
  output logic [B-1:0]    out_data,
  input  logic            out_ready
);
  localparam int unsigned KW = (PE > 1) ? $clog2(PE) : 1;

  logic [PE*B-1:0] buf_q;
  logic [KW-1:0]   k;
  logic            last;

  assign last      = (k == KW'(PE - 1));
  assign in_ready  = !out_valid || (out_ready && last);
  assign out_data  = buf_q[k*B +: B];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; k <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) k <= last ? '0 : k + 1'b1;
      if (in_valid && in_ready) begin
        buf_q     <= in_data;
        out_valid <= 1'b1;
        k         <= '0;
      end else if (out_valid && out_ready && last) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
