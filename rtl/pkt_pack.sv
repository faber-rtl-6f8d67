// pkt_pack: gathers PE single pixels into one packet of PE coalesced pixels.
//
// Used after the transformation so that the metric PEs receive packets as
// they would from memory. The first pixel goes to bits [B-1:0]. A full packet
// is offered on out_valid/out_data until out_ready; the next pixel can enter
// in the same cycle the packet leaves.
//
// The source only says the transform works on single pixels and the metrics
// on packets; this converter is this design's own.
module pkt_pack #(
  parameter int unsigned PE = 16,
  parameter int unsigned B  = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [B-1:0]    in_data,
  output logic            in_ready,
  output logic            out_valid,
  output logic [PE*B-1:0] out_data,
  input  logic            out_ready
);
  localparam int unsigned KW = (PE > 1) ? $clog2(PE) : 1;

  logic [PE*B-1:0] acc;
  logic [KW-1:0]   k;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; k <= '0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (k == KW'(PE - 1)) begin
          out_data  <= acc;
          out_data[k*B +: B] <= in_data;
          out_valid <= 1'b1;
          k         <= '0;
        end else begin
          acc[k*B +: B] <= in_data;
          k <= k + 1'b1;
        end
      end
    end
  end
endmodule
