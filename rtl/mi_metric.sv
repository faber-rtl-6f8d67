// mi_metric: mutual-information accelerator, MI = H(X) + H(Y) - H(X,Y).
//
// Two map-reduce macro stages, as in the source: joint_histogram maps the
// coalesced pixel pairs of each packet onto PE histogram engines and reduces
// them into one 2^B x 2^B joint histogram, streamed bin by bin into
// entropy_unit, which extracts the two marginal histograms on the fly and
// computes the three entropies. The last step forms MI in the shared signed
// 64-bit fixed-point format (METRIC_FRAC fractional bits, in bits).
// Streams and result handshake are those of mse_metric.
// Timing: DIM*DIM/PE cycles for the histogram, then (2^B)^2 cycles for the
// reduce/entropy pass (the two do not overlap: the entropies need the whole
// histogram), then a tail of a few hundred cycles for the marginal sums and
// three divisions. The source computes entropies in 32-bit floating point by
// default and offers fixed point as an option; this design is fixed point.
module mi_metric
  import faber_pkg::*;
#(
  parameter int unsigned DIM = 512,
  parameter int unsigned PE  = 16,
  parameter int unsigned B   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ref_valid,
  input  logic [PE*B-1:0] ref_data,
  input  logic            flt_valid,
  input  logic [PE*B-1:0] flt_data,
  output logic            in_ready,
  output logic            res_valid,
  output metric_t         res_value,
  input  logic            res_ready
);
  localparam int unsigned HW = cnt_w(longint'(DIM) * DIM);

  logic          bin_valid, bin_last, bin_ready;
  logic [HW-1:0] bin_data;
  logic          e_valid;
  logic [63:0]   hx, hy, hxy;

  joint_histogram #(.DIM(DIM), .PE(PE), .B(B)) u_hist (
    .clk, .rst_n, .ref_valid, .ref_data, .flt_valid, .flt_data, .in_ready,
    .bin_valid, .bin_data, .bin_last, .bin_ready);

  entropy_unit #(.NB(1 << B), .IN_W(HW)) u_ent (
    .clk, .rst_n, .bin_valid, .bin_data, .bin_last, .bin_ready,
    .res_valid(e_valid), .hx, .hy, .hxy, .res_ready);

  assign res_valid = e_valid;
  assign res_value = metric_t'(hx) + metric_t'(hy) - metric_t'(hxy);

endmodule
