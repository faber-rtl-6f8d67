// mse_pe: one processing element of the mean-squared-error accelerator.
//
// Three pipeline stages: difference of a reference/floating pixel pair,
// square, and accumulation into the PE's private partial sum. clear zeroes the
// partial sum (the reduce stage does it after reading it). The partial sum is
// valid two cycles after the last in_valid.
//
// The PE role (square of differences) follows the source; the pipeline is
// this design's own.
module mse_pe #(
  parameter int unsigned B     = 8,
  parameter int unsigned ACC_W = 36
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [B-1:0]     ref_px,
  input  logic [B-1:0]     flt_px,
  output logic [ACC_W-1:0] acc
);
  logic              v1, v2;
  logic signed [B:0] diff;
  logic [2*B-1:0]    sq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; acc <= '0; diff <= '0; sq <= '0;
    end else begin
      v1   <= in_valid;
      v2   <= v1;
      diff <= $signed({1'b0, ref_px}) - $signed({1'b0, flt_px});
      sq   <= (2*B)'(diff * diff);
      if (clear)   acc <= '0;
      else if (v2) acc <= acc + ACC_W'(sq);
    end
  end
endmodule
