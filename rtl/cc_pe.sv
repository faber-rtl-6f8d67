// cc_pe: one processing element of the cross-correlation accelerator.
//
// Two pipeline stages: the three products X*Y, X*X and Y*Y of a pixel pair,
// then accumulation into the PE's private partial sums. clear zeroes them
// (the reduce stage does it after reading). The sums are valid one cycle
// after the last in_valid.
//
// The PE role follows the source; its two-stage pipeline is this design's own.
module cc_pe #(
  parameter int unsigned B     = 8,
  parameter int unsigned ACC_W = 36
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [B-1:0]     ref_px,
  input  logic [B-1:0]     flt_px,
  output logic [ACC_W-1:0] sxy,
  output logic [ACC_W-1:0] sxx,
  output logic [ACC_W-1:0] syy
);
  logic           v1;
  logic [2*B-1:0] pxy, pxx, pyy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; pxy <= '0; pxx <= '0; pyy <= '0;
      sxy <= '0; sxx <= '0; syy <= '0;
    end else begin
      v1  <= in_valid;
      pxy <= ref_px * flt_px;
      pxx <= ref_px * ref_px;
      pyy <= flt_px * flt_px;
      if (clear) begin
        sxy <= '0; sxx <= '0; syy <= '0;
      end else if (v1) begin
        sxy <= sxy + ACC_W'(pxy);
        sxx <= sxx + ACC_W'(pxx);
        syy <= syy + ACC_W'(pyy);
      end
    end
  end
endmodule
