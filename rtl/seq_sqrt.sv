// seq_sqrt: unsigned integer square root, one result bit per clock.
//
// Used once per image by the cross-correlation reduce stage for the
// denominator sqrt(sum X^2 * sum Y^2). A pulse on start loads radicand
// (2*W bits); W cycles later done pulses with root = floor(sqrt(radicand)).
// Digit-by-digit (non-restoring style) method: two radicand bits enter the
// partial remainder per cycle and one root bit is decided.
//
// The source does not say how the root is taken; this circuit is this
// design's choice.
module seq_sqrt #(
  parameter int unsigned W = 40
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] radicand,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   root
);
  logic [2*W-1:0]         a_q;
  logic [W-1:0]           r_q;  // remainder before the last step fits W bits
  logic [W-1:0]           y_q;
  logic [$clog2(W+1)-1:0] n_q;
  logic [W+1:0]           r_sh, trial;  // remainder with the next two bits, trial subtrahend

  assign r_sh  = {r_q, a_q[2*W-1:2*W-2]};
  assign trial = {y_q, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      a_q  <= '0;
      r_q  <= '0;
      y_q  <= '0;
      n_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          a_q  <= radicand;
          r_q  <= '0;
          y_q  <= '0;
          n_q  <= ($clog2(W+1))'(W);
        end
      end else begin
        a_q  <= a_q << 2;
        if (r_sh >= trial) begin
          r_q <= W'(r_sh - trial);
          y_q <= {y_q[W-2:0], 1'b1};
        end else begin
          r_q <= r_sh[W-1:0];
          y_q <= {y_q[W-2:0], 1'b0};
        end
        n_q <= n_q - 1'b1;
        if (n_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign root = y_q;

endmodule
