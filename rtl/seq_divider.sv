// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Used by the reduce stages of the metric accelerators for the few divisions
// they do once per image (the mean of MSE, the normalisation of CC, the
// entropy sums of MI and NMI). A pulse on start loads dividend and divisor;
// W cycles later done pulses for one cycle with quotient = dividend / divisor
// (truncated). A zero divisor returns an all-ones quotient. busy is high while
// a division is running; start is ignored then.
//
// The source does not say how the divisions are done; a bit-serial divider
// is this design's choice, as they happen once per image.
module seq_divider #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  logic [W-1:0]           q_q, d_q;
  logic [W-1:0]           r_q;
  logic [$clog2(W+1)-1:0] n_q;
  logic [W:0]             r_sh;  // partial remainder shifted by one dividend bit

  assign r_sh = {r_q, q_q[W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      n_q  <= '0;
      q_q  <= '0;
      r_q  <= '0;
      d_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q_q  <= dividend;
          d_q  <= divisor;
          r_q  <= '0;
          n_q  <= ($clog2(W+1))'(W);
        end
      end else begin
        if (r_sh >= {1'b0, d_q}) begin
          r_q <= W'(r_sh - {1'b0, d_q});
          q_q <= {q_q[W-2:0], 1'b1};
        end else begin
          r_q <= r_sh[W-1:0];
          q_q <= {q_q[W-2:0], 1'b0};
        end
        n_q <= n_q - 1'b1;
        if (n_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = q_q;

endmodule
