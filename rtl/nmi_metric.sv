// nmi_metric: normalised mutual information with Parzen-window density
// estimation, NMI = (H(X) + H(Y)) / H(X,Y).
//
// Built from the MI pipeline: joint_histogram (map onto PE histogram engines,
// reduce), then parzen_conv, which convolves the joint histogram with a K x K
// B-spline kernel through a (K-1)-row line buffer, then entropy_unit on the
// (2^B+K-1)^2 smoothed bins, and a final sequential division.
// The result is unsigned, in the shared 64-bit fixed-point format
// (METRIC_FRAC fractional bits); values lie between 1 and 2 and grow with
// alignment. A zero joint entropy gives an all-ones quotient.
// Timing: DIM*DIM/PE cycles for the histogram, (2^B+K-1)^2 cycles for the
// convolution and entropy pass, then the divisions (about 4 * 100 cycles).
// The normalisation formula is this design's choice: the source names the
// metric and its Parzen step but does not print its formula.
module nmi_metric
  import faber_pkg::*;
#(
  parameter int unsigned DIM = 512,
  parameter int unsigned PE  = 16,
  parameter int unsigned B   = 8,
  parameter int unsigned K   = 3
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
  localparam int unsigned HW    = cnt_w(longint'(DIM) * DIM);
  localparam int unsigned CWID  = HW + 6;
  localparam int unsigned DIV_W = 64 + METRIC_FRAC + 1;

  logic            bin_valid, bin_last, bin_ready;
  logic [HW-1:0]   bin_data;
  logic            s_valid, s_last, s_ready;
  logic [CWID-1:0] s_data;
  logic            e_valid, e_ready;
  logic [63:0]     hx, hy, hxy;

  joint_histogram #(.DIM(DIM), .PE(PE), .B(B)) u_hist (
    .clk, .rst_n, .ref_valid, .ref_data, .flt_valid, .flt_data, .in_ready,
    .bin_valid, .bin_data, .bin_last, .bin_ready);

  // bin_last is implied by the convolution's own grid counters.
  logic unused_last;
  assign unused_last = bin_last;

  parzen_conv #(.NB(1 << B), .IN_W(HW), .K(K)) u_conv (
    .clk, .rst_n, .in_valid(bin_valid), .in_data(bin_data), .in_ready(bin_ready),
    .out_valid(s_valid), .out_data(s_data), .out_last(s_last), .out_ready(s_ready));

  entropy_unit #(.NB((1 << B) + K - 1), .IN_W(CWID)) u_ent (
    .clk, .rst_n, .bin_valid(s_valid), .bin_data(s_data), .bin_last(s_last),
    .bin_ready(s_ready), .res_valid(e_valid), .hx, .hy, .hxy, .res_ready(e_ready));

  typedef enum logic [1:0] {S_WAIT, S_DIV, S_OUT} state_e;
  state_e state;
  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] quot;

  seq_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend({DIV_W'(hx) + DIV_W'(hy)} << METRIC_FRAC), .divisor(DIV_W'(hxy)),
    .busy(div_busy), .done(div_done), .quotient(quot));

  assign e_ready = (state == S_OUT) && res_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT; div_start <= 1'b0; res_valid <= 1'b0; res_value <= '0;
    end else begin
      div_start <= 1'b0;
      unique case (state)
        S_WAIT: if (e_valid) begin
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV: if (div_done) begin
          res_value <= (quot[DIV_W-1:63] != '0) ? metric_t'({1'b0, {63{1'b1}}}) : metric_t'(quot);
          res_valid <= 1'b1;
          state     <= S_OUT;
        end
        S_OUT: if (res_ready) begin
          res_valid <= 1'b0;
          state     <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
