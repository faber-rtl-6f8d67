// cc_metric: map-reduce accelerator for the normalised cross-correlation
//   CC = - sum(X_i*Y_i) / sqrt( sum(X_i^2) * sum(Y_i^2) ).
//
// Map: each accepted packet carries PE reference and PE floating pixels
// (pixel k in bits [k*B +: B]); pair k goes to PE k. Each cc_pe accumulates
// its share of the cross term and of the two autocorrelations.
// Reduce: after DIM*DIM/PE packets the three sets of partial sums are added,
// a sequential square root forms the denominator and a sequential divider
// the quotient, which is negated (a better match gives a lower value, as the
// optimiser minimises). The result uses the shared 64-bit fixed-point format
// (METRIC_FRAC fractional bits); a zero denominator gives 0.
//
// Streams, result handshake and timing are the same as mse_metric: one packet
// per cycle, about DIM*DIM/PE cycles plus a tail of roughly 2*SUM_W + 40
// cycles for the root and the division.
//
// The source describes the map (pixel pairs to PEs computing the cross term and
// the two autocorrelations) and the reduce; the exact normalisation, the sign
// and the fixed-point format are this design's choices.
module cc_metric
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
  localparam longint unsigned NPIX  = longint'(DIM) * DIM;
  localparam longint unsigned NPKT  = NPIX / longint'(PE);
  localparam int unsigned     SUM_W = 2*B + cnt_w(NPIX);
  localparam int unsigned     DIV_W = SUM_W + METRIC_FRAC;
  localparam int unsigned     PW    = cnt_w(NPKT);

  typedef enum logic [2:0] {S_ACC, S_DRAIN, S_SUM, S_SQRT, S_DIV, S_OUT} state_e;
  state_e state;

  logic [PW-1:0]      pkt_cnt;
  logic [1:0]         drain_cnt;
  logic               take, pe_clear;
  logic [SUM_W-1:0]   axy [PE];
  logic [SUM_W-1:0]   axx [PE];
  logic [SUM_W-1:0]   ayy [PE];
  logic [SUM_W-1:0]   txy, txx, tyy;
  logic [SUM_W-1:0]   t_xy, t_xx, t_yy;
  logic               sq_start, sq_busy, sq_done;
  logic [SUM_W-1:0]   root, root_q;
  logic               div_start, div_busy, div_done;
  logic [DIV_W-1:0]   quot;

  assign in_ready = (state == S_ACC);
  assign take     = in_ready && ref_valid && flt_valid;

  for (genvar k = 0; k < PE; k++) begin : g_pe
    cc_pe #(.B(B), .ACC_W(SUM_W)) u_pe (
      .clk, .rst_n, .clear(pe_clear), .in_valid(take),
      .ref_px(ref_data[k*B +: B]), .flt_px(flt_data[k*B +: B]),
      .sxy(axy[k]), .sxx(axx[k]), .syy(ayy[k]));
  end

  always_comb begin
    txy = '0; txx = '0; tyy = '0;
    for (int k = 0; k < PE; k++) begin
      txy = txy + axy[k];
      txx = txx + axx[k];
      tyy = tyy + ayy[k];
    end
  end

  seq_sqrt #(.W(SUM_W)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(t_xx * t_yy),
    .busy(sq_busy), .done(sq_done), .root(root));

  seq_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend({t_xy, METRIC_FRAC'(0)}), .divisor(DIV_W'(root_q)),
    .busy(div_busy), .done(div_done), .quotient(quot));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ACC; pkt_cnt <= '0; drain_cnt <= '0;
      t_xy <= '0; t_xx <= '0; t_yy <= '0; root_q <= '0;
      pe_clear <= 1'b0; sq_start <= 1'b0; div_start <= 1'b0;
      res_valid <= 1'b0; res_value <= '0;
    end else begin
      pe_clear  <= 1'b0;
      sq_start  <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_ACC: if (take) begin
          if (pkt_cnt == PW'(NPKT - 1)) begin
            pkt_cnt <= '0; drain_cnt <= '0; state <= S_DRAIN;
          end else pkt_cnt <= pkt_cnt + 1'b1;
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 2'd2) state <= S_SUM;
        end
        S_SUM: begin
          t_xy <= txy; t_xx <= txx; t_yy <= tyy;
          pe_clear <= 1'b1;
          sq_start <= 1'b1;
          state    <= S_SQRT;
        end
        S_SQRT: if (sq_done) begin
          root_q <= root;
          if (root == '0) begin
            res_value <= '0;
            res_valid <= 1'b1;
            state     <= S_OUT;
          end else begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: if (div_done) begin
          res_value <= -metric_t'(quot);
          res_valid <= 1'b1;
          state     <= S_OUT;
        end
        S_OUT: if (res_ready) begin
          res_valid <= 1'b0;
          state     <= S_ACC;
        end
        default: state <= S_ACC;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> !take);

endmodule
