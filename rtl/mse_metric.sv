// mse_metric: map-reduce accelerator for the mean squared error
//   MSE = (1/N) * sum_i (X_i - Y_i)^2 ,  N = DIM*DIM pixels.
//
// Map: each accepted packet carries PE reference pixels and PE floating
// pixels (pixel k in bits [k*B +: B]); pixel k of both goes to PE k.
// PEs: mse_pe, a three-stage difference/square/accumulate pipeline.
// Reduce: after N/PE packets the PE partial sums are added in one registered
// adder tree and divided by N with a sequential divider, giving the MSE in
// the shared 64-bit fixed-point format (METRIC_FRAC fractional bits).
//
// Streams: ref_* and flt_* are valid/ready packet streams; a packet is taken
// when both are valid (in_ready is common to both). The result is offered on
// res_valid/res_value until res_ready; no new packet is taken meanwhile.
// Timing: one packet per cycle, so about DIM*DIM/PE cycles per image plus a
// fixed tail of about 70 cycles for the reduce and the division.
// The structure (map, multi-stage PEs, reduce) follows the source; the stage
// split, the widths and the handshake are this design's choices.
module mse_metric
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

  typedef enum logic [2:0] {S_ACC, S_DRAIN, S_SUM, S_DIV, S_OUT} state_e;
  state_e state;

  logic [PW-1:0]    pkt_cnt;
  logic [2:0]       drain_cnt;
  logic             take;
  logic             pe_clear;
  logic [SUM_W-1:0] acc [PE];
  logic [SUM_W-1:0] total;
  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] quot;

  assign in_ready = (state == S_ACC);
  assign take     = in_ready && ref_valid && flt_valid;

  for (genvar k = 0; k < PE; k++) begin : g_pe
    mse_pe #(.B(B), .ACC_W(SUM_W)) u_pe (
      .clk, .rst_n, .clear(pe_clear), .in_valid(take),
      .ref_px(ref_data[k*B +: B]), .flt_px(flt_data[k*B +: B]), .acc(acc[k]));
  end

  // Reduce: adder tree over the PE partial sums.
  logic [SUM_W-1:0] tree;
  always_comb begin
    tree = '0;
    for (int k = 0; k < PE; k++) tree = tree + acc[k];
  end

  seq_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend({total, METRIC_FRAC'(0)}), .divisor(DIV_W'(NPIX)),
    .busy(div_busy), .done(div_done), .quotient(quot));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_ACC;
      pkt_cnt   <= '0;
      drain_cnt <= '0;
      total     <= '0;
      pe_clear  <= 1'b0;
      div_start <= 1'b0;
      res_valid <= 1'b0;
      res_value <= '0;
    end else begin
      pe_clear  <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_ACC: if (take) begin
          if (pkt_cnt == PW'(NPKT - 1)) begin
            pkt_cnt   <= '0;
            drain_cnt <= '0;
            state     <= S_DRAIN;
          end else begin
            pkt_cnt <= pkt_cnt + 1'b1;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 3'd3) state <= S_SUM;
        end
        S_SUM: begin
          total     <= tree;
          pe_clear  <= 1'b1;
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV: if (div_done) begin
          res_value <= metric_t'(quot);
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

  // A new packet is never taken while a result is pending.
  assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> !take);

endmodule
