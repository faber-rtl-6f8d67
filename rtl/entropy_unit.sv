// entropy_unit: marginal and joint entropies from a streamed joint histogram.
//
// Input: NB x NB histogram bins, row-major (row = reference intensity,
// column = floating intensity), on bin_valid/bin_data/bin_last, one per cycle.
// With T = sum of all bins, each entropy is computed as
//   H = -sum (h/T) log2(h/T) = log2(T) - (1/T) * sum h*log2(h),
// so no probability is ever formed: every bin h goes through a pipelined
// log2 (log2_pipe) and h*log2(h) is accumulated into S_xy. The marginal
// histograms are extracted on the fly: a running row sum is sent to a second
// log2 pipe at the end of each row (S_x), and per-column sums are kept in an
// NB-entry array and sent through the same pipe after the last bin (S_y),
// followed by T itself. Three sequential divisions S/T then give Hx, Hy, Hxy.
// Outputs are unsigned fixed point with METRIC_FRAC fractional bits, offered
// on res_valid until res_ready.
// Timing: NB*NB cycles for the bins, NB+1 cycles for the column sums, the log
// latency (LOG_FRAC+1) and three divisions of DIV_W cycles each.
// The source says only that the marginal histograms are extracted after the
// joint one and the entropies computed in parallel; the log2 method, the
// fixed-point formats and this sum form of the entropy are this design's.
module entropy_unit
  import faber_pkg::*;
#(
  parameter int unsigned NB       = 256,
  parameter int unsigned IN_W     = 19,
  parameter int unsigned LOG_FRAC = 20
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bin_valid,
  input  logic [IN_W-1:0] bin_data,
  input  logic            bin_last,
  output logic            bin_ready,
  output logic            res_valid,
  output logic [63:0]     hx,
  output logic [63:0]     hy,
  output logic [63:0]     hxy,
  input  logic            res_ready
);
  localparam int unsigned SW    = IN_W + cnt_w(longint'(NB) * NB);  // sums of bins
  localparam int unsigned LIW   = $clog2(SW);
  localparam int unsigned LW    = LIW + LOG_FRAC;
  localparam int unsigned ACC_W = SW + LW + 1;
  localparam int unsigned SH    = METRIC_FRAC - LOG_FRAC;
  localparam int unsigned DIV_W = ACC_W + SH;
  localparam int unsigned CW    = $clog2(NB);

  typedef enum logic [2:0] {S_IN, S_COL, S_TOT, S_WAIT, S_DIV, S_OUT} state_e;
  state_e state;

  logic [CW-1:0]    col;
  logic [CW:0]      cptr;
  logic             first_row;
  logic [SW-1:0]    rowsum, total;
  logic [SW-1:0]    colsum [NB];
  logic             take;

  // Log pipe A: joint bins. Log pipe B: row sums, column sums, total.
  logic             a_v, b_in_v, b_v;
  logic [SW-1:0]    b_in_d, a_d, b_d;
  logic [1:0]       b_in_t, b_t, a_t;
  logic [LW-1:0]    a_log, b_log;
  logic [5:0]       wait_cnt;
  logic [ACC_W-1:0] s_xy, s_x, s_y;
  logic [LW-1:0]    log_t;

  assign bin_ready = (state == S_IN);
  assign take      = bin_valid && bin_ready;

  log2_pipe #(.IN_W(SW), .FRAC(LOG_FRAC), .TAG_W(2)) u_log_a (
    .clk, .rst_n, .in_valid(take), .in_data(SW'(bin_data)), .in_tag(2'd0),
    .out_valid(a_v), .out_data(a_d), .out_tag(a_t), .out_log(a_log));

  log2_pipe #(.IN_W(SW), .FRAC(LOG_FRAC), .TAG_W(2)) u_log_b (
    .clk, .rst_n, .in_valid(b_in_v), .in_data(b_in_d), .in_tag(b_in_t),
    .out_valid(b_v), .out_data(b_d), .out_tag(b_t), .out_log(b_log));

  // Feed of pipe B: the finished row sum, then column sums, then T.
  always_comb begin
    b_in_v = 1'b0;
    b_in_d = '0;
    b_in_t = 2'd0;
    if (take && col == CW'(NB - 1)) begin
      b_in_v = 1'b1;
      b_in_d = rowsum + SW'(bin_data);
      b_in_t = 2'd0;
    end else if (state == S_COL) begin
      b_in_v = 1'b1;
      b_in_d = colsum[cptr[CW-1:0]];
      b_in_t = 2'd1;
    end else if (state == S_TOT) begin
      b_in_v = 1'b1;
      b_in_d = total;
      b_in_t = 2'd2;
    end
  end

  // Column sums: the first row writes, later rows add.
  always_ff @(posedge clk) begin
    if (take) colsum[col] <= first_row ? SW'(bin_data) : colsum[col] + SW'(bin_data);
  end

  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] div_num, quot;
  logic [1:0]       div_idx;

  always_comb begin
    unique case (div_idx)
      2'd0:    div_num = {s_x,  SH'(0)};
      2'd1:    div_num = {s_y,  SH'(0)};
      default: div_num = {s_xy, SH'(0)};
    endcase
  end

  seq_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_num), .divisor(DIV_W'(total)),
    .busy(div_busy), .done(div_done), .quotient(quot));

  logic [63:0] log_t_q;
  assign log_t_q = 64'(log_t) << SH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IN; col <= '0; cptr <= '0; first_row <= 1'b1;
      rowsum <= '0; total <= '0; wait_cnt <= '0;
      s_xy <= '0; s_x <= '0; s_y <= '0; log_t <= '0;
      div_start <= 1'b0; div_idx <= '0;
      res_valid <= 1'b0; hx <= '0; hy <= '0; hxy <= '0;
    end else begin
      div_start <= 1'b0;
      // Accumulate h*log2(h) as results leave the log pipes.
      if (a_v) s_xy <= s_xy + ACC_W'(a_d) * ACC_W'(a_log);
      if (b_v) begin
        unique case (b_t)
          2'd0:    s_x   <= s_x + ACC_W'(b_d) * ACC_W'(b_log);
          2'd1:    s_y   <= s_y + ACC_W'(b_d) * ACC_W'(b_log);
          default: log_t <= b_log;
        endcase
      end
      unique case (state)
        S_IN: if (take) begin
          total <= total + SW'(bin_data);
          col   <= col + 1'b1;
          if (col == CW'(NB - 1)) begin
            col       <= '0;
            rowsum    <= '0;
            first_row <= 1'b0;
          end else begin
            rowsum <= rowsum + SW'(bin_data);
          end
          if (bin_last) begin
            cptr  <= '0;
            state <= S_COL;
          end
        end
        S_COL: begin
          cptr <= cptr + 1'b1;
          if (cptr == (CW+1)'(NB - 1)) state <= S_TOT;
        end
        S_TOT: begin
          wait_cnt <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 6'(LOG_FRAC + 2)) begin
            div_idx   <= 2'd0;
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: if (div_done) begin
          unique case (div_idx)
            2'd0:    hx  <= log_t_q - 64'(quot);
            2'd1:    hy  <= log_t_q - 64'(quot);
            default: hxy <= log_t_q - 64'(quot);
          endcase
          if (div_idx == 2'd2) begin
            res_valid <= 1'b1;
            state     <= S_OUT;
          end else begin
            div_idx   <= div_idx + 1'b1;
            div_start <= 1'b1;
          end
        end
        S_OUT: if (res_ready) begin
          res_valid <= 1'b0;
          total     <= '0;
          first_row <= 1'b1;
          s_xy <= '0; s_x <= '0; s_y <= '0;
          state     <= S_IN;
        end
        default: state <= S_IN;
      endcase
    end
  end

  // The histogram must end exactly at the last bin of the last row.
  assert property (@(posedge clk) disable iff (!rst_n)
                   take && bin_last |-> (col == CW'(NB - 1)));

endmodule
