// joint_histogram: map / PE / reduce front end of the MI and NMI accelerators.
//
// Map: each accepted packet carries PE reference and PE floating pixels
// (pixel k in bits [k*B +: B]); pair k goes to hist_pe k, which counts it in
// its own partial 2^B x 2^B joint histogram. With PE engines one packet is
// taken per cycle, so an image of DIM*DIM pixels takes DIM*DIM/PE cycles.
// Reduce: after the last packet the PEs' histograms are read bin by bin in
// row-major order (row = reference intensity, column = floating intensity),
// summed by an adder tree and streamed out on bin_valid/bin_data/bin_last
// with bin_ready back-pressure, one bin per cycle: 2^(2B) cycles. Reading a
// bin clears it, so the PEs are ready for the next image when the stream
// ends. After reset the unit first clears all bins (2^(2B) cycles, in_ready
// low), since memories have no reset.
// The map/PE/reduce split and the bin-by-bin reduce follow the source; the
// clear-on-read, the forwarding inside the PEs and the handshakes are this
// design's choices.
module joint_histogram
  import faber_pkg::*;
#(
  parameter int unsigned DIM = 512,
  parameter int unsigned PE  = 16,
  parameter int unsigned B   = 8,
  localparam int unsigned OUT_W = cnt_w(longint'(DIM) * DIM)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ref_valid,
  input  logic [PE*B-1:0]  ref_data,
  input  logic             flt_valid,
  input  logic [PE*B-1:0]  flt_data,
  output logic             in_ready,
  output logic             bin_valid,
  output logic [OUT_W-1:0] bin_data,
  output logic             bin_last,
  input  logic             bin_ready
);
  localparam longint unsigned NPIX  = longint'(DIM) * DIM;
  localparam longint unsigned NPKT  = NPIX / longint'(PE);
  localparam int unsigned     CNT_W = cnt_w(NPKT);
  localparam int unsigned     PW    = cnt_w(NPKT);
  localparam int unsigned     AW    = 2*B;

  typedef enum logic [1:0] {S_INIT, S_ACC, S_DRAIN, S_RED} state_e;
  state_e state;

  logic [PW-1:0]    pkt_cnt;
  logic [1:0]       drain_cnt;
  logic [AW:0]      rd_ptr;      // next bin to read; bit AW set when all issued
  logic             take, adv, issue, rd_vq, rd_lastq;
  logic [CNT_W-1:0] pe_q [PE];
  logic [OUT_W-1:0] tree;

  assign in_ready = (state == S_ACC);
  assign take     = in_ready && ref_valid && flt_valid;
  assign adv      = !bin_valid || bin_ready;
  assign issue    = ((state == S_RED) && adv && !rd_ptr[AW]) ||
                    ((state == S_INIT) && !rd_ptr[AW]);

  for (genvar k = 0; k < PE; k++) begin : g_pe
    hist_pe #(.B(B), .CNT_W(CNT_W)) u_pe (
      .clk, .rst_n, .in_valid(take),
      .ref_px(ref_data[k*B +: B]), .flt_px(flt_data[k*B +: B]),
      .rd_en(issue), .rd_addr(rd_ptr[AW-1:0]), .rd_data(pe_q[k]));
  end

  always_comb begin
    tree = '0;
    for (int k = 0; k < PE; k++) tree = tree + OUT_W'(pe_q[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; pkt_cnt <= '0; drain_cnt <= '0; rd_ptr <= '0;
      rd_vq <= 1'b0; rd_lastq <= 1'b0;
      bin_valid <= 1'b0; bin_data <= '0; bin_last <= 1'b0;
    end else begin
      unique case (state)
        S_INIT: begin
          rd_ptr <= rd_ptr + 1'b1;
          if (rd_ptr[AW]) begin
            rd_ptr <= '0;
            state  <= S_ACC;
          end
        end
        S_ACC: if (take) begin
          if (pkt_cnt == PW'(NPKT - 1)) begin
            pkt_cnt <= '0; drain_cnt <= '0; state <= S_DRAIN;
          end else pkt_cnt <= pkt_cnt + 1'b1;
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 2'd2) state <= S_RED;
        end
        S_RED: if (adv) begin
          bin_valid <= rd_vq;
          bin_data  <= tree;
          bin_last  <= rd_lastq;
          rd_vq     <= issue;
          rd_lastq  <= issue && (rd_ptr[AW-1:0] == '1);
          if (issue) rd_ptr <= rd_ptr + 1'b1;
          if (rd_vq && rd_lastq) begin
            rd_ptr <= '0;
            state  <= S_ACC;
          end
        end
        default: state <= S_ACC;
      endcase
      // The last bin leaves while the state is already back to S_ACC.
      if (state != S_RED && bin_valid && bin_ready) begin
        bin_valid <= 1'b0;
        bin_last  <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) bin_valid && !bin_ready |=> $stable(bin_data));

endmodule
